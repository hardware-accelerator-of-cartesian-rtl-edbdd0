// tb_pop_mem - self-checking testbench of the population memory.
//
// Fills every 32-bit word of every section of both banks with random data
// through the processor port, reads part of it back, then reads every column
// of both banks through the configuration port and checks that section 1
// comes out unchanged and sections 2..4 come out XORed with section 1. Also
// checks setting and clearing of the bank valid bits.
module tb_pop_mem;
  import cgp_pkg::*;

  localparam int NBK = 2, NS = 4, COLS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ppc_sel = 0, ppc_we = 0;
  logic [PPC_AW-1:0] ppc_addr;
  logic [31:0] ppc_wdata, ppc_rdata;
  logic cfg_re = 0;
  logic [0:0] cfg_bank;
  logic [2:0] cfg_col;
  logic [NS-1:0][63:0] cfg_data;
  logic [NBK-1:0] valid_set = 0, valid_clr = 0, valid;

  pop_mem #(.NBANK(NBK), .NSEC(NS)) dut (.clk, .rst_n, .ppc_sel, .ppc_we, .ppc_addr,
    .ppc_wdata, .ppc_rdata, .cfg_re, .cfg_bank, .cfg_col, .cfg_data,
    .valid_set, .valid_clr, .valid);

  int checks = 0, failures = 0;
  logic [63:0] model [NBK][COLS][NS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int waddr(input int s, input int b, input int c, input int h);
    return s * 256 + (b * COLS + c) * 2 + h;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++; if (valid != 0) failures++;
    // fill
    for (int s = 0; s < NS; s++)
      for (int b = 0; b < NBK; b++)
        for (int c = 0; c < COLS; c++)
          for (int h = 0; h < 2; h++) begin
            @(negedge clk);
            ppc_sel = 1; ppc_we = 1;
            ppc_addr = PPC_AW'(waddr(s, b, c, h));
            ppc_wdata = $urandom;
            model[b][c][s][32*h +: 32] = ppc_wdata;
          end
    @(negedge clk); ppc_sel = 0; ppc_we = 0;
    // read back through the processor port
    for (int n = 0; n < 40; n++) begin
      int s, b, c, h;
      s = $urandom % NS; b = $urandom % NBK; c = $urandom % COLS; h = $urandom % 2;
      @(negedge clk);
      ppc_sel = 1; ppc_we = 0; ppc_addr = PPC_AW'(waddr(s, b, c, h));
      @(posedge clk); #1;
      checks++;
      if (ppc_rdata != model[b][c][s][32*h +: 32]) failures++;
    end
    @(negedge clk); ppc_sel = 0;
    // validity
    valid_set = 2'b11;
    @(negedge clk); valid_set = 0;
    checks++; if (valid != 2'b11) failures++;
    // configuration port, with a read every other cycle
    for (int b = 0; b < NBK; b++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        cfg_re = 1; cfg_bank = 1'(b); cfg_col = 3'(c);
        @(negedge clk);
        cfg_re = (c % 2 == 0);   // also a back-to-back read of the next word
        cfg_col = 3'((c + 1) % COLS);
        for (int s = 0; s < NS; s++) begin
          logic [63:0] e;
          e = (s == 0) ? model[b][c][0] : model[b][c][0] ^ model[b][c][s];
          checks++;
          if (cfg_data[s] != e) begin
            failures++;
            if (failures < 6) $display("bank %0d col %0d sec %0d wrong", b, c, s);
          end
        end
      end
    @(negedge clk); cfg_re = 0;
    valid_clr = 2'b01;
    @(negedge clk); valid_clr = 0;
    checks++; if (valid != 2'b10) failures++;
    valid_clr = 2'b10; valid_set = 2'b01;
    @(negedge clk); valid_clr = 0; valid_set = 0;
    checks++; if (valid != 2'b01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
