// tb_vrc - self-checking testbench of the VRC.
//
// A new random window enters every cycle. Configurations are switched while
// the stream runs, column c of the new bitstream being written one cycle
// before the first window of the new candidate reaches column c (including two
// switches 8 windows apart, back to back). Every output, 8 cycles after its
// window, must equal the reference VRC evaluated with the bitstream that was
// current for that window.
module tb_vrc;
  import cgp_pkg::*;
  import cgp_ref_pkg::*;

  localparam int NWIN = 400;
  localparam int NSW  = 5;
  localparam int SW_AT [NSW] = '{0, 40, 48, 130, 300};  // first window of each bitstream

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       cfg_we;
  logic [2:0]                 cfg_col;
  logic [63:0]                cfg_data;
  logic [N_PRI-1:0][PIX_W-1:0] x;
  logic [PIX_W-1:0]           y;

  vrc dut (.clk, .rst_n, .cfg_we, .cfg_col, .cfg_data, .x, .y);

  int checks = 0, failures = 0;
  bitstream_t bs [NSW];
  int xs [NWIN][RNPRI];

  function automatic int bs_of(input int w);
    int k = 0;
    for (int i = 0; i < NSW; i++) if (w >= SW_AT[i]) k = i;
    return k;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NSW; i++) bs[i] = rand_bitstream();
    cfg_we = 0; cfg_col = 0; cfg_data = 0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // bitstream 0 is loaded before the stream starts
    for (int c = 0; c < 8; c++) begin
      @(negedge clk); cfg_we = 1; cfg_col = 3'(c); cfg_data = bs[0][c];
    end
    // cycle t: window t enters; column c of switch s written in cycle SW_AT[s]-1+c
    for (int t = 0; t < NWIN + 8; t++) begin
      @(negedge clk);
      cfg_we = 0;
      for (int s = 1; s < NSW; s++) begin
        int c;
        c = t - SW_AT[s] + 1;
        if (c >= 0 && c < 8) begin
          cfg_we = 1; cfg_col = 3'(c); cfg_data = bs[s][c];
        end
      end
      if (t < NWIN) begin
        for (int k = 0; k < RNPRI; k++) begin
          xs[t][k] = (t % 11 == 3) ? 0 : int'($urandom % 256);
          x[k] = 8'(xs[t][k]);
        end
      end
      if (t >= 8) begin
        int e;
        e = ref_vrc(bs[bs_of(t - 8)], xs[t - 8]);
        checks++;
        if (int'(y) != e) begin
          failures++;
          if (failures < 6) $display("window %0d: got %0d exp %0d", t - 8, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
