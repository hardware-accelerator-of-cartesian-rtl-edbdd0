// tb_control_unit - self-checking testbench of the control unit.
//
// The testbench stands in for the fitness unit (eval_start every PASS cycles,
// a result RES_DLY cycles later), for the bank valid bits of the population
// memory and for the processor. It checks the round-robin bank choice, the
// column-by-column configuration read and VRC write sequence, stalls when no
// bank is valid, result registers, valid-bit clearing, irq and the counters.
module tb_control_unit;
  import cgp_pkg::*;

  localparam int PASS = 60, RES_DLY = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic reg_sel = 0, reg_we = 0;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic run, eval_start = 0, vrc_cfg_we;
  logic [2:0] vrc_cfg_col, mem_col;
  logic res_valid = 0;
  logic [23:0] res_fit;
  logic [1:0] res_idx;
  logic mem_re, irq;
  logic [0:0] mem_bank;
  logic [1:0] bank_valid, valid_set, valid_clr;

  control_unit #(.NBANK(2), .N_VRC(4)) dut (.clk, .rst_n, .reg_sel, .reg_we, .reg_addr,
    .reg_wdata, .reg_rdata, .run, .eval_start, .vrc_cfg_we, .vrc_cfg_col, .res_valid,
    .res_fit, .res_idx, .mem_re, .mem_bank, .mem_col, .bank_valid, .valid_set,
    .valid_clr, .irq);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bank_valid <= '0;
    else        bank_valid <= (bank_valid & ~valid_clr) | valid_set;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); reg_sel = 1; reg_we = 1; reg_addr = 4'(a); reg_wdata = d;
    @(negedge clk); reg_sel = 0; reg_we = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); reg_sel = 1; reg_we = 0; reg_addr = 4'(a);
    @(posedge clk); #1; d = reg_rdata;
    @(negedge clk); reg_sel = 0;
  endtask

  // one image pass: eval_start, then watch the load and deliver a result.
  // exp_bank < 0 means a stall is expected.
  task automatic pass(input int exp_bank, input int fit, input int idx);
    int irqs = 0;
    @(negedge clk); eval_start = 1;
    #1;
    checks++;
    if (exp_bank < 0) begin
      if (mem_re) failures++;
    end else if (!mem_re || int'(mem_bank) != exp_bank || mem_col != 0) begin
      failures++;
      $display("load start wrong: re=%b bank=%0d exp %0d", mem_re, mem_bank, exp_bank);
    end
    for (int t = 1; t < PASS; t++) begin
      @(negedge clk);
      eval_start = 0;
      res_valid = (t == RES_DLY);
      res_fit = 24'(fit); res_idx = 2'(idx);
      #1;
      if (t < 8) begin
        checks++;
        if (exp_bank >= 0 && (!mem_re || int'(mem_bank) != exp_bank || int'(mem_col) != t))
          failures++;
        if (exp_bank < 0 && mem_re) failures++;
      end else if (mem_re) failures++;
      if (t >= 1 && t <= 8) begin
        checks++;
        if (exp_bank >= 0 && (!vrc_cfg_we || int'(vrc_cfg_col) != t - 1)) failures++;
        if (exp_bank < 0 && vrc_cfg_we) failures++;
      end
      if (irq) irqs++;
    end
    @(negedge clk); res_valid = 0;
    if (irq) irqs++;
    checks++;
    if (irqs != ((exp_bank >= 0) ? 1 : 0)) failures++;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wr(REG_CTRL, 1);
    checks++; if (!run) failures++;
    // no bank valid: stall
    pass(-1, 0, 0);
    rd(REG_STALLS, d); checks++; if (d != 1) failures++;
    // bank 0 only
    wr(REG_VALID, 32'b01);
    pass(0, 1234, 2);
    rd(REG_VALID, d);  checks++; if (d != 0) failures++;
    rd(REG_RESULT + 0, d);
    checks++; if (d != {1'b1, 3'b0, 4'd2, 24'd1234}) begin failures++; $display("res0 %h", d); end
    // both banks valid: round robin continues with bank 1, then bank 0
    wr(REG_VALID, 32'b11);
    rd(REG_RESULT + 0, d); checks++; if (d[31]) failures++;
    pass(1, 77, 0);
    pass(0, 5, 3);
    rd(REG_RESULT + 1, d); checks++; if (d != {1'b1, 3'b0, 4'd0, 24'd77}) failures++;
    rd(REG_RESULT + 0, d); checks++; if (d != {1'b1, 3'b0, 4'd3, 24'd5}) failures++;
    pass(-1, 0, 0);
    rd(REG_EVALS, d);  checks++; if (d != 3) failures++;
    rd(REG_STALLS, d); checks++; if (d != 2) failures++;
    // only bank 0 again: it is chosen although bank 0 was evaluated last
    wr(REG_VALID, 32'b01);
    pass(0, 9, 1);
    wr(REG_CTRL, 0);
    checks++; if (run) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
