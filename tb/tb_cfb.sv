// tb_cfb - self-checking testbench of the CFB.
//
// Two instances (an inner column and a first column) get random configurations
// and operands every cycle; one cycle later each output is compared with the
// reference function. Every function code and every selector value is
// exercised. A watchdog ends the run if it hangs.
module tb_cfb;
  import cgp_pkg::*;
  import cgp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cfb_cfg_t                   cfg_i, cfg_f;
  logic [N_PRI-1:0][PIX_W-1:0] pri;
  logic [VRC_ROWS-1:0][PIX_W-1:0] prev;
  logic [PIX_W-1:0]           y_i, y_f;

  cfb #(.FIRST_COL(1'b0)) dut_inner (.clk, .cfg(cfg_i), .pri, .prev, .y(y_i));
  cfb #(.FIRST_COL(1'b1)) dut_first (.clk, .cfg(cfg_f), .pri, .prev, .y(y_f));

  int checks = 0, failures = 0;
  int fn_seen[16];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x[RNPRI], p[RROWS], exp_i, exp_f;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      cfg_i = cfb_cfg_t'(12'($urandom));
      cfg_f = cfb_cfg_t'(12'($urandom));
      if (n < 16) cfg_i.fn = cfb_fn_e'(n);
      for (int k = 0; k < N_PRI; k++) begin pri[k] = 8'($urandom); x[k] = int'(pri[k]); end
      for (int k = 0; k < VRC_ROWS; k++) begin prev[k] = 8'($urandom); p[k] = int'(prev[k]); end
      if (n % 7 == 0) prev[1] = pri[2];   // equal operands now and then
      p[1] = int'(prev[1]);
      exp_i = ref_fn(int'(cfg_i.fn), ref_sel(int'(cfg_i.sel_a), 1, x, p), ref_sel(int'(cfg_i.sel_b), 1, x, p));
      exp_f = ref_fn(int'(cfg_f.fn), ref_sel(int'(cfg_f.sel_a), 0, x, p), ref_sel(int'(cfg_f.sel_b), 0, x, p));
      fn_seen[int'(cfg_i.fn)]++;
      @(posedge clk); #1;
      checks += 2;
      if (int'(y_i) != exp_i) begin
        failures++;
        if (failures < 10) $display("inner fn=%0d a=%0d b=%0d got %0d exp %0d",
          cfg_i.fn, cfg_i.sel_a, cfg_i.sel_b, y_i, exp_i);
      end
      if (int'(y_f) != exp_f) begin
        failures++;
        if (failures < 10) $display("first fn=%0d got %0d exp %0d", cfg_f.fn, y_f, exp_f);
      end
    end
    for (int f = 0; f < 16; f++) begin
      checks++;
      if (fn_seen[f] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
