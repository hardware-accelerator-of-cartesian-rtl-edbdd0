// tb_cgp_accel_nc - the accelerator with 1, 2, 4 and 8 VRC instances.
//
// Four accelerator instances, one per fitness-unit count, each driven by its
// own processor model (tb_accel_agent) on a 16 x 16 image pair. Every
// evaluation's best fitness and VRC index is checked against the reference.
module tb_cgp_accel_nc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [4];
  int   chk  [4];
  int   fail [4];

  tb_accel_agent #(.NV(1)) a1 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  tb_accel_agent #(.NV(2)) a2 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  tb_accel_agent #(.NV(4)) a4 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  tb_accel_agent #(.NV(8)) a8 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    for (int i = 0; i < 4; i++) $display("agent %0d done=%b", i, done[i]);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
