// tb_best_select - self-checking testbench of the best-fitness selector.
//
// Random fitness vectors, many with ties (small value range), for N = 4 and
// N = 8. out_valid must follow in_valid by one cycle, best_fit must be the
// minimum and best_idx the lowest index holding it.
module tb_best_select;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic [3:0][23:0] fit4;
  logic [7:0][23:0] fit8;
  logic ov4, ov8;
  logic [23:0] bf4, bf8;
  logic [1:0] bi4;
  logic [2:0] bi8;

  best_select #(.N(4), .FW(24)) dut4 (.clk, .rst_n, .in_valid, .fit(fit4),
                                      .out_valid(ov4), .best_fit(bf4), .best_idx(bi4));
  best_select #(.N(8), .FW(24)) dut8 (.clk, .rst_n, .in_valid, .fit(fit8),
                                      .out_valid(ov8), .best_fit(bf8), .best_idx(bi8));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int m4, i4, m8, i8, range;
      @(negedge clk);
      in_valid = ($urandom % 2) == 1;
      range = (n % 2) ? 4 : (1 << 24);
      m4 = 1 << 30; m8 = 1 << 30; i4 = 0; i8 = 0;
      for (int k = 0; k < 8; k++) begin
        fit8[k] = 24'($urandom % range);
        if (int'(fit8[k]) < m8) begin m8 = int'(fit8[k]); i8 = k; end
      end
      for (int k = 0; k < 4; k++) begin
        fit4[k] = 24'($urandom % range);
        if (int'(fit4[k]) < m4) begin m4 = int'(fit4[k]); i4 = k; end
      end
      @(posedge clk); #1;
      checks += 2;
      if (ov4 != in_valid || ov8 != in_valid) failures++;
      if (in_valid) begin
        checks += 2;
        if (int'(bf4) != m4 || int'(bi4) != i4) begin
          failures++;
          if (failures < 5) $display("N=4 got %0d/%0d exp %0d/%0d", bf4, bi4, m4, i4);
        end
        if (int'(bf8) != m8 || int'(bi8) != i8) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
