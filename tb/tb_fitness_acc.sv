// tb_fitness_acc - self-checking testbench of the fitness accumulator.
//
// Several evaluations of random length with random gaps (valid low): the
// latched fitness must equal the sum of |yi - y| over the tagged vectors and
// done must pulse exactly once, one cycle after the last vector.
module tb_fitness_acc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 0, first = 0, last = 0;
  logic [7:0] yi, y;
  logic [23:0] fit;
  logic done;
  always #5 clk = ~clk;

  fitness_acc #(.FW(24)) dut (.clk, .rst_n, .valid, .first, .last, .yi, .y, .fit, .done);

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
    for (int e = 0; e < 20; e++) begin
      int len, sum;
      len = 1 + $urandom % 200;
      sum = 0;
      for (int v = 0; v < len; v++) begin
        // idle cycles between vectors
        while ($urandom % 3 == 0) begin
          @(negedge clk); valid = 0; first = 0; last = 0;
          yi = 8'($urandom); y = 8'($urandom);
          @(posedge clk); #1;
          checks++; if (done) failures++;
        end
        @(negedge clk);
        valid = 1; first = (v == 0); last = (v == len - 1);
        yi = 8'($urandom); y = (e % 5 == 0) ? 8'd255 : 8'($urandom);
        if (e % 5 == 0) yi = 8'd0;
        sum += (yi > y) ? int'(yi) - int'(y) : int'(y) - int'(yi);
        @(posedge clk); #1;
        checks++;
        if (done != (v == len - 1)) failures++;
      end
      checks++;
      if (int'(fit) != sum) begin
        failures++;
        $display("eval %0d: fit %0d exp %0d", e, fit, sum);
      end
      @(negedge clk); valid = 0; first = 0; last = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
