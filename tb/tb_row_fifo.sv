// tb_row_fifo - self-checking testbench of the row buffer.
//
// Pushes a counting-plus-random stream with random gaps in en and checks that
// after every shift dout equals the word pushed DEPTH shifts earlier.
module tb_row_fifo;
  localparam int DEPTH = 7;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din, dout;
  always #5 clk = ~clk;

  row_fifo #(.DEPTH(DEPTH), .DW(8)) dut (.clk, .rst_n, .en, .din, .dout);

  int checks = 0, failures = 0;
  byte unsigned hist[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      din = 8'($urandom);
      if (en) hist.push_back(din);
      @(posedge clk); #1;
      if (en && hist.size() > DEPTH) begin
        checks++;
        if (dout != hist[hist.size() - 1 - DEPTH]) begin
          failures++;
          if (failures < 5) $display("shift %0d: got %0h exp %0h", hist.size(), dout,
                                     hist[hist.size() - 1 - DEPTH]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
