// tb_input_gen - self-checking testbench of the sliding-window generator.
//
// A random 6 x 5 image is streamed cyclically with random idle cycles. After
// every shift the tags, the centre address and all nine window pixels are
// compared with the image; each pass must give (W-2)(H-2) valid windows, one
// first and one last. A clear in the middle restarts the stream.
module tb_input_gen;
  import cgp_pkg::*;

  localparam int W = 6, H = 5, AW = $clog2(W * H);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear = 0, pix_valid = 0;
  logic [7:0] pix;
  logic [N_PRI-1:0][PIX_W-1:0] x;
  logic win_valid, win_first, win_last;
  logic [AW-1:0] win_caddr;

  input_gen #(.W(W), .H(H)) dut (.clk, .rst_n, .clear, .pix_valid, .pix, .x,
                                 .win_valid, .win_first, .win_last, .win_caddr);

  int checks = 0, failures = 0;
  byte unsigned img [W*H];
  int nvalid, nfirst, nlast;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(input int shifts);
    int s = 0;
    while (s < shifts) begin
      @(negedge clk);
      pix_valid = ($urandom % 5) != 0;
      pix = img[s % (W*H)];
      @(posedge clk); #1;
      checks++;
      if (!pix_valid) begin
        if (win_valid || win_first || win_last) failures++;
      end else begin
        int q, r2, c2;
        bit ev, ef, el;
        q  = s - 3*W;
        r2 = (q >= 0) ? (q / W) % H : 0;
        c2 = (q >= 0) ? q % W : 0;
        ev = (q >= 0) && c2 >= 2 && r2 <= H - 3;
        ef = ev && r2 == 0 && c2 == 2;
        el = ev && r2 == H - 3 && c2 == W - 1;
        if (win_valid != ev || win_first != ef || win_last != el) begin
          failures++;
          if (failures < 6) $display("shift %0d: tags %b%b%b exp %b%b%b", s,
                                     win_valid, win_first, win_last, ev, ef, el);
        end
        if (ev) begin
          nvalid++; nfirst += int'(ef); nlast += int'(el);
          checks++;
          if (int'(win_caddr) != (r2 + 1) * W + c2 - 1) failures++;
          for (int dr = 0; dr < 3; dr++)
            for (int dc = 0; dc < 3; dc++) begin
              checks++;
              if (x[3*dr + dc] != img[(r2 + dr) * W + c2 - 2 + dc]) begin
                failures++;
                if (failures < 6) $display("shift %0d: x[%0d] wrong", s, 3*dr + dc);
              end
            end
        end
        s++;
      end
    end
    @(negedge clk); pix_valid = 0;
  endtask

  initial begin
    foreach (img[i]) img[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // 4 full passes plus the tail that completes the last one
    nvalid = 0; nfirst = 0; nlast = 0;
    run_stream(4 * W * H + W);
    checks++;
    if (nvalid != 4 * (W-2) * (H-2) || nfirst != 4 || nlast != 4) begin
      failures++;
      $display("counts %0d %0d %0d", nvalid, nfirst, nlast);
    end
    // restart from the top of the image
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    nvalid = 0; nfirst = 0; nlast = 0;
    run_stream(2 * W * H + W);
    checks++;
    if (nvalid != 2 * (W-2) * (H-2) || nfirst != 2 || nlast != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
