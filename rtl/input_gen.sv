// input_gen - input generation part of the fitness unit: 3x3 sliding window.
//
// Pixels of the training image arrive one per cycle, row by row (pix_valid).
// Three identical row buffers (row_fifo) are chained, each followed by a
// 3-pixel shift register (REG, 24 bits). After a shift the three registers hold
// three vertically adjacent 3-pixel segments of the image: REG2 the top row,
// REG0 the bottom row. Together they form the 72-bit window x sent to all VRCs.
//
// Window layout: x[3*r + c] is the pixel in window row r (0 = top) and
// column c (0 = left); x[4] is the centre.
//
// A position counter follows the pixel entering REG2. A window is valid when it
// lies wholly inside the image, so an M x N image gives (M-2)(N-2) valid
// windows. win_first marks the top-left window and win_last the bottom-right
// one; win_caddr is the row-major address of the window centre, used to fetch
// the required output. The stream is cyclic: pass k+1 of the image pushes out
// the last windows of pass k. clear restarts the counters (the row buffers
// refill). Everything is registered; tags and window change together.
// The row-buffer chain follows the published block diagram; the counter and
// tags are this implementation's own.
module input_gen
  import cgp_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned AW = $clog2(W * H)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       pix_valid,
  input  logic [PIX_W-1:0]           pix,
  output logic [N_PRI-1:0][PIX_W-1:0] x,
  output logic                       win_valid,
  output logic                       win_first,
  output logic                       win_last,
  output logic [AW-1:0]              win_caddr
);

  localparam int unsigned PRIME = 3 * W;          // shifts until REG2 is real
  localparam int unsigned PCW   = $clog2(PRIME + 1);
  localparam int unsigned RW    = $clog2(H);
  localparam int unsigned CW    = $clog2(W);

  initial assert (H >= 4 && W >= 3) else $error("input_gen: image too small");

  logic [PIX_W-1:0]        fifo_in  [3];
  logic [PIX_W-1:0]        fifo_out [3];
  logic [2:0][PIX_W-1:0]   rg       [3];          // rg[j][2] newest pixel
  logic [PCW-1:0]          prime_cnt;
  logic                    primed;
  logic [RW-1:0]           r2;
  logic [CW-1:0]           c2;

  assign fifo_in[0] = pix;
  assign fifo_in[1] = fifo_out[0];
  assign fifo_in[2] = fifo_out[1];

  for (genvar j = 0; j < 3; j++) begin : g_row
    row_fifo #(.DEPTH(W - 1), .DW(PIX_W)) u_fifo (
      .clk, .rst_n, .en(pix_valid), .din(fifo_in[j]), .dout(fifo_out[j])
    );
    always_ff @(posedge clk) begin
      if (pix_valid) rg[j] <= {fifo_out[j], rg[j][2:1]};
    end
  end

  // window: top row from REG2, bottom row from REG0; oldest pixel on the left
  always_comb begin
    for (int c = 0; c < 3; c++) begin
      x[0*3 + c] = rg[2][c];
      x[1*3 + c] = rg[1][c];
      x[2*3 + c] = rg[0][c];
    end
  end

  assign primed = (prime_cnt == PCW'(PRIME));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prime_cnt <= '0;
      r2 <= '0; c2 <= '0;
      win_valid <= 1'b0; win_first <= 1'b0; win_last <= 1'b0;
      win_caddr <= '0;
    end else if (clear) begin
      prime_cnt <= '0;
      r2 <= '0; c2 <= '0;
      win_valid <= 1'b0; win_first <= 1'b0; win_last <= 1'b0;
    end else begin
      win_valid <= 1'b0; win_first <= 1'b0; win_last <= 1'b0;
      if (pix_valid) begin
        if (!primed) begin
          prime_cnt <= prime_cnt + 1'b1;
        end else begin
          // (r2, c2): position of the pixel entering REG2 in this shift
          win_valid <= (c2 >= CW'(2)) && (r2 <= RW'(H - 3));
          win_first <= (c2 == CW'(2)) && (r2 == '0);
          win_last  <= (c2 == CW'(W - 1)) && (r2 == RW'(H - 3));
          win_caddr <= AW'((AW'(r2) + AW'(1)) * AW'(W) + AW'(c2) - AW'(1));
          if (c2 == CW'(W - 1)) begin
            c2 <= '0;
            r2 <= (r2 == RW'(H - 1)) ? '0 : r2 + 1'b1;
          end else begin
            c2 <= c2 + 1'b1;
          end
        end
      end
    end
  end

endmodule
