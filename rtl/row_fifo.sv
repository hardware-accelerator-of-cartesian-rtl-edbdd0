// row_fifo - fixed-length FIFO used as an image row buffer.
//
// A circular buffer of DEPTH words with a registered, read-before-write output.
// Every cycle with en = 1 the word at the pointer is copied to dout and replaced
// by din, and the pointer advances. After the n-th shift dout therefore holds
// the word written DEPTH shifts earlier. A consumer that registers dout on its
// own next shift sees the stream delayed by DEPTH+1 shifts, which is one image
// row when DEPTH = IMG_W-1. The storage maps onto a block RAM; it needs no
// reset because its first DEPTH outputs are never used.
module row_fifo
  import cgp_pkg::*;
#(
  parameter int unsigned DEPTH = IMG_W - 1,
  parameter int unsigned DW    = PIX_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [PW-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            ptr <= '0;
    else if (en && ptr == PW'(DEPTH - 1))  ptr <= '0;
    else if (en)                           ptr <= ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end

endmodule
