// fitness_acc - fitness computation for one VRC (subtractor, adder, ACC).
//
// For every valid training vector the absolute difference |y_i - y| between
// the VRC output and the required output is added to the accumulator. The
// vector tagged first restarts the sum; when the vector tagged last has been
// added the total is latched into fit and done pulses for one cycle.
// Lower is better. FIT_W must hold 255 * (number of vectors); the default 24
// bits covers a 128 x 128 image (15 876 vectors, at most 4 048 380).
// Timing: inputs sampled at the edge; fit/done follow one cycle after the last
// vector.
module fitness_acc
  import cgp_pkg::*;
#(
  parameter int unsigned FW = FIT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic             first,
  input  logic             last,
  input  logic [PIX_W-1:0] yi,
  input  logic [PIX_W-1:0] y,
  output logic [FW-1:0]    fit,
  output logic             done
);

  logic [FW-1:0]    acc, sum;
  logic [PIX_W-1:0] diff;

  always_comb begin
    diff = (yi > y) ? yi - y : y - yi;
    sum  = (first ? '0 : acc) + FW'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      fit  <= '0;
      done <= 1'b0;
    end else begin
      done <= valid && last;
      if (valid) begin
        acc <= sum;
        if (last) fit <= sum;
      end
    end
  end

endmodule
