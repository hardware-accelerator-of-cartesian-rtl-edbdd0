// best_select - picks the lowest of N fitness values and the index of its VRC.
//
// A binary tree of compare-and-select nodes (N must be a power of two; with
// N = 1 the single value passes through). On a
// tie the lower index wins, so index 0 (the first offspring, whose bitstream
// sits in section 1) is kept whenever it is among the best. The result is
// registered: in_valid in cycle t gives out_valid, best_fit and best_idx in
// cycle t+1. The tree follows the block diagram; the tie rule is own choice.
module best_select
  import cgp_pkg::*;
#(
  parameter int unsigned N  = NC,
  parameter int unsigned FW = FIT_W,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][FW-1:0]  fit,
  output logic                  out_valid,
  output logic [FW-1:0]         best_fit,
  output logic [IW-1:0]         best_idx
);

  initial assert (N >= 1 && (N & (N - 1)) == 0)
    else $error("best_select: N must be a power of two");

  // node n has children 2n and 2n+1; leaves are N..2N-1
  logic [FW-1:0] node_fit [1:2*N-1];
  logic [IW-1:0] node_idx [1:2*N-1];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      node_fit[N + i] = fit[i];
      node_idx[N + i] = IW'(i);
    end
    for (int n = N - 1; n >= 1; n--) begin
      if (node_fit[2*n+1] < node_fit[2*n]) begin
        node_fit[n] = node_fit[2*n+1];
        node_idx[n] = node_idx[2*n+1];
      end else begin
        node_fit[n] = node_fit[2*n];
        node_idx[n] = node_idx[2*n];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      best_fit  <= '0;
      best_idx  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        best_fit <= node_fit[1];
        best_idx <= node_idx[1];
      end
    end
  end

endmodule
