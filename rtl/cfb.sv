// cfb - configurable functional block, the node of the VRC grid.
//
// Two 4-bit selectors (MUXA, MUXB) each pick one operand from the primary
// inputs of the VRC or from the outputs of the previous column; the block then
// computes one of 16 functions of the two 8-bit operands (six arithmetic:
// add, subtract, shift, minimum, maximum, absolute difference; ten logic ones)
// and registers the 8-bit result, so every CFB is one pipeline stage.
//
// Selector encoding (own choice; only the 4-bit width is published):
// sel < N_PRI picks primary input sel; a larger value picks previous-column
// row (sel - N_PRI) mod N_PREV. In the first column there is no previous
// column, so a larger value picks primary input (sel - N_PRI) mod N_PRI.
// Add and subtract wrap modulo 256; the shift is a logical right shift by one.
//
// Timing: operands and configuration are sampled at the rising edge; y is
// valid one cycle after its operands. No reset: y only carries data.
module cfb
  import cgp_pkg::*;
#(
  parameter int unsigned NPRI      = N_PRI,
  parameter int unsigned NPREV     = VRC_ROWS,
  parameter bit          FIRST_COL = 1'b0
) (
  input  logic                        clk,
  input  cfb_cfg_t                    cfg,
  input  logic [NPRI-1:0][PIX_W-1:0]  pri,   // primary inputs (already delayed)
  input  logic [NPREV-1:0][PIX_W-1:0] prev,  // previous-column outputs
  output logic [PIX_W-1:0]            y
);

  logic [PIX_W-1:0] a, b, f;
  logic [PIX_W-1:0] cand [1 << SEL_W];   // operand for each selector code

  always_comb begin
    // the code-to-source map is fixed at elaboration; only the final
    // 16-way multiplexers depend on the configuration
    for (int k = 0; k < (1 << SEL_W); k++) begin
      if (k < NPRI)        cand[k] = pri[k];
      else if (FIRST_COL)  cand[k] = pri[(k - NPRI) % NPRI];
      else                 cand[k] = prev[(k - NPRI) % NPREV];
    end
    a = cand[cfg.sel_a];
    b = cand[cfg.sel_b];
    unique case (cfg.fn)
      FN_ADD:   f = a + b;
      FN_SUB:   f = a - b;
      FN_SHR:   f = a >> 1;
      FN_MIN:   f = (a < b) ? a : b;
      FN_MAX:   f = (a > b) ? a : b;
      FN_ABSD:  f = (a > b) ? a - b : b - a;
      FN_A:     f = a;
      FN_NOTA:  f = ~a;
      FN_AND:   f = a & b;
      FN_OR:    f = a | b;
      FN_XOR:   f = a ^ b;
      FN_NAND:  f = ~(a & b);
      FN_NOR:   f = ~(a | b);
      FN_XNOR:  f = ~(a ^ b);
      FN_ANDNB: f = a & ~b;
      FN_ORNB:  f = a | ~b;
      default:  f = a;
    endcase
  end

  always_ff @(posedge clk) y <= f;

endmodule
