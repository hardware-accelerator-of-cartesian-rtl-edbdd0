// cgp_accel - accelerator of Cartesian genetic programming for image filter
// evolution, with NC fitness evaluations in parallel.
//
// The search algorithm (1+lambda evolution strategy with point mutation) runs
// on an embedded processor, outside this module, connected through the ppc_*
// port. It writes candidate bitstreams into the population memory (pop_mem),
// marks a bank valid and collects the best fitness and VRC index per bank from
// the control unit (control_unit). The fitness unit (fitness_unit) streams the
// training image from external SRAM1 through a 3x3 window generator into NC
// virtual reconfigurable circuits and compares their outputs with the required
// image in external SRAM2. While one bank is evaluated the processor prepares
// the other.
//
// Processor port (word addresses, 32-bit data, read data one cycle after a
// read): 0..NC*256-1 population memory sections, 2048+ control registers (see
// control_unit). ppc_re and ppc_we must not be high together.
// SRAM ports: synchronous, one-cycle read latency, 8-bit pixels stored row by
// row, W*H words each.
module cgp_accel
  import cgp_pkg::*;
#(
  parameter int unsigned N_VRC = NC,            // 1, 2, 4 or 8
  parameter int unsigned NBANK = NB,
  parameter int unsigned W     = IMG_W,
  parameter int unsigned H     = IMG_H,
  parameter int unsigned AW    = $clog2(W * H)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor bus
  input  logic                  ppc_we,
  input  logic                  ppc_re,
  input  logic [PPC_AW-1:0]     ppc_addr,
  input  logic [31:0]           ppc_wdata,
  output logic [31:0]           ppc_rdata,
  output logic                  irq,
  // external SRAM1 (training input image)
  output logic [AW-1:0]         sram1_addr,
  output logic                  sram1_re,
  input  logic [PIX_W-1:0]      sram1_rdata,
  // external SRAM2 (required output image)
  output logic [AW-1:0]         sram2_addr,
  output logic                  sram2_re,
  input  logic [PIX_W-1:0]      sram2_rdata
);

  localparam int unsigned BANK_W = (NBANK > 1) ? $clog2(NBANK) : 1;
  localparam int unsigned IDX_W  = (N_VRC > 1) ? $clog2(N_VRC) : 1;
  localparam int unsigned COL_W  = $clog2(VRC_COLS);

  logic                          run, eval_start;
  logic                          vrc_cfg_we;
  logic [COL_W-1:0]              vrc_cfg_col;
  logic [N_VRC-1:0][COL_CFG_W-1:0] cfg_data;
  logic                          res_valid;
  logic [FIT_W-1:0]              res_fit;
  logic [IDX_W-1:0]              res_idx;
  logic [N_VRC-1:0][FIT_W-1:0]   res_fits;
  logic                          mem_re;
  logic [BANK_W-1:0]             mem_bank;
  logic [COL_W-1:0]              mem_col;
  logic [NBANK-1:0]              bank_valid, valid_set, valid_clr;
  logic [31:0]                   mem_rdata, reg_rdata;
  logic                          mem_sel, reg_sel, reg_sel_q;

  assign mem_sel = (ppc_we || ppc_re) && (int'(ppc_addr) <  REG_BASE);
  assign reg_sel = (ppc_we || ppc_re) && (int'(ppc_addr) >= REG_BASE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      reg_sel_q <= 1'b0;
    else if (ppc_re) reg_sel_q <= reg_sel;
  end
  assign ppc_rdata = reg_sel_q ? reg_rdata : mem_rdata;

  fitness_unit #(.N_VRC(N_VRC), .W(W), .H(H), .AW(AW), .IDX_W(IDX_W)) u_fu (
    .clk, .rst_n,
    .run         (run),
    .sram1_addr, .sram1_re, .sram1_rdata,
    .sram2_addr, .sram2_re, .sram2_rdata,
    .eval_start  (eval_start),
    .cfg_we      (vrc_cfg_we),
    .cfg_col     (vrc_cfg_col),
    .cfg_data    (cfg_data),
    .res_valid   (res_valid),
    .res_fit     (res_fit),
    .res_idx     (res_idx),
    .res_fits    (res_fits)
  );

  pop_mem #(.NBANK(NBANK), .NSEC(N_VRC)) u_pm (
    .clk, .rst_n,
    .ppc_sel   (mem_sel),
    .ppc_we    (ppc_we),
    .ppc_addr  (ppc_addr),
    .ppc_wdata (ppc_wdata),
    .ppc_rdata (mem_rdata),
    .cfg_re    (mem_re),
    .cfg_bank  (mem_bank),
    .cfg_col   (mem_col),
    .cfg_data  (cfg_data),
    .valid_set (valid_set),
    .valid_clr (valid_clr),
    .valid     (bank_valid)
  );

  control_unit #(.NBANK(NBANK), .N_VRC(N_VRC)) u_cu (
    .clk, .rst_n,
    .reg_sel     (reg_sel),
    .reg_we      (ppc_we),
    .reg_addr    (ppc_addr[3:0]),
    .reg_wdata   (ppc_wdata),
    .reg_rdata   (reg_rdata),
    .run         (run),
    .eval_start  (eval_start),
    .vrc_cfg_we  (vrc_cfg_we),
    .vrc_cfg_col (vrc_cfg_col),
    .res_valid   (res_valid),
    .res_fit     (res_fit),
    .res_idx     (res_idx),
    .mem_re      (mem_re),
    .mem_bank    (mem_bank),
    .mem_col     (mem_col),
    .bank_valid  (bank_valid),
    .valid_set   (valid_set),
    .valid_clr   (valid_clr),
    .irq         (irq)
  );

endmodule
