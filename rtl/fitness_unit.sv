// fitness_unit - evaluates N_VRC candidate filters in parallel on one image.
//
// Structure (as in the published block diagram): the input generation part
// (input_gen) turns the training image read from SRAM1 into 3x3 windows; the
// same window goes to all N_VRC VRC instances; the fitness computation part has
// one fitness_acc per VRC, comparing the VRC output with the required pixel
// read from SRAM2, and a best_select tree that returns the best fitness and the
// index of its VRC.
//
// The unit reads SRAM1 sequentially, one pixel per cycle, and wraps around at
// the end of the image, so it streams the image over and over while run is
// high; each pass of the image is one evaluation of the N_VRC candidates
// currently configured (W*H cycles, (W-2)(H-2) counted vectors). The required
// output of a window is read from SRAM2 at the address of the window centre so
// that it arrives together with the VRC output, COLS cycles after the window.
// Both SRAMs are synchronous with a read latency of one cycle.
//
// Reconfiguration: eval_start pulses in the cycle in which the address
// P_FIRST = 3W+2 of the pass is sent to SRAM1; this is the pixel that
// completes the first window of an evaluation. If column c of the new
// configuration is written (cfg_we/cfg_col/cfg_data) in cycle
// eval_start+1+c, it takes effect exactly when the first window reaches that
// column, while the last windows of the previous evaluation have already
// passed. The control unit does this from eval_start.
//
// res_valid pulses once per evaluation with res_fit/res_idx (best) and
// res_fits (all N_VRC values); it comes COLS+2 cycles after the last window,
// early in the following pass.
module fitness_unit
  import cgp_pkg::*;
#(
  parameter int unsigned N_VRC = NC,
  parameter int unsigned W     = IMG_W,
  parameter int unsigned H     = IMG_H,
  parameter int unsigned COLS  = VRC_COLS,
  parameter int unsigned ROWS  = VRC_ROWS,
  parameter int unsigned FW    = FIT_W,
  parameter int unsigned AW    = $clog2(W * H),
  parameter int unsigned IDX_W = (N_VRC > 1) ? $clog2(N_VRC) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              run,
  // SRAM1: input image
  output logic [AW-1:0]                     sram1_addr,
  output logic                              sram1_re,
  input  logic [PIX_W-1:0]                  sram1_rdata,
  // SRAM2: required output image
  output logic [AW-1:0]                     sram2_addr,
  output logic                              sram2_re,
  input  logic [PIX_W-1:0]                  sram2_rdata,
  // configuration of the VRCs
  output logic                              eval_start,
  input  logic                              cfg_we,
  input  logic [$clog2(COLS)-1:0]           cfg_col,
  input  logic [N_VRC-1:0][COL_CFG_W-1:0]   cfg_data,
  // results
  output logic                              res_valid,
  output logic [FW-1:0]                     res_fit,
  output logic [IDX_W-1:0]                  res_idx,
  output logic [N_VRC-1:0][FW-1:0]          res_fits
);

  localparam int unsigned NPIX    = W * H;
  localparam int unsigned P_FIRST = 3 * W + 2;

  initial assert (NPIX > P_FIRST && COLS >= 2)
    else $error("fitness_unit: image too small");

  // ---------------------------------------------------------------- SRAM1 read
  logic [AW-1:0] pos;
  logic          pix_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      pix_valid <= 1'b0;
    end else begin
      pix_valid <= run;
      if (!run)                         pos <= '0;
      else if (pos == AW'(NPIX - 1))    pos <= '0;
      else                              pos <= pos + 1'b1;
    end
  end

  assign sram1_addr = pos;
  assign sram1_re   = run;
  assign eval_start = run && (pos == AW'(P_FIRST));

  // ---------------------------------------------------------- input generation
  logic [N_PRI-1:0][PIX_W-1:0] x;
  logic                        w_valid, w_first, w_last;
  logic [AW-1:0]               w_caddr;

  input_gen #(.W(W), .H(H), .AW(AW)) u_in (
    .clk, .rst_n,
    .clear     (!pix_valid),
    .pix_valid (pix_valid),
    .pix       (sram1_rdata),
    .x         (x),
    .win_valid (w_valid),
    .win_first (w_first),
    .win_last  (w_last),
    .win_caddr (w_caddr)
  );

  // --------------------------------------------------------------------- VRCs
  logic [N_VRC-1:0][PIX_W-1:0] yv;

  for (genvar i = 0; i < N_VRC; i++) begin : g_vrc
    vrc #(.COLS(COLS), .ROWS(ROWS), .NPRI(N_PRI), .CFG_W(COL_CFG_W)) u_vrc (
      .clk, .rst_n,
      .cfg_we   (cfg_we),
      .cfg_col  (cfg_col),
      .cfg_data (cfg_data[i]),
      .x        (x),
      .y        (yv[i])
    );
  end

  // ---------------------------------------- tags and SRAM2 address alignment
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } tag_t;

  tag_t          tag_d   [1:COLS];
  logic [AW-1:0] caddr_d [1:COLS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= COLS; k++) tag_d[k] <= '0;
    end else begin
      tag_d[1] <= '{valid: w_valid, first: w_first, last: w_last};
      for (int k = 2; k <= COLS; k++) tag_d[k] <= tag_d[k-1];
    end
  end

  always_ff @(posedge clk) begin
    caddr_d[1] <= w_caddr;
    for (int k = 2; k <= COLS - 1; k++) caddr_d[k] <= caddr_d[k-1];
  end

  assign sram2_addr = caddr_d[COLS-1];
  assign sram2_re   = tag_d[COLS-1].valid;

  // ---------------------------------------------- fitness computation part
  logic [N_VRC-1:0] acc_done;

  for (genvar i = 0; i < N_VRC; i++) begin : g_acc
    fitness_acc #(.FW(FW)) u_acc (
      .clk, .rst_n,
      .valid (tag_d[COLS].valid),
      .first (tag_d[COLS].first),
      .last  (tag_d[COLS].last),
      .yi    (yv[i]),
      .y     (sram2_rdata),
      .fit   (res_fits[i]),
      .done  (acc_done[i])
    );
  end

  best_select #(.N(N_VRC), .FW(FW), .IW(IDX_W)) u_best (
    .clk, .rst_n,
    .in_valid  (acc_done[0]),
    .fit       (res_fits),
    .out_valid (res_valid),
    .best_fit  (res_fit),
    .best_idx  (res_idx)
  );

endmodule
