// vrc - virtual reconfigurable circuit: a COLS x ROWS grid of CFBs.
//
// The grid is a pipeline: every CFB registers its output, so column c works on
// the window that entered the VRC c cycles earlier. The primary inputs travel
// along a delay line (one register per column) so that column c sees the same
// window as its operands from column c-1. The circuit output is the output of
// row 0 of the last column.
//
// Each column has its own configuration register (conf_reg). A column is
// written in one cycle through cfg_we/cfg_col/cfg_data; writing column c one
// cycle before the first window of a new candidate reaches column c lets the
// configuration follow the data wave, so consecutive candidates need no idle
// cycles. Within a column word, CFB r uses bits [12r+11:12r]; bits above
// 12*ROWS are ignored.
//
// Latency: x presented in cycle t gives y in cycle t+COLS.
// Reset clears the configuration registers (all CFBs: add, inputs 0 and 0).
module vrc
  import cgp_pkg::*;
#(
  parameter int unsigned COLS  = VRC_COLS,
  parameter int unsigned ROWS  = VRC_ROWS,
  parameter int unsigned NPRI  = N_PRI,
  parameter int unsigned CFG_W = COL_CFG_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_we,
  input  logic [$clog2(COLS)-1:0]     cfg_col,
  input  logic [CFG_W-1:0]            cfg_data,
  input  logic [NPRI-1:0][PIX_W-1:0]  x,
  output logic [PIX_W-1:0]            y
);

  initial assert (ROWS * CFB_CFG_W <= CFG_W)
    else $error("vrc: column word too narrow for %0d rows", ROWS);

  logic [ROWS-1:0][CFB_CFG_W-1:0]   conf_reg [COLS];
  logic [NPRI-1:0][PIX_W-1:0]       xd       [COLS];  // input delayed by c
  logic [ROWS-1:0][PIX_W-1:0]       col_out  [COLS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < COLS; c++) conf_reg[c] <= '0;
    end else if (cfg_we) begin
      conf_reg[cfg_col] <= cfg_data[ROWS*CFB_CFG_W-1:0];
    end
  end

  assign xd[0] = x;
  for (genvar c = 1; c < COLS; c++) begin : g_dly
    always_ff @(posedge clk) xd[c] <= xd[c-1];
  end

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [ROWS-1:0][PIX_W-1:0] prev;
    if (c == 0) begin : g_first
      assign prev = '0;              // column 0 selects primary inputs only
    end else begin : g_next
      assign prev = col_out[c-1];
    end
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      cfb #(
        .NPRI      (NPRI),
        .NPREV     (ROWS),
        .FIRST_COL (c == 0)
      ) u_cfb (
        .clk  (clk),
        .cfg  (cfb_cfg_t'(conf_reg[c][r])),
        .pri  (xd[c]),
        .prev (prev),
        .y    (col_out[c][r])
      );
    end
  end

  assign y = col_out[COLS-1][0];

endmodule
