// pop_mem - population memory of the genetic unit.
//
// NBANK banks, each holding the configurations of NSEC VRCs (one section per
// VRC) column by column. A memory word is NSEC*CW = 256 bits wide and holds
// one column of every section, so the read port delivers one column of all
// NSEC bitstreams per cycle and all VRCs are reconfigured in parallel.
//
// Difference storage: section 1 (index 0) holds a complete bitstream (the
// first offspring). Sections 2..NSEC hold only the bits in which offspring i
// differs from the first one; the read port XORs them with section 1, so
// cfg_data[0] = S1 and cfg_data[i] = S1 ^ Si. Producing NSEC offspring by point
// mutation then costs the processor only the writes of the mutated words.
//
// Processor port (32-bit words, word addresses): section s occupies addresses
// s*SEC_STRIDE .. s*SEC_STRIDE+SEC_STRIDE-1; inside a section the word
// ((bank*COLS + col)*(CW/32) + half) is bits [32*half+31:32*half] of column col
// of that bank. Reads return the stored (difference) words with one cycle of
// latency. Writes outside the populated range are ignored.
//
// Validity: one bit per bank; valid_set (processor, via the control unit) sets
// it once a bank is ready, valid_clr (control unit) clears it once the bank has
// been evaluated. Only valid banks may be read by the configuration port.
//
// Config read timing: cfg_re/cfg_bank/cfg_col in cycle t, cfg_data in t+1.
// The section/bank organisation, 256-bit width, 32-bit port and XOR read path
// follow the published figure; the address map is this design's choice.
module pop_mem
  import cgp_pkg::*;
#(
  parameter int unsigned NBANK = NB,
  parameter int unsigned NSEC  = NC,
  parameter int unsigned COLS  = VRC_COLS,
  parameter int unsigned CW    = COL_CFG_W,
  parameter int unsigned BANK_W = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // processor port
  input  logic                           ppc_sel,
  input  logic                           ppc_we,
  input  logic [PPC_AW-1:0]              ppc_addr,
  input  logic [31:0]                    ppc_wdata,
  output logic [31:0]                    ppc_rdata,
  // configuration read port
  input  logic                           cfg_re,
  input  logic [BANK_W-1:0]              cfg_bank,
  input  logic [$clog2(COLS)-1:0]        cfg_col,
  output logic [NSEC-1:0][CW-1:0]        cfg_data,
  // bank validity
  input  logic [NBANK-1:0]               valid_set,
  input  logic [NBANK-1:0]               valid_clr,
  output logic [NBANK-1:0]               valid
);

  localparam int unsigned HALVES = CW / 32;
  localparam int unsigned ROWS_M = NBANK * COLS;          // memory words
  localparam int unsigned RAW    = $clog2(ROWS_M);

  initial assert (CW % 32 == 0 && ROWS_M * HALVES <= SEC_STRIDE && NSEC * SEC_STRIDE <= REG_BASE)
    else $error("pop_mem: configuration does not fit the address map");

  logic [NSEC*CW-1:0] mem [ROWS_M];
  logic [NSEC*CW-1:0] rd_word;

  // processor address decode
  int unsigned p_sec, p_off, p_row, p_half;
  logic        p_hit;

  always_comb begin
    p_sec  = int'(ppc_addr) / SEC_STRIDE;
    p_off  = int'(ppc_addr) % SEC_STRIDE;
    p_row  = p_off / HALVES;
    p_half = p_off % HALVES;
    p_hit  = ppc_sel && (p_sec < NSEC) && (p_row < ROWS_M);
  end

  always_ff @(posedge clk) begin
    if (p_hit && ppc_we)
      mem[p_row[RAW-1:0]][(p_sec*CW + p_half*32) +: 32] <= ppc_wdata;
    if (p_hit && !ppc_we)
      ppc_rdata <= mem[p_row[RAW-1:0]][(p_sec*CW + p_half*32) +: 32];
    if (cfg_re)
      rd_word <= mem[RAW'(cfg_bank) * RAW'(COLS) + RAW'(cfg_col)];
  end

  // XOR reconstruction of sections 2..NSEC
  always_comb begin
    cfg_data[0] = rd_word[CW-1:0];
    for (int s = 1; s < NSEC; s++)
      cfg_data[s] = rd_word[CW-1:0] ^ rd_word[s*CW +: CW];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else        valid <= (valid & ~valid_clr) | valid_set;
  end

  // only valid configurations may be evaluated
  assert property (@(posedge clk) disable iff (!rst_n) cfg_re |-> valid[cfg_bank])
    else $error("pop_mem: configuration read from invalid bank %0d", cfg_bank);

endmodule
