// control_unit - master of the accelerator and register interface to the
// processor that runs the search algorithm.
//
// Evaluation flow. While run is set the fitness unit streams the training
// image continuously and pulses eval_start once per image pass, at the moment
// a new set of candidates can enter the VRCs. On eval_start the control unit
// picks the next valid bank in round-robin order (starting after the bank
// evaluated last) and reads its COLS column words from the population memory,
// one per cycle, writing each into the matching VRC column one cycle later.
// If no bank is valid the pass is a stall: nothing is loaded and the result
// of that pass is ignored. When the fitness unit reports the best fitness and
// VRC index of a loaded bank, they are stored in that bank's result register,
// the bank's valid bit is cleared (the processor may now rewrite it) and irq
// pulses for one cycle. One evaluation is in flight at a time; its result
// arrives early in the following pass, before the next eval_start, provided
// the image is wider than half the VRC depth.
//
// Registers (word offsets in the control block, 32 bits, read latency 1):
//   0 CTRL    rw  bit 0 run
//   1 VALID   r: valid bit per bank; w: 1 sets the valid bit of that bank and
//             clears the bank's result flag
//   2 EVALS   r   evaluations reported since reset
//   3 STALLS  r   image passes that found no valid bank
//   4+b RESULT r  bank b: [23:0] best fitness, [27:24] VRC index (0-based),
//                 [31] result present since the bank was last made valid
// The register map, round-robin order and stall handling are this design's
// choices; the published design only states that the control unit is the
// master, that valid bits guard the banks and that the best fitness and its
// VRC index go to the processor after each evaluation.
module control_unit
  import cgp_pkg::*;
#(
  parameter int unsigned NBANK  = NB,
  parameter int unsigned N_VRC  = NC,
  parameter int unsigned COLS   = VRC_COLS,
  parameter int unsigned FW     = FIT_W,
  parameter int unsigned BANK_W = (NBANK > 1) ? $clog2(NBANK) : 1,
  parameter int unsigned IDX_W  = (N_VRC > 1) ? $clog2(N_VRC) : 1,
  parameter int unsigned COL_W  = $clog2(COLS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // register port
  input  logic                 reg_sel,
  input  logic                 reg_we,
  input  logic [3:0]           reg_addr,
  input  logic [31:0]          reg_wdata,
  output logic [31:0]          reg_rdata,
  // fitness unit
  output logic                 run,
  input  logic                 eval_start,
  output logic                 vrc_cfg_we,
  output logic [COL_W-1:0]     vrc_cfg_col,
  input  logic                 res_valid,
  input  logic [FW-1:0]        res_fit,
  input  logic [IDX_W-1:0]     res_idx,
  // population memory
  output logic                 mem_re,
  output logic [BANK_W-1:0]    mem_bank,
  output logic [COL_W-1:0]     mem_col,
  input  logic [NBANK-1:0]     bank_valid,
  output logic [NBANK-1:0]     valid_set,
  output logic [NBANK-1:0]     valid_clr,
  output logic                 irq
);

  initial assert (FW <= 24 && IDX_W <= 4 && NBANK <= 12)
    else $error("control_unit: sizes do not fit the register map");

  typedef struct packed {
    logic              present;
    logic [IDX_W-1:0]  idx;
    logic [FW-1:0]     fit;
  } result_t;

  logic [BANK_W-1:0] last_bank, pick;
  logic              found;
  logic              loading;
  logic [COL_W-1:0]  col_cnt;
  logic [BANK_W-1:0] load_bank;
  logic              cur_active;
  logic [BANK_W-1:0] cur_bank;
  logic [31:0]       evals, stalls;
  result_t           result [NBANK];

  // ------------------------------------------------ round-robin bank choice
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= NBANK; k++) begin
      int unsigned b;
      b = (int'(last_bank) + k) % NBANK;
      if (!found && bank_valid[b]) begin
        found = 1'b1;
        pick  = BANK_W'(b);
      end
    end
  end

  // --------------------------------------------- configuration streaming
  assign mem_re   = (eval_start && found) || loading;
  assign mem_bank = loading ? load_bank : pick;
  assign mem_col  = loading ? col_cnt : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loading     <= 1'b0;
      col_cnt     <= '0;
      load_bank   <= '0;
      last_bank   <= BANK_W'(NBANK - 1);
      cur_active  <= 1'b0;
      cur_bank    <= '0;
      vrc_cfg_we  <= 1'b0;
      vrc_cfg_col <= '0;
      evals       <= '0;
      stalls      <= '0;
      irq         <= 1'b0;
      for (int b = 0; b < NBANK; b++) result[b] <= '0;
    end else begin
      vrc_cfg_we  <= mem_re;
      vrc_cfg_col <= mem_col;
      irq         <= 1'b0;

      if (loading) begin
        col_cnt <= col_cnt + 1'b1;
        if (col_cnt == COL_W'(COLS - 1)) loading <= 1'b0;
      end

      if (eval_start) begin
        if (found) begin
          loading    <= 1'b1;
          col_cnt    <= COL_W'(1);
          load_bank  <= pick;
          last_bank  <= pick;
          cur_active <= 1'b1;
          cur_bank   <= pick;
        end else begin
          stalls     <= stalls + 1'b1;
        end
      end else if (res_valid && cur_active) begin
        result[cur_bank] <= '{present: 1'b1, idx: res_idx, fit: res_fit};
        cur_active       <= 1'b0;
        evals            <= evals + 1'b1;
        irq              <= 1'b1;
      end

      if (!run) begin
        loading    <= 1'b0;
        cur_active <= 1'b0;
      end

      if (reg_sel && reg_we && reg_addr == 4'(REG_VALID))
        for (int b = 0; b < NBANK; b++)
          if (reg_wdata[b]) result[b].present <= 1'b0;
    end
  end

  always_comb begin
    valid_clr = '0;
    if (res_valid && cur_active && !eval_start) valid_clr[cur_bank] = 1'b1;
    valid_set = (reg_sel && reg_we && reg_addr == 4'(REG_VALID))
              ? reg_wdata[NBANK-1:0] : '0;
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      reg_rdata <= '0;
    end else if (reg_sel) begin
      if (reg_we) begin
        if (reg_addr == 4'(REG_CTRL)) run <= reg_wdata[0];
      end else begin
        reg_rdata <= '0;
        if (reg_addr == 4'(REG_CTRL))        reg_rdata <= 32'(run);
        else if (reg_addr == 4'(REG_VALID))  reg_rdata <= 32'(bank_valid);
        else if (reg_addr == 4'(REG_EVALS))  reg_rdata <= evals;
        else if (reg_addr == 4'(REG_STALLS)) reg_rdata <= stalls;
        else if (int'(reg_addr) >= REG_RESULT && int'(reg_addr) < REG_RESULT + NBANK) begin
          reg_rdata[31]    <= result[int'(reg_addr) - REG_RESULT].present;
          reg_rdata[27:24] <= 4'(result[int'(reg_addr) - REG_RESULT].idx);
          reg_rdata[23:0]  <= 24'(result[int'(reg_addr) - REG_RESULT].fit);
        end
      end
    end
  end

  // one evaluation in flight: its result must come before the next start
  assert property (@(posedge clk) disable iff (!rst_n) eval_start |-> !cur_active)
    else $error("control_unit: new evaluation started before the previous result");

endmodule
