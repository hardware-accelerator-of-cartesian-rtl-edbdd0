// cgp_pkg - constants and types shared by the CGP accelerator.
//
// The accelerator evaluates Nc candidate image filters in parallel. Each
// candidate is a virtual reconfigurable circuit (VRC): a grid of 8 columns by
// 4 rows of configurable functional blocks (CFBs) working on 8-bit operands.
// A CFB is configured by 12 bits (two 4-bit input selectors and a 4-bit
// function code), one VRC column by 48 bits held in a 64-bit column word, and
// the population memory is 256 bits wide (Nc = 4 sections of 64 bits). These
// numbers, the 3x3 filter window, the 16-entry function set and the 128x128
// training image are the published design point. The bit order inside a CFB
// word, the order of the function codes, the bank count and the register map
// of the processor port are this implementation's choices.
package cgp_pkg;

  // Data path
  localparam int unsigned PIX_W     = 8;              // w: operand / pixel width
  localparam int unsigned WIN_K     = 3;              // k: filter window size
  localparam int unsigned N_PRI     = WIN_K * WIN_K;  // primary VRC inputs (k^2)

  // VRC geometry and configuration format
  localparam int unsigned VRC_COLS  = 8;              // u
  localparam int unsigned VRC_ROWS  = 4;              // v
  localparam int unsigned SEL_W     = 4;              // bits per input selector
  localparam int unsigned FN_W      = 4;              // bits per function code
  localparam int unsigned CFB_CFG_W = 2 * SEL_W + FN_W;  // 12 bits per CFB
  localparam int unsigned COL_CFG_W = 64;             // column word in memory

  // System
  localparam int unsigned NC        = 4;              // VRC instances / sections
  localparam int unsigned NB        = 2;              // population memory banks
  localparam int unsigned IMG_W     = 128;            // training image width  (N)
  localparam int unsigned IMG_H     = 128;            // training image height (M)
  localparam int unsigned FIT_W     = 24;             // fitness accumulator width

  // Processor port: 32-bit words, word addresses
  localparam int unsigned PPC_AW     = 12;
  localparam int unsigned SEC_STRIDE = 256;           // section s starts at s*256
  localparam int unsigned REG_BASE   = 2048;          // control registers (room for 8 sections)
  // control register offsets (address - REG_BASE)
  localparam int unsigned REG_CTRL   = 0;             // bit0: run
  localparam int unsigned REG_VALID  = 1;             // r: bank valid bits, w: set bits
  localparam int unsigned REG_EVALS  = 2;             // evaluations reported
  localparam int unsigned REG_STALLS = 3;             // image passes with no valid bank
  localparam int unsigned REG_RESULT = 4;             // 4+b: result of bank b

  // The 16 CFB functions: six arithmetic ones and ten logic ones.
  typedef enum logic [FN_W-1:0] {
    FN_ADD   = 4'd0,   // a + b (mod 256)
    FN_SUB   = 4'd1,   // a - b (mod 256)
    FN_SHR   = 4'd2,   // a >> 1
    FN_MIN   = 4'd3,
    FN_MAX   = 4'd4,
    FN_ABSD  = 4'd5,   // |a - b|
    FN_A     = 4'd6,
    FN_NOTA  = 4'd7,
    FN_AND   = 4'd8,
    FN_OR    = 4'd9,
    FN_XOR   = 4'd10,
    FN_NAND  = 4'd11,
    FN_NOR   = 4'd12,
    FN_XNOR  = 4'd13,
    FN_ANDNB = 4'd14,  // a & ~b
    FN_ORNB  = 4'd15   // a | ~b
  } cfb_fn_e;

  // One CFB configuration: bits [3:0] input A, [7:4] input B, [11:8] function.
  typedef struct packed {
    cfb_fn_e          fn;
    logic [SEL_W-1:0] sel_b;
    logic [SEL_W-1:0] sel_a;
  } cfb_cfg_t;

endpackage
