// sdr_pkg: types and constants shared by the tile-based FIR/FFT datapath.
//
// The datapath is a grid of nine data-processing units (DPUs): four in the
// top row and five in the bottom row. Every DPU executes one control word per
// clock cycle; the word picks the operand sources (global buses, neighbours,
// local registers), the arithmetic-unit configuration (multiply, add or
// subtract, or bypass either) and the register-file writes.
// Data words are 16-bit two's complement; coefficients and twiddle factors
// are Q1.15, and a product is truncated back to 16 bits by an arithmetic shift
// of 15. Word widths, the register map and the control-word layout are this
// design's own choices; the document does not give them.
package sdr_pkg;

  localparam int DW      = 16;   // data / coefficient word width
  localparam int FRAC    = 15;   // fraction bits of coefficients (Q1.15)
  localparam int N_TOP   = 4;    // DPUs in the top row
  localparam int N_BOT   = 5;    // DPUs in the bottom row
  localparam int N_DPU   = N_TOP + N_BOT;
  localparam int NREG    = 16;   // registers per DPU register file
  localparam int RA      = $clog2(NREG);

  // FFT and FIR sizes of the receiver kernels
  localparam int FFT_N     = 64;
  localparam int FFT_LOG2N = 6;
  localparam int HB_TAPS   = 8;   // halfband filter, order 7
  localparam int MF_TAPS   = 18;  // matched filter, order 17

  // Coefficient ROM map (complex words: re in [31:16], im in [15:0])
  localparam int ROM_DEPTH   = 64;
  localparam int ROM_TW_BASE = 0;   // 32 twiddles W64^k, k = 0..31
  localparam int ROM_HB_BASE = 32;  // 4 unique halfband coefficients
  localparam int ROM_MF_BASE = 40;  // 9 unique matched-filter coefficients

  // Register map inside every DPU
  localparam logic [RA-1:0] R_HB_COEF = 4'd0;
  localparam logic [RA-1:0] R_HB0_LO  = 4'd1;  // halfband bank 0 state
  localparam logic [RA-1:0] R_HB0_HI  = 4'd2;
  localparam logic [RA-1:0] R_HB1_LO  = 4'd3;  // halfband bank 1 state
  localparam logic [RA-1:0] R_HB1_HI  = 4'd4;
  localparam logic [RA-1:0] R_MF_COEF = 4'd5;
  localparam logic [RA-1:0] R_MFR_LO  = 4'd6;  // matched filter, real part
  localparam logic [RA-1:0] R_MFR_HI  = 4'd7;
  localparam logic [RA-1:0] R_MFI_LO  = 4'd8;  // matched filter, imaginary part
  localparam logic [RA-1:0] R_MFI_HI  = 4'd9;
  localparam logic [RA-1:0] R_FOLD    = 4'd10; // saved state at the fold point

  typedef logic signed [DW-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  // Operand sources of a DPU
  typedef enum logic [3:0] {
    SRC_ZERO  = 4'd0,
    SRC_BUS0  = 4'd1,   // data bus lane 0 (sample a, real)
    SRC_BUS1  = 4'd2,   // data bus lane 1 (sample a, imaginary)
    SRC_BUS2  = 4'd3,   // data bus lane 2 (sample b, real)
    SRC_BUS3  = 4'd4,   // data bus lane 3 (sample b, imaginary)
    SRC_CF0   = 4'd5,   // coefficient bus lane 0 (ROM real part)
    SRC_CF1   = 4'd6,   // coefficient bus lane 1 (ROM imaginary part)
    SRC_LEFT  = 4'd7,   // left neighbour in the same row
    SRC_RIGHT = 4'd8,   // right neighbour in the same row
    SRC_VA    = 4'd9,   // first dedicated vertical link
    SRC_VB    = 4'd10,  // second dedicated vertical link
    SRC_REG   = 4'd11   // own register file
  } src_e;

  typedef struct packed {
    src_e          src;
    logic [RA-1:0] ra;   // register address when src == SRC_REG
  } opnd_t;

  // Multiplier stage of the arithmetic unit
  typedef enum logic [1:0] {
    MUL_BYPASS = 2'd0,  // p = a (multiplier bypassed)
    MUL_LIVE   = 2'd1,  // p = a*b, and the product is kept
    MUL_HOLD   = 2'd2,  // p = kept product, multiplier idle
    MUL_PIPE   = 2'd3   // p = kept product, kept product <= a*b
  } mul_e;

  // Adder/subtractor stage of the arithmetic unit
  typedef enum logic [1:0] {
    ADD_BYPASS = 2'd0,  // r = p (adder bypassed)
    ADD_CP     = 2'd1,  // r = c + p
    SUB_CP     = 2'd2,  // r = c - p
    SUB_PC     = 2'd3   // r = p - c
  } add_e;

  // One control word of one DPU for one clock cycle
  typedef struct packed {
    logic          en;      // the arithmetic unit works; out register updates
    opnd_t         a;       // multiplier operand / bypass value
    opnd_t         b;       // multiplier operand
    opnd_t         c;       // adder operand
    mul_e          mul;
    add_e          add;
    logic          wr_en;   // write the result into reg[wr_addr]
    logic [RA-1:0] wr_addr;
    logic          ld_en;   // copy operand ld into reg[ld_addr]
    opnd_t         ld;
    logic [RA-1:0] ld_addr;
    logic          oe_reg;  // neighbours see reg[o_addr] instead of the out register
    logic [RA-1:0] o_addr;
  } dpu_cfg_t;

  localparam dpu_cfg_t DPU_NOP = '0;

  // Operations of the central controller
  typedef enum logic [2:0] {
    OP_IDLE  = 3'd0,
    OP_LOAD  = 3'd1,   // load FIR coefficients from ROM, clear filter state
    OP_HB    = 3'd2,   // halfband FIR, 2 cycles per complex sample
    OP_MF    = 3'd3,   // matched FIR, 4 cycles per complex sample
    OP_FFT   = 3'd4    // 64-point radix-2 DIF FFT, one butterfly per cycle
  } op_e;

  // Command accepted by the central controller
  typedef struct packed {
    op_e        op;
    logic       src_ram;   // FIR source: 0 = input buffer, 1 = result RAM
    logic       bank;      // halfband state bank
    logic       decim;     // halfband: keep every second output
    logic [7:0] src_base;
    logic [7:0] dst_base;
    logic [7:0] count;     // FIR: number of input samples
  } cmd_t;

  // Which array outputs a result-RAM write port takes
  typedef enum logic [1:0] {
    WSEL_HB  = 2'd0,   // {T0, B0}: halfband real and imaginary output
    WSEL_MF  = 2'd1,   // {held T0, T0}: matched-filter real (held) and imaginary
    WSEL_FFT = 2'd2    // {T2, T3}: butterfly sum a+b
  } wsel_e;

  // Controller state handed to the configuration unit each cycle
  typedef struct packed {
    op_e        op;
    logic       bank;
    logic [4:0] step;      // FIR phase, or load step
  } ctl_state_t;

endpackage
