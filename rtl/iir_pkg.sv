// iir_pkg: shared types and number formats of the IIR filter bank.
//
// Number formats (all two's complement):
//  * Coefficients are 53-bit fixed point with the binary point between bit 51 and
//    bit 50 (2 integer bits including the sign, 51 fraction bits), range [-2, +2).
//    In the 64-bit memory word they are left aligned (bits 63:11). The low 8 bits of
//    the a2 word hold the section shift c0 as an 8-bit signed number.
//  * Section inputs/outputs (history values) are 52-bit words. The filter input and
//    output are FilterWidth-bit integers placed in the upper bits of the 52-bit word,
//    so the remaining 52-FilterWidth bits are fraction bits. This placement is a
//    choice of this design; the 52-bit width and the 53-bit coefficient format
//    follow the specification.
//  * The accumulator keeps ACC_FRAC extra fraction bits below the history LSB and
//    ACC_W bits in total, enough for five products and the shifted sum.
// The control word issued by the microcode for every clock cycle of a filter cycle
// is the struct iir_ctrl_t below.
package iir_pkg;

  localparam int unsigned COEF_W    = 53;   // coefficient width
  localparam int unsigned COEF_FRAC = 51;   // coefficient fraction bits
  localparam int unsigned WORD_W    = 64;   // coefficient memory word
  localparam int unsigned DATA_W    = 52;   // history / section value width
  localparam int unsigned PROD_W    = COEF_W + DATA_W;
  localparam int unsigned ACC_FRAC  = 8;    // accumulator guard fraction bits
  localparam int unsigned ACC_W     = 68;   // accumulator width
  localparam int unsigned SHIFT_W   = 8;    // c0 field width in the a2 word
  localparam int unsigned HADDR_W   = 8;    // history address field (up to 127 SOS)

  // Word offsets inside a group of four coefficients.
  localparam logic [1:0] W_B1 = 2'd0, W_B2 = 2'd1, W_A1 = 2'd2, W_A2 = 2'd3;
  // Word offsets inside group 0 of a filter set.
  localparam logic [1:0] W_ZERO = 2'd0, W_SW0 = 2'd1, W_SW1 = 2'd2, W_GAIN = 2'd3;

  // Operand source of the multiplier.
  typedef enum logic [1:0] {
    SEL_HIST   = 2'd0,  // history buffer read data
    SEL_INPUT  = 2'd1,  // filter input (sampled into the old-input register)
    SEL_HELD   = 2'd2,  // input sampled earlier in this filter cycle
    SEL_BYPASS = 2'd3   // running accumulator value (switched-off SOS)
  } op_sel_e;

  // Clear behaviour of the filter history.
  typedef enum logic [1:0] {
    RESET_FULL     = 2'd0,  // hold for at least a full filter cycle, release at a cycle end
    RESET_INSTANT  = 2'd1,  // only while the reset input is high
    RESET_GOERTZEL = 2'd2   // reset input, plus the last filter cycle of every second
  } reset_type_e;

  typedef enum logic {
    MEM_SPROM  = 1'b0,      // read-only coefficient memory, preloaded from a file
    MEM_TDPRAM = 1'b1       // true dual-port RAM, writable from port B
  } mem_type_e;

  // Control word for one clock cycle, as issued by the microcode.
  typedef struct packed {
    logic                op;          // a multiply-accumulate takes place
    logic                first;       // first operation of a filter computation
    logic                acc_reset;   // accumulator starts from zero
    logic                acc_shift;   // shift accumulator by c0 before adding
    logic                wr_prod;     // write scaled product to history (gain * input)
    logic                wr_acc;      // write accumulator result to history
    logic                out;         // accumulator result is the filter output
    op_sel_e             sel;         // multiplier operand source
    logic [HADDR_W-1:0]  raddr;       // history read address
    logic [HADDR_W-1:0]  waddr;       // history write address
  } iir_ctrl_t;

  localparam iir_ctrl_t CTRL_IDLE = '{default: '0, sel: SEL_HIST};


endpackage
