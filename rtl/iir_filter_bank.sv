// iir_filter_bank: a bank of FILTERS identical IIR filters built from second order
// sections (SOS), computed in fixed point on one multiply-accumulate pipeline.
//
// Blocks: the clock divider turns the GPS-aligned sub-second time into the step
// count of the filter cycle, a clock enable and the odd/even cycle bit; the microcode
// turns the step count into control words and coefficient addresses; the coefficient
// memory holds several filter sets (gain, b1, b2, a1, a2 and c0 of every section) and
// has a second, host-side port; the filter engine runs the sections for all FILTERS
// inputs at once. One filter cycle is 2^CYCLES steps and holds up to 2^(CYCLES-2)-1
// sections (15 at the default 64 steps). Unused sections are left with zero
// coefficients and a zero shift, which makes them pass their input through.
//
// Timing (LBD = 0, one step per clock): the input is sampled in step 1 of a filter
// cycle and the result appears with 'y_valid' in step 0 of the next filter cycle
// (FILTER_REG = 1) or during step 2^CYCLES-1 of the same cycle (FILTER_REG = 0).
// 'fsel' chooses the filter set; a change takes effect only at the start of a
// computation. Host writes to a set in use take effect whenever they land.
//
// The parameters and their defaults follow the specification (names adapted to this
// code's style). The "5x" multiplier configuration is the one built; the "2x"
// configuration and the DSP slice selection are not parameters of this design.
// MULT_STAGES, the multiplier's pipeline depth, is this design's own.
module iir_filter_bank
  import iir_pkg::*;
#(
  parameter int unsigned RESOLUTION   = 26,
  parameter int unsigned CYCLES       = 6,
  parameter int unsigned LBD          = 0,
  parameter int unsigned FILTERS      = 1,
  parameter int unsigned FILTER_WIDTH = 32,
  parameter bit          FILTER_REG   = 1'b1,
  parameter int unsigned SHIFT_BITS   = 6,
  parameter bit          GAIN_SWITCH  = 1'b0,
  parameter bit          SOS_SWITCH   = 1'b0,
  parameter reset_type_e RESET_TYPE   = RESET_FULL,
  parameter mem_type_e   MEMORY_TYPE  = MEM_TDPRAM,
  parameter int unsigned MEMORY_DEPTH = 10,
  parameter int unsigned MEMORY_BANK  = 7,
  parameter int unsigned MEMORY_DELAY = 0,
  parameter string       MEMORY_FILE  = "none",
  parameter int unsigned MEMORY_REG   = 1,
  parameter int unsigned DATA_B_WIDTH = 32,
  parameter int unsigned MULT_STAGES  = 2,
  localparam int unsigned SEL_W   = (MEMORY_DEPTH > MEMORY_BANK) ? MEMORY_DEPTH - MEMORY_BANK : 1,
  localparam int unsigned BADDR_W = MEMORY_DEPTH + ((DATA_B_WIDTH == 32) ? 1 : 0)
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [RESOLUTION-1:0]          time_sub,   // fraction of the second, 2^-RESOLUTION s units
  input  logic [SEL_W-1:0]               fsel,       // filter set selection
  output logic [SEL_W-1:0]               fsel_active,
  // filter data
  input  logic signed [FILTER_WIDTH-1:0] x_in  [FILTERS],
  input  logic                           x_ovf [FILTERS],
  output logic signed [FILTER_WIDTH-1:0] x_old [FILTERS],
  output logic signed [FILTER_WIDTH-1:0] y_out [FILTERS],
  output logic                           y_ovf [FILTERS],
  output logic                           y_valid,
  // host side of the coefficient memory
  input  logic                           clk_b,
  input  logic                           en_b,
  input  logic                           we_b,
  input  logic [BADDR_W-1:0]             addr_b,
  input  logic [DATA_B_WIDTH-1:0]        wdata_b,
  output logic [DATA_B_WIDTH-1:0]        rdata_b
);

  logic                    ce, odd, clear;
  logic [CYCLES-1:0]       cycle;
  iir_ctrl_t               ctrl;
  logic [MEMORY_DEPTH-1:0] coef_addr;
  logic [WORD_W-1:0]       coef;

  iir_clock_divider #(
    .RESOLUTION (RESOLUTION), .CYCLES (CYCLES), .LBD (LBD), .RESET_TYPE (RESET_TYPE)
  ) u_div (
    .clk, .rst, .time_sub, .ce, .cycle, .odd, .clear
  );

  iir_microcode #(
    .CYCLES (CYCLES), .MEM_DEPTH (MEMORY_DEPTH), .MEM_BANK (MEMORY_BANK),
    .MEM_DELAY (MEMORY_DELAY), .MULT_STAGES (MULT_STAGES),
    .GAIN_SWITCH (GAIN_SWITCH), .SOS_SWITCH (SOS_SWITCH)
  ) u_ucode (
    .clk, .rst, .ce, .cycle, .odd, .fsel,
    .mem_rdata (coef), .ctrl, .coef_addr, .fsel_active
  );

  iir_coeff_mem #(
    .MEM_TYPE (MEMORY_TYPE), .DEPTH_BITS (MEMORY_DEPTH), .MEM_DELAY (MEMORY_DELAY),
    .MEM_FILE (MEMORY_FILE), .MEM_REG (MEMORY_REG), .B_WIDTH (DATA_B_WIDTH)
  ) u_mem (
    .clk, .ce, .addr_a (coef_addr), .rdata_a (coef),
    .clk_b, .en_b, .we_b, .addr_b, .wdata_b, .rdata_b
  );

  iir_filter_engine #(
    .FILTERS (FILTERS), .FILTER_WIDTH (FILTER_WIDTH), .OUTPUT_REG (FILTER_REG),
    .CYCLES (CYCLES), .SHIFT_BITS (SHIFT_BITS), .MEM_DELAY (MEMORY_DELAY),
    .MULT_STAGES (MULT_STAGES)
  ) u_eng (
    .clk, .rst, .ce, .clear, .ctrl, .coef,
    .x_in, .x_ovf, .x_old, .y_out, .y_ovf, .y_valid
  );

endmodule
