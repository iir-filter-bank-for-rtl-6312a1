// iir_accumulator: accumulator and barrel shifter of the filter engine.
//
// On every clock-enabled cycle with 'add' high the accumulator takes one product:
//   acc <= base + (prod >>> (COEF_FRAC - ACC_FRAC))
// where base is 0 when 'clr' is high (start of a filter), the accumulator shifted by
// the section's c0 when 'shift' is high (c0 * (x + b1 x1 + b2 x2) of Eq. 2), and the
// accumulator itself otherwise. The shift amount is the ShiftBits-bit signed field of
// the a2 word: a positive value multiplies by 2^c0, a negative one divides. The shift
// and the add happen in one cycle here; the specification draws the shifter as a
// register beside the accumulator, which this design folds into the same stage.
// Results are kept within ACC_W-1 signed bits: a shifted base or a sum that does not
// fit is clamped to the largest value of its sign and 'ovf' pulses with the update.
// The product scaling and the saturation are this design's choices. Latency: the new
// value shows on 'acc' one cycle after 'add'.
module iir_accumulator
  import iir_pkg::*;
#(
  parameter int unsigned SHIFT_BITS = 6   // barrel shifter: c0 in -2^(SHIFT_BITS-1) .. 2^(SHIFT_BITS-1)-1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic                     add,     // take one product
  input  logic                     clr,     // start from zero
  input  logic                     shift,   // apply c0 to the running sum first
  input  logic [SHIFT_W-1:0]       c0,      // shift field of the a2 word
  input  logic signed [PROD_W-1:0] prod,
  output logic signed [ACC_W-1:0]  acc,
  output logic                     ovf      // saturation happened in the last update
);

  localparam int unsigned MAXS  = 1 << (SHIFT_BITS - 1);
  localparam int unsigned WIDE  = ACC_W + MAXS;
  localparam int unsigned KEEP  = ACC_W - 1;    // significant bits kept
  localparam logic signed [ACC_W-1:0] POS_MAX = ACC_W'((68'sd1 <<< (KEEP - 1)) - 1);
  localparam logic signed [ACC_W-1:0] NEG_MAX = -POS_MAX - 1;

  logic signed [SHIFT_BITS-1:0] c0s;
  logic signed [WIDE-1:0]       acc_wide, shifted;
  logic signed [ACC_W-1:0]      term, base, base_raw, sum;
  logic                         shift_ovf, sum_ovf;
  int                           sh;

  function automatic logic fits_keep(input logic signed [WIDE-1:0] v);
    return (v <= WIDE'(POS_MAX)) && (v >= WIDE'(NEG_MAX));
  endfunction

  always_comb begin
    c0s      = c0[SHIFT_BITS-1:0];
    sh       = int'(c0s);
    acc_wide = WIDE'(acc);
    if (sh >= 0) shifted = acc_wide <<< sh;
    else         shifted = acc_wide >>> (-sh);
    shift_ovf = 1'b0;
    if (clr) begin
      base_raw = '0;
    end else if (shift) begin
      shift_ovf = !fits_keep(shifted);
      base_raw  = shift_ovf ? (shifted < 0 ? NEG_MAX : POS_MAX) : ACC_W'(shifted);
    end else begin
      base_raw = acc;
    end
    base = base_raw;
    term = ACC_W'(prod >>> (COEF_FRAC - ACC_FRAC));
    sum  = base + term;
    sum_ovf = (sum > POS_MAX) || (sum < NEG_MAX);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (ce) begin
      ovf <= 1'b0;
      if (add) begin
        acc <= sum_ovf ? (sum < 0 ? NEG_MAX : POS_MAX) : sum;
        ovf <= shift_ovf | sum_ovf;
      end
    end
  end

endmodule
