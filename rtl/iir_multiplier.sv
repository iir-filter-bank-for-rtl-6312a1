// iir_multiplier: pipelined signed multiplier of the filter engine.
//
// Multiplies a DATA_W-bit section value by a COEF_W-bit coefficient and delivers the
// full PROD_W-bit product STAGES clock-enabled cycles later. The specification maps
// this product onto five DSP slices working in parallel ("5x" configuration); here it
// is written as a plain product followed by a register chain so that a synthesis tool
// can spread it over DSP slices and retime it. Every stage advances only when ce is
// high. Latency: STAGES cycles of ce (default 2, this design's choice).
module iir_multiplier
  import iir_pkg::*;
#(
  parameter int unsigned STAGES = 2
) (
  input  logic                     clk,
  input  logic                     ce,
  input  logic signed [DATA_W-1:0] a,     // section value
  input  logic signed [COEF_W-1:0] b,     // coefficient
  output logic signed [PROD_W-1:0] p      // a * b, STAGES cycles later
);

  logic signed [PROD_W-1:0] pipe [STAGES];

  always_ff @(posedge clk) begin
    if (ce) begin
      pipe[0] <= PROD_W'(a) * PROD_W'(b);
      for (int i = 1; i < int'(STAGES); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign p = pipe[STAGES-1];

endmodule
