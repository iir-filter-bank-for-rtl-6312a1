// iir_filter_engine: multiply-accumulate pipeline that runs a chain of second order
// sections for FILTERS input values in parallel, all with the same coefficients.
//
// Each section computes (Eq. 2, direct form I)
//   y = 2^c0 * (x + b1*x[-1] + b2*x[-2]) + a1*y[-1] + a2*y[-2]
// and the first section's x is the input times the overall gain g. Since a section's
// output is the next section's input, its result simply stays in the accumulator and
// the whole filter needs one multiply per coefficient. Per lane the engine holds a
// history buffer, an operand mux (history, input, held input, bypass), a pipelined
// multiplier and an accumulator with the c0 shifter; the coefficient register and the
// delay line that carries c0 alongside the product are shared.
//
// Pipeline, counted in clock-enabled cycles from the control word 'ctrl' (step S0,
// when the microcode also presents the coefficient address):
//   S1 = 1+MEM_DELAY   history and coefficient data arrive; the operand is selected
//   S2                 operand and coefficient registered (multiplier inputs)
//   S2+MULT_STAGES     product added into the accumulator; a gain*input product is
//                      written to the history here
//   S3+MULT_STAGES     accumulator holds the sum; a section result is written to the
//                      history, the filter result is taken as output
// With OUTPUT_REG the output value is registered once more ('y_valid' one cycle later).
// 'x_old' is the input sample used by the current computation, registered when the
// input is sampled (the specification's separate output for the old input value).
//
// Overflow: 'y_ovf' flags a result that was clamped anywhere in the computation (the
// shifted sum, a section value that does not fit 52 bits, the output) or whose input
// came with 'x_ovf' set. The output is the upper FILTER_WIDTH bits of the 52-bit
// result (the lower bits are fraction bits and are dropped). The internal formats,
// the saturation and the pipeline depth are this design's choices; the structure
// (history buffer, mux, bypass, multiplier, accumulator, shifter, delay, optional
// output register, overflow in and out) follows the specification.
module iir_filter_engine
  import iir_pkg::*;
#(
  parameter int unsigned FILTERS      = 1,
  parameter int unsigned FILTER_WIDTH = 32,
  parameter bit          OUTPUT_REG   = 1'b1,
  parameter int unsigned CYCLES       = 6,
  parameter int unsigned SHIFT_BITS   = 6,
  parameter int unsigned MEM_DELAY    = 0,
  parameter int unsigned MULT_STAGES  = 2
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           ce,
  input  logic                           clear,      // history reset
  input  iir_ctrl_t                      ctrl,       // microcode, step S0
  input  logic [WORD_W-1:0]              coef,       // coefficient memory data, step S1
  input  logic signed [FILTER_WIDTH-1:0] x_in  [FILTERS],
  input  logic                           x_ovf [FILTERS],
  output logic signed [FILTER_WIDTH-1:0] x_old [FILTERS],
  output logic signed [FILTER_WIDTH-1:0] y_out [FILTERS],
  output logic                           y_ovf [FILTERS],
  output logic                           y_valid
);

  localparam int unsigned HAW  = CYCLES - 1;
  localparam int unsigned FRAC = DATA_W - FILTER_WIDTH;   // fraction bits of a section value
  localparam logic signed [DATA_W-1:0] DMAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam logic signed [DATA_W-1:0] DMIN = {1'b1, {(DATA_W-1){1'b0}}};

  initial begin
    if (FILTER_WIDTH > DATA_W - 1) $error("FILTER_WIDTH must be below %0d", DATA_W);
    if (SHIFT_BITS < 2 || SHIFT_BITS > 6) $error("SHIFT_BITS must be 2..6");
  end

  // ---------------- shared control pipeline ----------------
  localparam int unsigned NCTL = 1 + MEM_DELAY + 1 + MULT_STAGES + 1;  // S1 .. S3+M
  localparam int unsigned IS1  = MEM_DELAY;                 // index of S1 in the chain
  localparam int unsigned ISA  = MEM_DELAY + 1 + MULT_STAGES;
  localparam int unsigned ISW  = ISA + 1;

  iir_ctrl_t ctl [NCTL];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NCTL); i++) ctl[i] <= CTRL_IDLE;
    end else if (ce) begin
      ctl[0] <= ctrl;
      for (int i = 1; i < int'(NCTL); i++) ctl[i] <= ctl[i-1];
    end
  end

  iir_ctrl_t c_s1, c_a, c_w;
  assign c_s1 = ctl[IS1];
  assign c_a  = ctl[ISA];
  assign c_w  = ctl[ISW];

  // coefficient register and the c0 delay that travels with the product
  logic signed [COEF_W-1:0]  coef_s2;
  logic        [SHIFT_W-1:0] c0_dly [MULT_STAGES + 1];
  always_ff @(posedge clk) begin
    if (ce) begin
      coef_s2   <= coef[WORD_W-1 -: COEF_W];
      c0_dly[0] <= coef[SHIFT_W-1:0];
      for (int i = 1; i <= int'(MULT_STAGES); i++) c0_dly[i] <= c0_dly[i-1];
    end
  end

  // history write address and kind, shared by all lanes
  logic           wr_prod_a, wr_acc_w;
  logic [HAW-1:0] waddr_a, waddr_w;
  assign wr_prod_a = c_a.op && c_a.wr_prod;
  assign wr_acc_w  = c_w.op && c_w.wr_acc;
  assign waddr_a   = c_a.waddr[HAW-1:0];
  assign waddr_w   = c_w.waddr[HAW-1:0];

  logic y_valid_n;
  assign y_valid_n = c_w.op && c_w.out;

  function automatic logic signed [DATA_W-1:0] sat_data(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(DMAX))      return DMAX;
    else if (v < ACC_W'(DMIN)) return DMIN;
    else                       return v[DATA_W-1:0];
  endfunction

  function automatic logic fits_data(input logic signed [ACC_W-1:0] v);
    return (v <= ACC_W'(DMAX)) && (v >= ACC_W'(DMIN));
  endfunction

  // ---------------- lanes ----------------
  for (genvar f = 0; f < int'(FILTERS); f++) begin : g_lane
    logic signed [DATA_W-1:0] hist_q, hist_s1, x_ext, x_hold, opnd_s1, opnd_s2;
    logic signed [DATA_W-1:0] wdata, y52;
    logic signed [ACC_W-1:0]  acc, prod_acc;
    logic signed [PROD_W-1:0] prod;
    logic                     acc_ovf, in_ovf_q, sticky, we, wsat;

    iir_history_buffer #(.AW(HAW)) u_hist (
      .clk, .ce, .clear,
      .raddr (ctrl.raddr[HAW-1:0]),
      .rdata (hist_q),
      .we, .waddr (wr_prod_a ? waddr_a : waddr_w), .wdata
    );

    if (MEM_DELAY == 0) begin : g_nd
      assign hist_s1 = hist_q;
    end else begin : g_d
      logic signed [DATA_W-1:0] hd [MEM_DELAY];
      always_ff @(posedge clk) begin
        if (ce) begin
          hd[0] <= hist_q;
          for (int i = 1; i < int'(MEM_DELAY); i++) hd[i] <= hd[i-1];
        end
      end
      assign hist_s1 = hd[MEM_DELAY-1];
    end

    // section value of the current accumulator (bypass path and history write)
    assign y52   = sat_data(acc >>> ACC_FRAC);
    assign x_ext = DATA_W'(x_in[f]) <<< FRAC;

    always_comb begin
      unique case (c_s1.sel)
        SEL_INPUT:  opnd_s1 = x_ext;
        SEL_HELD:   opnd_s1 = x_hold;
        SEL_BYPASS: opnd_s1 = y52;
        default:    opnd_s1 = hist_s1;
      endcase
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        x_hold   <= '0;
        x_old[f] <= '0;
        in_ovf_q <= 1'b0;
      end else if (ce) begin
        if (c_s1.op && c_s1.sel == SEL_INPUT) begin
          x_hold   <= x_ext;
          x_old[f] <= x_in[f];
          in_ovf_q <= x_ovf[f];
        end
      end
    end

    always_ff @(posedge clk) begin
      if (ce) opnd_s2 <= opnd_s1;
    end

    iir_multiplier #(.STAGES(MULT_STAGES)) u_mult (
      .clk, .ce, .a (opnd_s2), .b (coef_s2), .p (prod)
    );

    iir_accumulator #(.SHIFT_BITS(SHIFT_BITS)) u_acc (
      .clk, .rst, .ce,
      .add   (c_a.op),
      .clr   (c_a.acc_reset),
      .shift (c_a.acc_shift),
      .c0    (c0_dly[MULT_STAGES]),
      .prod,
      .acc,
      .ovf   (acc_ovf)
    );

    // history write: gain*input product (scaled to a section value) or section result
    assign prod_acc = ACC_W'(prod >>> COEF_FRAC);
    always_comb begin
      we    = wr_prod_a || wr_acc_w;
      wdata = wr_prod_a ? sat_data(prod_acc) : y52;
      wsat  = wr_prod_a ? !fits_data(prod_acc) : (wr_acc_w && !fits_data(acc >>> ACC_FRAC));
    end

    // overflow collection over one computation
    logic ovf_now, out_sat;
    assign out_sat = !fits_data(acc >>> ACC_FRAC);
    assign ovf_now = sticky || acc_ovf || (we && wsat);

    always_ff @(posedge clk) begin
      if (rst) begin
        sticky <= 1'b0;
      end else if (ce) begin
        if (y_valid_n) sticky <= 1'b0;
        else           sticky <= ovf_now;
      end
    end

    logic signed [FILTER_WIDTH-1:0] y_n;
    logic                           yovf_n;
    assign y_n    = FILTER_WIDTH'(y52 >>> FRAC);
    assign yovf_n = ovf_now || out_sat || in_ovf_q;

    if (OUTPUT_REG) begin : g_oreg
      always_ff @(posedge clk) begin
        if (rst) begin
          y_out[f] <= '0;
          y_ovf[f] <= 1'b0;
        end else if (ce && y_valid_n) begin
          y_out[f] <= y_n;
          y_ovf[f] <= yovf_n;
        end
      end
    end else begin : g_ocomb
      assign y_out[f] = y_n;
      assign y_ovf[f] = yovf_n;
    end
  end

  if (OUTPUT_REG) begin : g_vreg
    always_ff @(posedge clk) begin
      if (rst)     y_valid <= 1'b0;
      else if (ce) y_valid <= y_valid_n;
    end
  end else begin : g_vcomb
    assign y_valid = y_valid_n && ce;
  end

endmodule
