// iir_clock_divider: filter timing derived from the GPS-aligned time.
//
// 'time_sub' is the fraction of the current second in units of 2^-RESOLUTION s; it
// counts up by one per clock and wraps to zero on the 1 PPS. The filter takes one
// step per 2^LBD clocks and 2^CYCLES steps per filter cycle, so
//   ce        = low LBD bits of time_sub all ones (always 1 when LBD = 0)
//   cycle     = time_sub[LBD +: CYCLES]          (step within the filter cycle)
//   odd       = time_sub[LBD + CYCLES]           (odd/even filter cycle)
// and every filter cycle starts on a fixed tick of the second. All outputs are
// registered, one clock after time_sub.
//
// 'clear' is the history reset for the filter engine, shaped by RESET_TYPE:
//   RESET_FULL     rst starts it; it is held for at least one whole filter cycle and
//                  released when a filter cycle starts (step 0) with rst low after a
//                  complete cleared cycle;
//   RESET_INSTANT  follows rst;
//   RESET_GOERTZEL follows rst and is also high during the last filter cycle of every
//                  second.
// Taking the divider straight from the time bits, and the exact release rule of
// RESET_FULL, are this design's choices; the three reset types are the specification's.
module iir_clock_divider
  import iir_pkg::*;
#(
  parameter int unsigned RESOLUTION = 26,
  parameter int unsigned CYCLES     = 6,
  parameter int unsigned LBD        = 0,
  parameter reset_type_e RESET_TYPE = RESET_FULL
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [RESOLUTION-1:0] time_sub,
  output logic                  ce,
  output logic [CYCLES-1:0]     cycle,
  output logic                  odd,
  output logic                  clear
);

  initial begin
    if (LBD + CYCLES >= RESOLUTION) $error("LBD + CYCLES must be below RESOLUTION");
    if (CYCLES < 3 || CYCLES > 9) $error("CYCLES must be 3..9");
  end

  localparam int unsigned TOP = RESOLUTION - LBD - CYCLES;   // filter cycles per second, log2

  logic ce_n, first_n, sec_last_n;

  always_comb begin
    ce_n = 1'b1;
    for (int i = 0; i < int'(LBD); i++) ce_n &= time_sub[i];
    first_n    = ce_n && (time_sub[LBD +: CYCLES] == '0);
    sec_last_n = time_sub[RESOLUTION-1 -: TOP] == '1;
  end

  logic full_seen;

  always_ff @(posedge clk) begin
    ce    <= ce_n;
    cycle <= time_sub[LBD +: CYCLES];
    odd   <= time_sub[LBD + CYCLES];
  end

  always_ff @(posedge clk) begin
    unique case (RESET_TYPE)
      RESET_INSTANT: begin
        clear     <= rst;
        full_seen <= 1'b0;
      end
      RESET_GOERTZEL: begin
        clear     <= rst || sec_last_n;
        full_seen <= 1'b0;
      end
      default: begin
        if (rst) begin
          clear     <= 1'b1;
          full_seen <= 1'b0;
        end else if (first_n && clear) begin
          if (full_seen) clear <= 1'b0;
          full_seen <= 1'b1;
        end
      end
    endcase
  end

endmodule
