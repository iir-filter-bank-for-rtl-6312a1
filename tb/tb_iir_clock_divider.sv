// tb_iir_clock_divider: checks the clock divider and the three reset types.
// A 12-bit time (RESOLUTION 12) counts every clock. Instance F (Full reset, LBD 1,
// CYCLES 3), I (Instant, LBD 0) and G (Goertzel, LBD 0) are compared with values
// derived here from the time sampled at the last clock edge: the step count, the odd/even bit and
// the clock enable; for F the clear must start the clock after the reset, last at
// least one whole filter cycle and end on a filter cycle boundary; for I it follows
// the reset; for G it is also high in the last filter cycle of every second.
module tb_iir_clock_divider;
  import iir_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int unsigned RES = 12;
  logic rst;
  logic [RES-1:0] t, tp;
  int checks = 0, failures = 0;

  logic f_ce, f_odd, f_clr;  logic [2:0] f_cyc;
  logic i_ce, i_odd, i_clr;  logic [3:0] i_cyc;
  logic g_ce, g_odd, g_clr;  logic [3:0] g_cyc;

  iir_clock_divider #(.RESOLUTION(RES), .CYCLES(3), .LBD(1), .RESET_TYPE(RESET_FULL)) u_f (
    .clk, .rst, .time_sub (t), .ce (f_ce), .cycle (f_cyc), .odd (f_odd), .clear (f_clr));
  iir_clock_divider #(.RESOLUTION(RES), .CYCLES(4), .LBD(0), .RESET_TYPE(RESET_INSTANT)) u_i (
    .clk, .rst, .time_sub (t), .ce (i_ce), .cycle (i_cyc), .odd (i_odd), .clear (i_clr));
  iir_clock_divider #(.RESOLUTION(RES), .CYCLES(4), .LBD(0), .RESET_TYPE(RESET_GOERTZEL)) u_g (
    .clk, .rst, .time_sub (t), .ce (g_ce), .cycle (g_cyc), .odd (g_odd), .clear (g_clr));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0d", what, t);
    end
  endtask

  // Full reset bookkeeping: clocks of clear seen, with and without a complete cycle
  int  f_len, n_full_release, n_goertzel;
  bit  rstp, f_clrp;

  initial begin
    rst = 1; t = '0; f_len = 0; n_full_release = 0; n_goertzel = 0;
    for (int i = 0; i < 12000; i++) begin
      @(negedge clk);
      if (i > 2) begin
        // values registered from the previous time
        chk(f_cyc == t[1 +: 3] && f_odd == t[4] && f_ce == t[0], "F divider");
        chk(i_cyc == t[0 +: 4] && i_odd == t[4] && i_ce, "I divider");
        chk(g_cyc == t[0 +: 4] && g_odd == t[4] && g_ce, "G divider");
        chk(i_clr == rst, "Instant clear");
        chk(g_clr == (rst || t[RES-1:4] == '1), "Goertzel clear");
        if (g_clr && !rst) n_goertzel++;
        // Full: rises after reset, falls only on a boundary (step 0 now) after >= 16 clocks
        if (rst) chk(f_clr, "Full clear during reset");
        if (f_clr) f_len++;
        if (f_clrp && !f_clr) begin
          chk(t[3:0] == 4'd1, "Full release on a cycle boundary");
          chk(f_len >= 16, "Full clear held for a whole cycle");
          n_full_release++;
        end
        if (!f_clr) f_len = 0;
      end
      f_clrp = f_clr;
      rstp = rst;
      tp = t;
      t  = t + 1;
      if (i == 3) rst = 0;
      if (i % 997 == 500) rst = 1;
      if (i % 997 == 500 + (i / 997) % 40) rst = 0;
    end
    checks += 2;
    if (n_full_release < 5) failures++;
    if (n_goertzel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
