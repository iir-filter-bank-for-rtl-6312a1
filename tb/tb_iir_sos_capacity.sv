// tb_iir_sos_capacity: the section capacity of the "5x" schedule at every filter
// cycle length.
//
// With four steps per section and four overhead steps, a filter cycle of 8, 16, 32,
// 64, 128, 256 or 512 steps holds 1, 3, 7, 15, 31, 63 or 127 sections. This test
// builds one filter bank per cycle length (CYCLES 3 to 9), fills every section it can
// hold, and checks through tb_iir_capacity_run that each produces one correct output
// per filter cycle. The two longest need a larger coefficient bank (MEMORY_BANK 8 and
// 9) to hold 4*(sections+1) words. A watchdog ends the run after a fixed number of
// clocks.
module tb_iir_sos_capacity;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 7;
  logic done [N];
  int   chk [N], fl [N];

  tb_iir_capacity_run #(.CYCLES(3), .SEED(3)) u_c3 (.clk, .done (done[0]), .checks (chk[0]), .failures (fl[0]));
  tb_iir_capacity_run #(.CYCLES(4), .SEED(4)) u_c4 (.clk, .done (done[1]), .checks (chk[1]), .failures (fl[1]));
  tb_iir_capacity_run #(.CYCLES(5), .SEED(5)) u_c5 (.clk, .done (done[2]), .checks (chk[2]), .failures (fl[2]));
  tb_iir_capacity_run #(.CYCLES(6), .SEED(6)) u_c6 (.clk, .done (done[3]), .checks (chk[3]), .failures (fl[3]));
  tb_iir_capacity_run #(.CYCLES(7), .SEED(7)) u_c7 (.clk, .done (done[4]), .checks (chk[4]), .failures (fl[4]));
  tb_iir_capacity_run #(.CYCLES(8), .MEMORY_BANK(8), .SEED(8))
    u_c8 (.clk, .done (done[5]), .checks (chk[5]), .failures (fl[5]));
  tb_iir_capacity_run #(.CYCLES(9), .MEMORY_BANK(9), .SEED(9))
    u_c9 (.clk, .done (done[6]), .checks (chk[6]), .failures (fl[6]));

  int  checks, failures;
  bit  all_done;

  initial begin
    all_done = 0;
    for (int i = 0; i < 60000 && !all_done; i++) begin
      @(posedge clk);
      all_done = 1;
      for (int k = 0; k < N; k++) all_done &= done[k];
    end
    checks = 0; failures = 0;
    for (int k = 0; k < N; k++) begin
      checks   += chk[k] + 1;
      failures += fl[k];
      if (!done[k]) begin
        failures++;
        $display("FAIL CYCLES=%0d did not finish", k + 3);
      end else if (chk[k] < 20) begin
        failures++;
        $display("FAIL CYCLES=%0d too few outputs", k + 3);
      end
      $display("CYCLES=%0d sections=%0d checks=%0d failures=%0d", k + 3, (1 << (k + 1)) - 1,
               chk[k], fl[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
