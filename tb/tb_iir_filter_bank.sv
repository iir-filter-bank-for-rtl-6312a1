// tb_iir_filter_bank: end-to-end test of the filter bank.
//
// Two banks run side by side, each driven and checked by tb_iir_bank_checker against
// the reference model:
//   A: the default configuration (1 filter, 64-step cycle, 15 sections, output register);
//   B: 2 filters, 32-step cycle (7 sections), SOS and gain switches enabled, extra
//      coefficient memory output register, no output register, 64-bit host port with
//      an output register;
//   C: 16-step cycle stepped every second clock (LBD = 1), Goertzel reset type and a
//      second of only 2^11 clocks, so that the once-a-second history reset occurs.
// Mechanisms counted: positive and negative c0 shifts, filter set switching, input
// overflow, clamping, the history reset, host read-back, a switched-off first
// section, the bypass path of a later switched-off section and the gain switch, and
// for bank C the slowed clock and the Goertzel reset at the end of the second (seen
// as a second history reset beside the reset pulse). Each must occur at least once.
module tb_iir_filter_bank;
  import iir_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  // ---------------- bank A: defaults ----------------
  logic              a_rst, a_yv, a_done, a_en, a_we;
  logic [25:0]       a_time;
  logic [2:0]        a_fsel, a_fact;
  logic signed [31:0] a_x [1], a_xo [1], a_y [1];
  logic              a_xovf [1], a_yovf [1];
  logic [10:0]       a_addr;
  logic [31:0]       a_wd, a_rd;
  int a_checks, a_fail, a_c [10];

  iir_filter_bank u_a (
    .clk, .rst (a_rst), .time_sub (a_time), .fsel (a_fsel), .fsel_active (a_fact),
    .x_in (a_x), .x_ovf (a_xovf), .x_old (a_xo), .y_out (a_y), .y_ovf (a_yovf),
    .y_valid (a_yv), .clk_b (clk), .en_b (a_en), .we_b (a_we), .addr_b (a_addr),
    .wdata_b (a_wd), .rdata_b (a_rd)
  );

  tb_iir_bank_checker #(.NCOMP(60)) u_ca (
    .clk, .rst (a_rst), .time_sub (a_time), .fsel (a_fsel), .x_in (a_x), .x_ovf (a_xovf),
    .x_old (a_xo), .y_out (a_y), .y_ovf (a_yovf), .y_valid (a_yv), .en_b (a_en),
    .we_b (a_we), .addr_b (a_addr), .wdata_b (a_wd), .rdata_b (a_rd),
    .dut_clear (u_a.clear), .done (a_done), .checks (a_checks), .failures (a_fail),
    .n_shift_pos (a_c[0]), .n_shift_neg (a_c[1]), .n_set_switch (a_c[2]),
    .n_ovf_in (a_c[3]), .n_ovf_sat (a_c[4]), .n_clear (a_c[5]), .n_host_read (a_c[6]),
    .n_sos_off0 (a_c[7]), .n_bypass (a_c[8]), .n_gain_off (a_c[9])
  );

  // ---------------- bank B: switches, two filters ----------------
  logic              b_rst, b_yv, b_done, b_en, b_we;
  logic [25:0]       b_time;
  logic [2:0]        b_fsel, b_fact;
  logic signed [31:0] b_x [2], b_xo [2], b_y [2];
  logic              b_xovf [2], b_yovf [2];
  logic [9:0]        b_addr;
  logic [63:0]       b_wd, b_rd;
  int b_checks, b_fail, b_c [10];

  iir_filter_bank #(
    .CYCLES (5), .FILTERS (2), .FILTER_REG (1'b0), .GAIN_SWITCH (1'b1), .SOS_SWITCH (1'b1),
    .MEMORY_DELAY (1), .MEMORY_REG (2), .DATA_B_WIDTH (64)
  ) u_b (
    .clk, .rst (b_rst), .time_sub (b_time), .fsel (b_fsel), .fsel_active (b_fact),
    .x_in (b_x), .x_ovf (b_xovf), .x_old (b_xo), .y_out (b_y), .y_ovf (b_yovf),
    .y_valid (b_yv), .clk_b (clk), .en_b (b_en), .we_b (b_we), .addr_b (b_addr),
    .wdata_b (b_wd), .rdata_b (b_rd)
  );

  tb_iir_bank_checker #(
    .CYCLES (5), .FILTERS (2), .FILTER_REG (1'b0), .GAIN_SWITCH (1'b1), .SOS_SWITCH (1'b1),
    .DATA_B_WIDTH (64), .NCOMP (60)
  ) u_cb (
    .clk, .rst (b_rst), .time_sub (b_time), .fsel (b_fsel), .x_in (b_x), .x_ovf (b_xovf),
    .x_old (b_xo), .y_out (b_y), .y_ovf (b_yovf), .y_valid (b_yv), .en_b (b_en),
    .we_b (b_we), .addr_b (b_addr), .wdata_b (b_wd), .rdata_b (b_rd),
    .dut_clear (u_b.clear), .done (b_done), .checks (b_checks), .failures (b_fail),
    .n_shift_pos (b_c[0]), .n_shift_neg (b_c[1]), .n_set_switch (b_c[2]),
    .n_ovf_in (b_c[3]), .n_ovf_sat (b_c[4]), .n_clear (b_c[5]), .n_host_read (b_c[6]),
    .n_sos_off0 (b_c[7]), .n_bypass (b_c[8]), .n_gain_off (b_c[9])
  );

  // ---------------- bank C: slow clock, Goertzel reset ----------------
  logic              c_rst, c_yv, c_done, c_en, c_we;
  logic [10:0]       c_time;
  logic [2:0]        c_fsel, c_fact;
  logic signed [31:0] c_x [1], c_xo [1], c_y [1];
  logic              c_xovf [1], c_yovf [1];
  logic [10:0]       c_addr;
  logic [31:0]       c_wd, c_rd;
  int c_checks, c_fail, c_c [10];

  iir_filter_bank #(
    .RESOLUTION (11), .CYCLES (4), .LBD (1), .RESET_TYPE (RESET_GOERTZEL)
  ) u_c (
    .clk, .rst (c_rst), .time_sub (c_time), .fsel (c_fsel), .fsel_active (c_fact),
    .x_in (c_x), .x_ovf (c_xovf), .x_old (c_xo), .y_out (c_y), .y_ovf (c_yovf),
    .y_valid (c_yv), .clk_b (clk), .en_b (c_en), .we_b (c_we), .addr_b (c_addr),
    .wdata_b (c_wd), .rdata_b (c_rd)
  );

  tb_iir_bank_checker #(
    .CYCLES (4), .RESOLUTION (11), .LBD (1), .NCOMP (70)
  ) u_cc (
    .clk, .rst (c_rst), .time_sub (c_time), .fsel (c_fsel), .x_in (c_x), .x_ovf (c_xovf),
    .x_old (c_xo), .y_out (c_y), .y_ovf (c_yovf), .y_valid (c_yv), .en_b (c_en),
    .we_b (c_we), .addr_b (c_addr), .wdata_b (c_wd), .rdata_b (c_rd),
    .dut_clear (u_c.clear), .done (c_done), .checks (c_checks), .failures (c_fail),
    .n_shift_pos (c_c[0]), .n_shift_neg (c_c[1]), .n_set_switch (c_c[2]),
    .n_ovf_in (c_c[3]), .n_ovf_sat (c_c[4]), .n_clear (c_c[5]), .n_host_read (c_c[6]),
    .n_sos_off0 (c_c[7]), .n_bypass (c_c[8]), .n_gain_off (c_c[9])
  );

  // ---------------- result ----------------
  int checks, failures;
  string names [10] = '{"shift_pos", "shift_neg", "set_switch", "ovf_in", "ovf_clamp",
                        "history_reset", "host_read", "sos_off_first", "bypass", "gain_off"};

  task automatic finish(bit timeout);
    checks   = a_checks + b_checks + c_checks;
    failures = a_fail + b_fail + c_fail + (timeout ? 1 : 0);
    if (timeout) $display("FAIL watchdog expired");
    for (int i = 0; i < 10; i++) begin
      $display("mechanism %-14s A=%0d B=%0d C=%0d", names[i], a_c[i], b_c[i], c_c[i]);
      checks++;
      if (a_c[i] + b_c[i] + c_c[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", names[i]);
      end
    end
    $display("mechanism slow_clock     C outputs checked=%0d", c_checks);
    $display("mechanism goertzel_reset C history resets=%0d", c_c[5]);
    checks += 2;
    if (c_checks < 50) begin
      failures++;
      $display("FAIL mechanism slow_clock not exercised enough");
    end
    if (c_c[5] < 2) begin
      failures++;
      $display("FAIL mechanism goertzel_reset never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    wait (a_done && b_done && c_done);
    repeat (2) @(posedge clk);
    finish(0);
  end

  initial begin
    repeat (20000) @(posedge clk);
    finish(1);
  end

endmodule
