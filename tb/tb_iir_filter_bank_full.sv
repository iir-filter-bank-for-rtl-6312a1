// tb_iir_filter_bank_full: the filter bank at its default parameters, end to end.
//
// One bank with every parameter at its default (one filter, 64-step filter cycle, 15
// sections, output register, 32-bit host port) is loaded through the host port and
// run for 60 filter computations, checked step by step against the reference model by
// tb_iir_bank_checker: filter set switching, shifts, overflow, clamping and the
// history reset all take place.
module tb_iir_filter_bank_full;
  import iir_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst, yv, done, en, we;
  logic [25:0]       tsub;
  logic [2:0]        fsel, fact;
  logic signed [31:0] x [1], xo [1], y [1];
  logic              xovf [1], yovf [1];
  logic [10:0]       addr;
  logic [31:0]       wd, rd;
  int checks, failures, c [10];

  iir_filter_bank u_dut (
    .clk, .rst, .time_sub (tsub), .fsel, .fsel_active (fact),
    .x_in (x), .x_ovf (xovf), .x_old (xo), .y_out (y), .y_ovf (yovf),
    .y_valid (yv), .clk_b (clk), .en_b (en), .we_b (we), .addr_b (addr),
    .wdata_b (wd), .rdata_b (rd)
  );

  tb_iir_bank_checker #(.NCOMP(60)) u_chk (
    .clk, .rst, .time_sub (tsub), .fsel, .x_in (x), .x_ovf (xovf),
    .x_old (xo), .y_out (y), .y_ovf (yovf), .y_valid (yv), .en_b (en),
    .we_b (we), .addr_b (addr), .wdata_b (wd), .rdata_b (rd),
    .dut_clear (u_dut.clear), .done, .checks, .failures,
    .n_shift_pos (c[0]), .n_shift_neg (c[1]), .n_set_switch (c[2]),
    .n_ovf_in (c[3]), .n_ovf_sat (c[4]), .n_clear (c[5]), .n_host_read (c[6]),
    .n_sos_off0 (c[7]), .n_bypass (c[8]), .n_gain_off (c[9])
  );

  int total, errors;

  initial begin
    repeat (2) @(posedge clk);
    fork
      wait (done);
      repeat (20000) @(posedge clk);
    join_any
    total  = checks;
    errors = failures;
    if (!done) begin
      $display("FAIL watchdog expired");
      errors++;
    end
    for (int i = 0; i < 7; i++) begin
      total++;
      if (c[i] == 0) begin
        errors++;
        $display("FAIL mechanism %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", total, errors);
    $finish;
  end

endmodule
