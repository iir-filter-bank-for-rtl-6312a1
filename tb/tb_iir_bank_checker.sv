// tb_iir_bank_checker: stimulus and checks for one filter bank instance.
//
// Drives the GPS time, the reset, the host port and the filter inputs of a filter bank
// and checks every output against iir_ref_pkg::iir_model, which recomputes each step
// section by section. It loads three filter sets through the host port (and reads
// words back), changes the input in the middle of every filter cycle, switches filter
// sets, injects input overflow flags and inputs large enough to clamp, and pulses the
// reset once (an output whose computation the reset cut short may be missing). The
// time base advances one step per 2^LBD clocks. Each output must appear in the
// expected step: step 0 of the second filter cycle after the input was applied
// (output register) or the last step of the next one (no register), and 'x_old' must
// show the sampled input. Counters report how often each mechanism was exercised.
module tb_iir_bank_checker
  import iir_ref_pkg::*;
#(
  parameter int unsigned CYCLES       = 6,
  parameter int unsigned FILTERS      = 1,
  parameter int unsigned FILTER_WIDTH = 32,
  parameter bit          FILTER_REG   = 1'b1,
  parameter bit          GAIN_SWITCH  = 1'b0,
  parameter bit          SOS_SWITCH   = 1'b0,
  parameter int unsigned MEMORY_DEPTH = 10,
  parameter int unsigned MEMORY_BANK  = 7,
  parameter int unsigned DATA_B_WIDTH = 32,
  parameter int unsigned RESOLUTION   = 26,
  parameter int unsigned NCOMP        = 60,
  parameter int unsigned LBD          = 0,    // clocks per step: 2^LBD
  parameter int unsigned T0_CYCLES    = 3,    // filter cycle of the second the run starts in
  localparam int unsigned SEL_W   = (MEMORY_DEPTH > MEMORY_BANK) ? MEMORY_DEPTH - MEMORY_BANK : 1,
  localparam int unsigned BADDR_W = MEMORY_DEPTH + ((DATA_B_WIDTH == 32) ? 1 : 0)
) (
  input  logic                           clk,
  output logic                           rst,
  output logic [RESOLUTION-1:0]          time_sub,
  output logic [SEL_W-1:0]               fsel,
  output logic signed [FILTER_WIDTH-1:0] x_in  [FILTERS],
  output logic                           x_ovf [FILTERS],
  input  logic signed [FILTER_WIDTH-1:0] x_old [FILTERS],
  input  logic signed [FILTER_WIDTH-1:0] y_out [FILTERS],
  input  logic                           y_ovf [FILTERS],
  input  logic                           y_valid,
  output logic                           en_b,
  output logic                           we_b,
  output logic [BADDR_W-1:0]             addr_b,
  output logic [DATA_B_WIDTH-1:0]        wdata_b,
  input  logic [DATA_B_WIDTH-1:0]        rdata_b,
  input  logic                           dut_clear,
  output logic                           done,
  output int                             checks,
  output int                             failures,
  output int                             n_shift_pos,
  output int                             n_shift_neg,
  output int                             n_set_switch,
  output int                             n_ovf_in,
  output int                             n_ovf_sat,
  output int                             n_clear,
  output int                             n_host_read,
  output int                             n_sos_off0,
  output int                             n_bypass,
  output int                             n_gain_off
);

  localparam int unsigned NSOS   = (1 << (CYCLES - 2)) - 1;
  localparam int unsigned STEPS  = 1 << CYCLES;
  localparam int unsigned DEPTH  = 1 << MEMORY_DEPTH;
  localparam int unsigned BANK   = 1 << MEMORY_BANK;
  localparam int unsigned NSETS  = DEPTH / BANK;
  localparam int unsigned ALT_BASE = (NSETS == 2) ? BANK : 3 * DEPTH / 4;
  localparam int          XMAX   = 1 << 20;

  typedef struct {
    longint due;                 // filter cycle index of the output
    bit     skip;
    logic signed [FILTER_WIDTH-1:0] x [FILTERS];
    logic signed [FILTER_WIDTH-1:0] y [FILTERS];
    bit     ovf [FILTERS];
  } exp_t;

  logic [63:0] img [DEPTH];
  iir_model    mdl [FILTERS];
  exp_t        q [$];
  longint      tcount;
  int          set_cur, set_prev;
  bit          boot_rst, pulse_rst;    // reset after power-up, reset pulse later on

  assign rst = boot_rst || pulse_rst;

  function automatic int set_base(int s);
    return s * int'(BANK);
  endfunction

  // load a model's coefficients from the memory image of filter set s
  function automatic void load_model(iir_model m, int s);
    logic [63:0] sw;
    int b;
    b  = set_base(s);
    sw = {img[b+2][31:0], img[b+1][31:0]};
    m.g        = coef_of(img[b+3]);
    m.gain_off = GAIN_SWITCH && sw[0];
    for (int n = 0; n < int'(NSOS); n++) begin
      int gb;
      logic [5:0] c;
      gb = b + 4 * (n + 1);
      m.b1[n] = coef_of(img[gb+0]);
      m.b2[n] = coef_of(img[gb+1]);
      m.a1[n] = coef_of(img[gb+2]);
      m.a2[n] = coef_of(img[gb+3]);
      c = img[gb+3][5:0];
      m.c0[n]   = int'($signed(c));
      m.off[n]  = SOS_SWITCH && n < 63 && sw[n+1];
      m.galt[n] = coef_of(img[ALT_BASE + s * int'(BANK / 4) + n + 1]);
    end
  endfunction

  task automatic host_write(int word, logic [63:0] v);
    img[word] = v;
    if (DATA_B_WIDTH == 32) begin
      for (int h = 0; h < 2; h++) begin
        @(posedge clk);
        en_b <= 1; we_b <= 1;
        addr_b  <= BADDR_W'((word << 1) | h);
        wdata_b <= DATA_B_WIDTH'(v >> (32 * h));
      end
    end else begin
      @(posedge clk);
      en_b <= 1; we_b <= 1;
      addr_b  <= BADDR_W'(word);
      wdata_b <= DATA_B_WIDTH'(v);
    end
    @(posedge clk);
    en_b <= 0; we_b <= 0;
  endtask

  task automatic host_check(int word);
    logic [63:0] got;
    got = '0;
    for (int h = 0; h < 64 / int'(DATA_B_WIDTH); h++) begin
      @(posedge clk);
      en_b <= 1; we_b <= 0;
      addr_b <= (DATA_B_WIDTH == 32) ? BADDR_W'((word << 1) | h) : BADDR_W'(word);
      @(posedge clk);
      en_b <= 0;
      @(posedge clk);                       // data after MEMORY_REG (1 or 2) cycles
      @(negedge clk);
      got = got | (64'(rdata_b) << (DATA_B_WIDTH * h));
    end
    checks++;
    n_host_read++;
    if (got !== img[word]) begin
      failures++;
      $display("FAIL host readback word %0d: got %h expected %h", word, got, img[word]);
    end
  endtask

  // section coefficients: b1, b2, a1, a2, c0
  task automatic put_sos(int s, int n, real b1, real b2, real a1, real a2, int c0);
    int gb;
    gb = set_base(s) + 4 * (n + 1);
    host_write(gb + 0, coef_word(b1));
    host_write(gb + 1, coef_word(b2));
    host_write(gb + 2, coef_word(a1));
    host_write(gb + 3, coef_word(a2, c0));
  endtask

  task automatic load_sets();
    // set 0: two shaped sections (c0 = -3 and +1), the rest pass through
    host_write(set_base(0) + 3, coef_word(0.75));
    put_sos(0, 0, 1.5, 0.5625, 1.2, -0.5, -3);
    put_sos(0, 1, -0.5, 0.25, 0.3, 0.1, 1);
    // set 1: gain 1, section 0 multiplies by 2^12 (clamps large inputs), section 1 undoes it
    host_write(set_base(1) + 3, coef_word(1.0));
    put_sos(1, 0, 0.0, 0.0, 0.0, 0.0, 12);
    put_sos(1, 1, 0.5, 0.0, 0.25, 0.0, -12);
    // set 2: like set 0 but sections 0 and 2 switched off, gain switch toggled later
    host_write(set_base(2) + 3, coef_word(0.5));
    put_sos(2, 0, 1.5, 0.5625, 1.2, -0.5, -3);
    put_sos(2, 1, -0.5, 0.25, 0.3, 0.1, 1);
    put_sos(2, 2, 0.25, 0.125, -0.25, 0.125, 0);
    if (SOS_SWITCH) begin
      host_write(ALT_BASE + 2 * int'(BANK / 4) + 1, coef_word(0.25));   // section 0: (k-1)*g
      host_write(ALT_BASE + 2 * int'(BANK / 4) + 3, coef_word(-0.375)); // section 2: k-1
      host_write(set_base(2) + 1, 64'b1010);                            // sections 0 and 2 off
      // set 3: set 2 with the overall gain switched off as well
      for (int w = 0; w < 16; w++) host_write(set_base(3) + w, img[set_base(2) + w]);
      host_write(ALT_BASE + 3 * int'(BANK / 4) + 1, coef_word(0.25));
      host_write(ALT_BASE + 3 * int'(BANK / 4) + 3, coef_word(-0.375));
      host_write(set_base(3) + 1, GAIN_SWITCH ? 64'b1011 : 64'b1010);
    end
  endtask

  initial begin
    boot_rst = 1; fsel = '0; en_b = 0; we_b = 0; addr_b = '0; wdata_b = '0; done = 0;
    checks = 0; failures = 0;
    n_shift_pos = 0; n_shift_neg = 0; n_set_switch = 0; n_ovf_in = 0; n_ovf_sat = 0;
    n_clear = 0; n_host_read = 0; n_sos_off0 = 0; n_bypass = 0; n_gain_off = 0;
    for (int f = 0; f < int'(FILTERS); f++) begin
      x_in[f] = '0; x_ovf[f] = 0;
      mdl[f] = new(NSOS, FILTER_WIDTH);
    end
    for (int i = 0; i < int'(DEPTH); i++) img[i] = '0;
    set_cur = 0; set_prev = 0;
    load_sets();
    host_check(set_base(0) + 3);
    host_check(set_base(1) + 7);
    host_check(set_base(2) + 8);
    repeat (4) @(posedge clk);
    boot_rst <= 0;
  end

  // time base: one tick per clock, one step per 2^LBD ticks
  initial tcount = (64'(STEPS) * T0_CYCLES) << LBD;
  always @(posedge clk) tcount <= tcount + 1;
  assign time_sub = RESOLUTION'(tcount);

  // stimulus plan per computation m
  function automatic int plan_set(int m);
    if (m < 12) return 0;
    if (m < 24) return 1;
    if (m < 30 && SOS_SWITCH) return 2;
    if (m < 36 && SOS_SWITCH) return 3;
    return 0;
  endfunction

  int       m_count;
  bit       clear_seen, rst_done;
  initial begin m_count = 0; clear_seen = 0; rst_done = 0; pulse_rst = 0; end

  always @(posedge clk) begin
    longint step, cyc;
    bit     tick;
    tick = (tcount % (64'd1 << LBD)) == 0;     // first clock of a step
    step = (tcount >> LBD) % longint'(STEPS);
    cyc  = (tcount >> LBD) / longint'(STEPS);
    // a reset pulse once, early in a filter cycle
    if (tick && !rst_done && m_count == NCOMP - 14 && step == 8) begin
      pulse_rst <= 1; rst_done = 1;
    end else if (tick && rst_done && rst && step == 11) begin
      pulse_rst <= 0;
    end
    if (dut_clear && !clear_seen && m_count > 0) begin
      n_clear++;
      foreach (q[i]) q[i].skip = 1;
    end
    clear_seen = dut_clear;
    // new input in the middle of every filter cycle, after reset has settled
    if (tick && step == longint'(STEPS) / 2 && !rst && m_count < int'(NCOMP) &&
        (tcount >> LBD) > 64'(STEPS) * 64'(T0_CYCLES + 3)) begin
      exp_t e;
      int s;
      s = plan_set(m_count);
      e.due  = FILTER_REG ? cyc + 2 : cyc + 1;
      e.skip = dut_clear;
      for (int f = 0; f < int'(FILTERS); f++) begin
        logic signed [FILTER_WIDTH-1:0] xv;
        bit o;
        xv = FILTER_WIDTH'($signed($urandom_range(2 * XMAX, 0)) - XMAX);
        if (s == 1) xv = (m_count % 3 == 0) ? FILTER_WIDTH'(xv * 2) : FILTER_WIDTH'(xv >>> 8);
        x_in[f]  <= xv;
        x_ovf[f] <= (m_count % 7 == 3);
        e.x[f]   = xv;
        if (dut_clear) mdl[f].clear();
        load_model(mdl[f], s);
        e.y[f]   = FILTER_WIDTH'(mdl[f].step(wide_t'(xv), m_count % 7 == 3, o));
        e.ovf[f] = o;
        if (!e.skip) begin
          if (o && m_count % 7 != 3) n_ovf_sat++;
          if (m_count % 7 == 3) n_ovf_in++;
          if (f == 0) begin
            if (s == 0) begin n_shift_neg++; n_shift_pos++; end
            if (s >= 2 && mdl[f].off[0]) n_sos_off0++;
            if (s >= 2 && mdl[f].off[2]) n_bypass++;
            if (s >= 2 && mdl[f].gain_off) n_gain_off++;
          end
        end
      end
      if (s != set_prev && !e.skip) n_set_switch++;
      set_prev = s;
      fsel <= SEL_W'(s);
      q.push_back(e);
      m_count++;
    end
  end

  // output checks (values sampled before the edge; the DUT step is one tick behind)
  always @(posedge clk) begin
    longint dstep, dcyc;
    dstep = ((tcount - 1) >> LBD) % longint'(STEPS);
    dcyc  = ((tcount - 1) >> LBD) / longint'(STEPS);
    if (y_valid && !rst) begin
      // a computation under way when the reset came may be lost; others may not
      while (q.size() > 0 && q[0].due < dcyc) begin
        if (!q[0].skip) begin
          checks++; failures++;
          $display("FAIL output due in cycle %0d missing", q[0].due);
        end
        void'(q.pop_front());
      end
      if (q.size() > 0 && q[0].due == dcyc) begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (dstep != (FILTER_REG ? 64'd0 : 64'(STEPS - 1))) begin
          failures++;
          $display("FAIL output in step %0d", dstep);
        end
        if (!e.skip) begin
          for (int f = 0; f < int'(FILTERS); f++) begin
            checks += 3;
            if (y_out[f] !== e.y[f] || y_ovf[f] !== e.ovf[f] || x_old[f] !== e.x[f]) begin
              failures++;
              $display("FAIL cycle %0d lane %0d: y=%0d ovf=%0d old=%0d, expected y=%0d ovf=%0d old=%0d",
                       dcyc, f, y_out[f], y_ovf[f], x_old[f], e.y[f], e.ovf[f], e.x[f]);
            end
          end
        end
      end
    end
    if (m_count == int'(NCOMP) && q.size() == 0) done <= 1;
  end

endmodule
