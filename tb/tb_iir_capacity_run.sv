// tb_iir_capacity_run: one filter bank filled with as many sections as its filter
// cycle holds, run and checked against the reference model.
//
// The bank (parameters CYCLES, MEMORY_DEPTH, MEMORY_BANK, everything else at its
// default) gets 2^(CYCLES-2)-1 second order sections, every one of them with nonzero
// b1, b2, a1, a2 and some with a c0 shift of +1 or -1, written through a 64-bit host
// port. The coefficients are drawn from the seed so that each section has a gain near
// one, which keeps a long cascade within range. A new input is applied in the middle
// of every filter cycle for NCOMP cycles; each output must appear with 'y_valid' in
// step 0 of the second filter cycle after the input was applied, one per filter
// cycle, and must equal the model's output bit for bit. 'done' rises when all
// expected outputs have been seen.
module tb_iir_capacity_run
  import iir_ref_pkg::*;
#(
  parameter int unsigned CYCLES       = 6,
  parameter int unsigned MEMORY_DEPTH = 10,
  parameter int unsigned MEMORY_BANK  = 7,
  parameter int unsigned NCOMP        = 10,
  parameter int unsigned SEED         = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned NSOS  = (1 << (CYCLES - 2)) - 1;
  localparam int unsigned STEPS = 1 << CYCLES;
  localparam int unsigned SEL_W = (MEMORY_DEPTH > MEMORY_BANK) ? MEMORY_DEPTH - MEMORY_BANK : 1;

  logic               rst, yv, en, we;
  logic [25:0]        tsub;
  logic [SEL_W-1:0]   fsel, fact;
  logic signed [31:0] x [1], xo [1], y [1];
  logic               xovf [1], yovf [1];
  logic [MEMORY_DEPTH-1:0] addr;
  logic [63:0]        wd, rd;
  logic signed [31:0] xs;

  assign x[0]    = xs;
  assign xovf[0] = 1'b0;

  iir_filter_bank #(
    .CYCLES (CYCLES), .MEMORY_DEPTH (MEMORY_DEPTH), .MEMORY_BANK (MEMORY_BANK),
    .DATA_B_WIDTH (64)
  ) u_dut (
    .clk, .rst, .time_sub (tsub), .fsel, .fsel_active (fact),
    .x_in (x), .x_ovf (xovf), .x_old (xo), .y_out (y), .y_ovf (yovf),
    .y_valid (yv), .clk_b (clk), .en_b (en), .we_b (we), .addr_b (addr),
    .wdata_b (wd), .rdata_b (rd)
  );

  typedef struct {
    longint             due;
    logic signed [31:0] y;
    bit                 ovf;
  } exp_t;

  iir_model mdl;
  exp_t     q [$];
  longint   tcount;
  int       m_count, n_out;
  bit       loaded, armed;

  task automatic host_write(int word, logic [63:0] v);
    @(posedge clk);
    en <= 1; we <= 1; addr <= MEMORY_DEPTH'(word); wd <= v;
    @(posedge clk);
    en <= 0; we <= 0;
  endtask

  // a value in [-lim, lim] from the seeded generator
  function automatic real rnd(real lim);
    return lim * (real'($urandom_range(2000, 0)) - 1000.0) / 1000.0;
  endfunction

  task automatic load_filter();
    real b1, b2, a1, a2;
    int  c0;
    host_write(3, coef_word(0.875));
    mdl.g = coef_of(coef_word(0.875));
    for (int n = 0; n < int'(NSOS); n++) begin
      b1 = rnd(0.25); b2 = rnd(0.25); a1 = rnd(0.25); a2 = rnd(0.25);
      c0 = (n % 4 == 1) ? 1 : (n % 4 == 3) ? -1 : 0;
      host_write(4 * (n + 1) + 0, coef_word(b1));
      host_write(4 * (n + 1) + 1, coef_word(b2));
      host_write(4 * (n + 1) + 2, coef_word(a1));
      host_write(4 * (n + 1) + 3, coef_word(a2, c0));
      mdl.b1[n] = coef_of(coef_word(b1));
      mdl.b2[n] = coef_of(coef_word(b2));
      mdl.a1[n] = coef_of(coef_word(a1));
      mdl.a2[n] = coef_of(coef_word(a2));
      mdl.c0[n] = c0;
    end
  endtask

  initial begin
    void'($urandom(SEED));
    rst = 1; fsel = '0; en = 0; we = 0; addr = '0; wd = '0;
    checks = 0; failures = 0; done = 0; m_count = 0; n_out = 0; loaded = 0; armed = 0;
    mdl = new(NSOS, 32);
    load_filter();
    loaded = 1;
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    armed = 1;                // outputs before the reset are not checked
  end

  initial tcount = 64'(STEPS) * 3;
  always @(posedge clk) tcount <= tcount + 1;
  assign tsub = 26'(tcount);

  always @(posedge clk) begin
    longint step, cyc;
    step = tcount % longint'(STEPS);
    cyc  = tcount / longint'(STEPS);
    if (!loaded) xs <= '0;
    if (loaded && !rst && !u_dut.clear && step == longint'(STEPS) / 2 && m_count < int'(NCOMP)) begin
      exp_t e;
      logic signed [31:0] xv;
      bit o;
      xv = 32'($signed($urandom_range(1 << 21, 0)) - (1 << 20));
      xs    <= xv;
      e.due = cyc + 2;
      e.y   = 32'(mdl.step(wide_t'(xv), 1'b0, o));
      e.ovf = o;
      q.push_back(e);
      m_count++;
    end
    if (yv && armed) begin
      checks++;
      if (step != 1) begin      // y_valid seen one clock after it was set
        failures++;
        $display("FAIL C=%0d output strobe in step %0d", CYCLES, (step + longint'(STEPS) - 1) % longint'(STEPS));
      end
      if (q.size() > 0 && q[0].due <= cyc) begin
        exp_t e;
        e = q.pop_front();
        checks++;
        n_out++;
        if (e.due != cyc || y[0] !== e.y || yovf[0] !== e.ovf) begin
          failures++;
          $display("FAIL C=%0d output %0d: cycle %0d/%0d y %0d/%0d ovf %0b/%0b", CYCLES,
                   n_out, cyc, e.due, y[0], e.y, yovf[0], e.ovf);
        end
      end
    end
    if (m_count == int'(NCOMP) && q.size() == 0) done <= 1;
  end

endmodule
