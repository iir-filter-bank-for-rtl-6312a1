// tb_iir_filter_bank_rom: the filter bank with its coefficients in a preloaded ROM.
//
// The bank is built with MEMORY_TYPE = MEM_SPROM, a 512-word memory (the smallest
// the ROM allows), 16-step filter cycles (3 sections) and MEMORY_FILE naming
// tb/iir_rom_demo.hex. That file holds filter set 0 as 64-bit words in hex, one per
// line: the zero word, two zero switch words and the gain, then b1, b2, a1 and a2
// with c0 in the low byte for each of three sections (c0 = -2, +1, 0). The test reads
// the same file, builds the reference model from it, and checks every output value
// and the step it appears in. Through the host port it reads words back and checks
// that a write attempt leaves the ROM unchanged. A watchdog ends the run.
module tb_iir_filter_bank_rom;
  import iir_pkg::*;
  import iir_ref_pkg::*;

  localparam int unsigned C     = 4;
  localparam int unsigned STEPS = 1 << C;
  localparam int unsigned NSOS  = (1 << (C - 2)) - 1;
  localparam int unsigned DEPTH = 9;
  localparam int          NCOMP = 40;

  logic clk = 0;
  always #5 clk = ~clk;

  logic               rst, yv, en, we;
  logic [25:0]        tsub;
  logic [1:0]         fsel, fact;
  logic signed [31:0] x [1], xo [1], y [1];
  logic               xovf [1], yovf [1];
  logic [DEPTH:0]     addr;
  logic [31:0]        wd, rd;
  logic signed [31:0] xs;

  assign x[0]    = xs;
  assign xovf[0] = 1'b0;

  iir_filter_bank #(
    .CYCLES (C), .MEMORY_TYPE (MEM_SPROM), .MEMORY_DEPTH (DEPTH),
    .MEMORY_FILE ("tb/iir_rom_demo.hex")
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

  logic [63:0] img [16];
  iir_model    mdl;
  exp_t        q [$];
  longint      tcount;
  int          checks, failures, m_count, n_out;
  bit          armed;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // read one 32-bit half of a word through the host port (one cycle of latency)
  task automatic host_read(int word, int half, output logic [31:0] v);
    @(posedge clk);
    en <= 1; we <= 0; addr <= (DEPTH + 1)'((word << 1) | half);
    @(posedge clk);
    en <= 0;
    @(negedge clk);
    v = rd;
  endtask

  initial begin
    logic [31:0] v;
    rst = 1; fsel = '0; en = 0; we = 0; addr = '0; wd = '0; xs = '0;
    checks = 0; failures = 0; m_count = 0; n_out = 0; armed = 0;
    $readmemh("tb/iir_rom_demo.hex", img);
    mdl = new(NSOS, 32);
    mdl.g = coef_of(img[3]);
    for (int n = 0; n < int'(NSOS); n++) begin
      logic [5:0] c;
      mdl.b1[n] = coef_of(img[4 * (n + 1) + 0]);
      mdl.b2[n] = coef_of(img[4 * (n + 1) + 1]);
      mdl.a1[n] = coef_of(img[4 * (n + 1) + 2]);
      mdl.a2[n] = coef_of(img[4 * (n + 1) + 3]);
      c = img[4 * (n + 1) + 3][5:0];
      mdl.c0[n] = int'($signed(c));
    end
    chk(mdl.c0[0] == -2 && mdl.c0[1] == 1, "shift fields of the file");
    // host port: read back, then try to overwrite word 4
    for (int w = 3; w < 8; w++) begin
      host_read(w, 0, v); chk(v == img[w][31:0],  $sformatf("read word %0d low", w));
      host_read(w, 1, v); chk(v == img[w][63:32], $sformatf("read word %0d high", w));
    end
    @(posedge clk);
    en <= 1; we <= 1; addr <= (DEPTH + 1)'(4 << 1); wd <= 32'hdead_beef;
    @(posedge clk);
    en <= 0; we <= 0;
    host_read(4, 0, v); chk(v == img[4][31:0], "ROM unchanged after a write");
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    armed = 1;
  end

  initial tcount = 64'(STEPS) * 3;
  always @(posedge clk) tcount <= tcount + 1;
  assign tsub = 26'(tcount);

  always @(posedge clk) begin
    longint step, cyc;
    step = tcount % longint'(STEPS);
    cyc  = tcount / longint'(STEPS);
    if (armed && !u_dut.clear && step == longint'(STEPS) / 2 && m_count < NCOMP) begin
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
      chk(step == 1, $sformatf("output strobe in step %0d", (step + longint'(STEPS) - 1) % longint'(STEPS)));
      if (q.size() > 0 && q[0].due <= cyc) begin
        exp_t e;
        e = q.pop_front();
        n_out++;
        chk(e.due == cyc && y[0] == e.y && yovf[0] == e.ovf,
            $sformatf("output %0d: cycle %0d/%0d y %0d/%0d", n_out, cyc, e.due, y[0], e.y));
      end
    end
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      if (m_count == NCOMP && q.size() == 0) break;
    end
    chk(m_count == NCOMP && q.size() == 0, "all outputs seen before the watchdog");
    chk(n_out == NCOMP, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
