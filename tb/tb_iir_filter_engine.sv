// tb_iir_filter_engine: checks the filter engine with three lanes.
// The engine (CYCLES 4: 3 sections, FILTERS 3, no output register) is driven by the
// microcode and a coefficient array held here. Random but stable sections (poles
// inside the unit circle, shifts between -4 and +3) are chosen; each lane gets its own
// random input every filter cycle, sometimes with the overflow flag, sometimes large
// enough to clamp. Every output, overflow flag and old-input value is compared with
// iir_ref_pkg::iir_model, and the output must come in the last step of the filter
// cycle after the one the input was applied in.
module tb_iir_filter_engine;
  import iir_pkg::*;
  import iir_ref_pkg::*;

  localparam int unsigned C = 4, F = 3, NS = 3, ST = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, clear;
  logic [C:0] cnt;
  iir_ctrl_t ctrl;
  logic [9:0] caddr;
  logic [2:0] fa;
  logic [63:0] coef, mem [1024];
  logic signed [31:0] x [F], xo [F], y [F];
  logic xovf [F], yovf [F], yv;
  int checks = 0, failures = 0, n_clamp = 0, n_ovf_in = 0;

  iir_microcode #(.CYCLES(C)) u_uc (
    .clk, .rst, .ce (1'b1), .cycle (cnt[C-1:0]), .odd (cnt[C]), .fsel (3'd0),
    .mem_rdata (coef), .ctrl, .coef_addr (caddr), .fsel_active (fa));
  always_ff @(posedge clk) coef <= mem[caddr];

  iir_filter_engine #(.FILTERS(F), .OUTPUT_REG(1'b0), .CYCLES(C)) dut (
    .clk, .rst, .ce (1'b1), .clear, .ctrl, .coef, .x_in (x), .x_ovf (xovf),
    .x_old (xo), .y_out (y), .y_ovf (yovf), .y_valid (yv));

  iir_model mdl [F];
  typedef struct { int due; logic signed [31:0] x [F]; logic signed [31:0] y [F]; bit o [F]; } e_t;
  e_t q [$];
  int cyc;

  initial begin
    real p1, p2;
    foreach (mem[i]) mem[i] = '0;
    mem[3] = coef_word(0.9);
    for (int n = 0; n < NS; n++) begin
      // poles at radius <= 0.8: a1 = p1 + p2, a2 = -p1*p2 (real poles)
      p1 = ($urandom_range(160, 0) - 80) / 100.0;
      p2 = ($urandom_range(160, 0) - 80) / 100.0;
      mem[4*(n+1) + 0] = coef_word(($urandom_range(300, 0) - 150) / 100.0);
      mem[4*(n+1) + 1] = coef_word(($urandom_range(100, 0) - 50) / 100.0);
      mem[4*(n+1) + 2] = coef_word(p1 + p2);
      mem[4*(n+1) + 3] = coef_word(-p1 * p2, int'($urandom_range(7, 0)) - 4);
    end
    for (int f = 0; f < F; f++) begin
      mdl[f] = new(NS, 32);
      mdl[f].g = coef_of(mem[3]);
      for (int n = 0; n < NS; n++) begin
        mdl[f].b1[n] = coef_of(mem[4*(n+1)]);   mdl[f].b2[n] = coef_of(mem[4*(n+1)+1]);
        mdl[f].a1[n] = coef_of(mem[4*(n+1)+2]); mdl[f].a2[n] = coef_of(mem[4*(n+1)+3]);
        mdl[f].c0[n] = int'($signed(mem[4*(n+1)+3][5:0]));
      end
      x[f] = '0; xovf[f] = 0;
    end
    rst = 1; clear = 1; cnt = '0; cyc = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2 * ST) @(posedge clk);
    clear = 0;
  end

  always @(posedge clk) if (!rst) cnt <= cnt + 1;

  // inputs in mid cycle (cnt is the step the engine sees after this edge)
  always @(negedge clk) begin
    if (!rst && !clear && int'(cnt[C-1:0]) == ST / 2 && cyc < 200) begin
      e_t e;
      e.due = cyc + 1;
      for (int f = 0; f < F; f++) begin
        logic signed [31:0] v;
        bit o, oi;
        v  = $signed($urandom_range(1 << 22, 0)) - (1 << 21);
        if (cyc % 23 == 5) v = (f == 0) ? 32'sh7fff_ffff : -32'sh7fff_ffff;
        oi = (cyc % 11 == 4);
        x[f] = v; xovf[f] = oi;
        e.x[f] = v;
        e.y[f] = 32'(mdl[f].step(wide_t'(v), oi, o));
        e.o[f] = o;
        if (o && !oi) n_clamp++;
        if (oi) n_ovf_in++;
      end
      q.push_back(e);
    end
  end

  always @(negedge clk) begin
    if (!rst && cnt[C-1:0] == '0) cyc++;
  end

  // the output strobe lasts for the step 'cnt' shows now
  always @(negedge clk) begin
    if (yv && q.size() > 0 && q[0].due <= cyc) begin
      e_t e;
      e = q.pop_front();
      checks++;
      if (!(int'(cnt[C-1:0]) == ST - 1 && cyc == e.due)) begin
        failures++;
        $display("FAIL output timing: step %0d cycle %0d due %0d", cnt[C-1:0], cyc, e.due);
      end
      for (int f = 0; f < F; f++) begin
        checks++;
        if (y[f] !== e.y[f] || yovf[f] !== e.o[f] || xo[f] !== e.x[f]) begin
          failures++;
          $display("FAIL lane %0d: y=%0d ovf=%0d old=%0d expected %0d %0d %0d", f, y[f], yovf[f],
                   xo[f], e.y[f], e.o[f], e.x[f]);
        end
      end
    end
  end

  initial begin
    repeat (200 * ST + 200) @(posedge clk);
    checks += 3;
    if (q.size() > 1) failures++;
    if (n_clamp == 0) failures++;
    if (n_ovf_in == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
