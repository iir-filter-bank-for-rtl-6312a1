// tb_iir_microcode: checks the control sequence of the microcode.
// Two sequencers run from a free-running step counter: A (CYCLES 4, 3 sections, no
// switches) and B (CYCLES 5, 7 sections, SOS and gain switches, memory output
// register). A small memory here answers the coefficient addresses so that B reads
// its switch words. For every computation the issued operations are collected and
// compared with the expected list: b2, b1 of section 0, g*input, then a2 (with shift),
// a1 (result written, output on the last section), and b2, b1 of the next section.
// Checked: coefficient addresses, operand sources, the step of the first operation,
// that each section result goes to the slot read as x[-2]/y[-2] and that this slot is
// read as the -1 value in the next computation (odd/even swap), that a new filter set
// takes effect only at the start of a computation, and, for B, the zero-word, held
// input, bypass and alternate gain addresses of switched-off sections.
module tb_iir_microcode;
  import iir_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_comp = 0, n_off = 0, n_setchg = 0;

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  logic rst;
  logic [9:0] cnt;                 // {.., odd, cycle} free-running
  logic [2:0] fsel;
  logic [63:0] mem [1024];

  // ---------------- sequencer A ----------------
  iir_ctrl_t a_ctrl;  logic [9:0] a_addr;  logic [2:0] a_fa;  logic [63:0] a_q;
  iir_microcode #(.CYCLES(4)) u_a (
    .clk, .rst, .ce (1'b1), .cycle (cnt[3:0]), .odd (cnt[4]), .fsel,
    .mem_rdata (a_q), .ctrl (a_ctrl), .coef_addr (a_addr), .fsel_active (a_fa));
  always_ff @(posedge clk) a_q <= mem[a_addr];

  // ---------------- sequencer B ----------------
  iir_ctrl_t b_ctrl;  logic [9:0] b_addr;  logic [2:0] b_fa;  logic [63:0] b_q, b_q0;
  iir_microcode #(.CYCLES(5), .MEM_DELAY(1), .SOS_SWITCH(1'b1), .GAIN_SWITCH(1'b1)) u_b (
    .clk, .rst, .ce (1'b1), .cycle (cnt[4:0]), .odd (cnt[5]), .fsel,
    .mem_rdata (b_q), .ctrl (b_ctrl), .coef_addr (b_addr), .fsel_active (b_fa));
  always_ff @(posedge clk) begin b_q0 <= mem[b_addr]; b_q <= b_q0; end

  // expected operation list of one computation
  typedef struct {
    op_sel_e    sel;
    bit         shift, wr, out, rst_acc;
    int         ridx;        // history index read (-1: none)
    int         rrole;       // 1: -2 value, 0: -1 value
    int         caddr;
  } op_t;

  function automatic void expect_ops(int nsos, int set, logic [63:0] sw, bit sosw, bit gsw,
                                     ref op_t ops [$]);
    int base, alt;
    op_t o;
    base = set * 128;
    alt  = 768 + set * 32;
    ops.delete();
    for (int i = 0; i < 3; i++) begin
      o = '{sel: SEL_HIST, shift: 0, wr: 0, out: 0, rst_acc: 1'(i == 0), ridx: 0, rrole: int'(i == 0),
            caddr: 0};
      if (i < 2) o.caddr = (sosw && sw[1]) ? base : base + 4 + (i == 0 ? 1 : 0);
      else begin
        o.sel = SEL_INPUT; o.ridx = -1;
        o.caddr = (gsw && sw[0]) ? base : base + 3;
      end
      ops.push_back(o);
    end
    for (int n = 0; n < nsos; n++) begin
      bit off, offn;
      off  = sosw && sw[n+1];
      offn = sosw && (n + 2 < 64) && sw[n+2];
      // a2
      o = '{sel: SEL_HIST, shift: !off, wr: 0, out: 0, rst_acc: 0, ridx: n + 1, rrole: 1,
            caddr: base + 4 * (n + 1) + 3};
      if (off) begin
        o.caddr = (n == 0) ? alt + 1 : base;
        if (n == 0) o.sel = SEL_HELD;
      end
      ops.push_back(o);
      // a1
      o = '{sel: SEL_HIST, shift: 0, wr: 1, out: (n == nsos - 1), rst_acc: 0, ridx: n + 1,
            rrole: 0, caddr: base + 4 * (n + 1) + 2};
      if (off) begin
        o.caddr = (n == 0) ? base : alt + n + 1;
        if (n > 0) o.sel = SEL_BYPASS;
      end
      ops.push_back(o);
      if (n < nsos - 1) begin
        o = '{sel: SEL_HIST, shift: 0, wr: 0, out: 0, rst_acc: 0, ridx: n + 1, rrole: 1,
              caddr: offn ? base : base + 4 * (n + 2) + 1};
        ops.push_back(o);
        o.rrole = 0;
        o.caddr = offn ? base : base + 4 * (n + 2) + 0;
        ops.push_back(o);
      end
    end
  endfunction

  // collect and compare one sequencer's computations
  class seq_check;
    string  name;
    int     nsos, steps, first_step, set_prev;
    bit     sosw, gsw;
    op_t    ops [$];
    iir_ctrl_t got [$];
    int     got_addr [$];
    int     last_written [int];   // history index -> physical slot written
    int     comp;

    function new(string n, int ns, int st, int fs, bit s, bit g);
      name = n; nsos = ns; steps = st; first_step = fs; sosw = s; gsw = g; comp = 0;
      set_prev = 0;
    endfunction

    function void sample(iir_ctrl_t c, int addr, int step, int set, logic [63:0] sw);
      if (c.op && c.first) begin
        got.delete(); got_addr.delete();
        chk(step == first_step, {name, " first op step"});
      end
      if (c.op) begin
        got.push_back(c); got_addr.push_back(addr);
        if (got.size() == 4 * nsos + 1) compare(set, sw);
      end
    endfunction

    function void compare(int set, logic [63:0] sw);
      int wslot [int];
      expect_ops(nsos, set, sw, sosw, gsw, ops);
      comp++;
      for (int i = 0; i < ops.size(); i++) begin
        iir_ctrl_t c;
        c = got[i];
        chk(c.sel == ops[i].sel && c.acc_shift == ops[i].shift && c.wr_acc == ops[i].wr &&
            c.out == ops[i].out && c.acc_reset == ops[i].rst_acc &&
            c.wr_prod == (i == 2) && got_addr[i] == ops[i].caddr,
            $sformatf("%s comp %0d op %0d flags/address (addr %0d, expected %0d)",
                      name, comp, i, got_addr[i], ops[i].caddr));
        if (ops[i].ridx >= 0) begin
          chk(int'(c.raddr[7:1]) == ops[i].ridx, $sformatf("%s op %0d history index", name, i));
          // the -1 read must be what the previous computation wrote
          if (ops[i].rrole == 0 && last_written.exists(ops[i].ridx))
            chk(int'(c.raddr[0]) == last_written[ops[i].ridx],
                $sformatf("%s op %0d reads previous result", name, i));
          if (ops[i].rrole == 1) wslot[ops[i].ridx] = int'(c.raddr[0]);
        end
        if (c.wr_acc || c.wr_prod) begin
          int idx;
          idx = int'(c.waddr[7:1]);
          chk(wslot.exists(idx) && int'(c.waddr[0]) == wslot[idx],
              $sformatf("%s op %0d writes over the -2 slot", name, i));
        end
      end
      for (int i = 0; i < ops.size(); i++)
        if (got[i].wr_acc || got[i].wr_prod) last_written[int'(got[i].waddr[7:1])] = int'(got[i].waddr[0]);
      if (set != set_prev) n_setchg++;
      set_prev = set;
    endfunction
  endclass

  seq_check ca, cb;
  int set_a, set_b;          // set the running computation must use

  initial begin
    ca = new("A", 3, 16, 14, 0, 0);
    cb = new("B", 7, 32, 29, 1, 1);
    foreach (mem[i]) mem[i] = '0;
    mem[1 * 128 + 1] = 64'b0000_1011;       // set 1: gain off, sections 0 and 2 off
    mem[2 * 128 + 1] = 64'b1_0000_0100;     // set 2: sections 1 and 7 (last) off
    rst = 1; cnt = '0; fsel = '0;
    set_a = 0; set_b = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
  end

  always @(posedge clk) if (!rst) cnt <= cnt + 1;

  // change the selection at awkward moments; it must apply from the next computation
  always @(posedge clk) begin
    if (!rst && cnt % 61 == 0) fsel <= 3'($urandom_range(2, 0));
  end

  // the set a computation uses is the selection seen by the microcode when the
  // previous computation issued its last operation (one step later, the first idle step)
  logic [2:0] fsel_at_a, fsel_at_b;
  always @(negedge clk) begin
    if (!rst) begin
      if (a_ctrl.op && a_ctrl.out) fsel_at_a = fsel;
      if (b_ctrl.op && b_ctrl.out) fsel_at_b = fsel;
      if (a_ctrl.op && a_ctrl.first) set_a = int'(fsel_at_a);
      if (b_ctrl.op && b_ctrl.first) set_b = int'(fsel_at_b);
      ca.sample(a_ctrl, int'(a_addr), int'(cnt[3:0]), set_a, mem[set_a * 128 + 1]);
      cb.sample(b_ctrl, int'(b_addr), int'(cnt[4:0]), set_b,
                {mem[set_b * 128 + 2][31:0], mem[set_b * 128 + 1][31:0]});
      if (b_ctrl.op && b_ctrl.sel != SEL_HIST && b_ctrl.sel != SEL_INPUT) n_off++;
    end
  end

  initial begin
    fsel_at_a = 0; fsel_at_b = 0;
    repeat (3000) @(posedge clk);
    checks += 3;
    if (ca.comp < 50 || cb.comp < 50) failures++;
    if (n_off == 0) failures++;
    if (n_setchg < 4) failures++;
    $display("computations A=%0d B=%0d, set changes %0d", ca.comp, cb.comp, n_setchg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
