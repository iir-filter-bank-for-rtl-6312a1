// iir_microcode: control sequencer of the filter bank ("5x" multiplier schedule).
//
// For every step of the filter cycle it issues one control word (iir_ctrl_t), the
// coefficient memory address and, through the control word, the history addresses.
// The filter with NSOS = 2^(CYCLES-2)-1 second order sections is computed as one
// chain of multiply-accumulates, one per step, for step k = 0 .. 4*NSOS:
//   k = 0, 1       b2*x[-2], b1*x[-1] of section 0 (accumulator cleared at k = 0)
//   k = 2          g*x, the new input times the overall gain; the product is also
//                  written to the history as section 0's newest input
//   then per section n, four steps:
//                  a2*y[-2] (the running sum is first shifted by c0), a1*y[-1]
//                  (result y_n written to history; it stays in the accumulator as the
//                  input of section n+1), b2*x[-2] and b1*x[-1] of section n+1.
// That is 4 steps per section and 4 overhead steps per filter cycle, as in the
// specification. The three idle steps read the two switch words of group 0 and the
// zero word; the filter selection input is taken over on the first idle step, so a
// new filter set only ever applies from the start of a computation.
//
// Steps are counted ahead of the divider's cycle count by OFFSET = MEM_DELAY +
// MULT_STAGES + 1, the engine's pipeline depth less two, so that the last section's
// result reaches the accumulator in the last step of the filter cycle and an output
// register presents it in the first step of the next one. The history slot bit h is
// 1 for the -2 value and is inverted in odd filter cycles, so that the value written
// as the newest becomes the -1 value of the next cycle.
//
// With SOS_SWITCH, a set switch bit turns a section off: its b coefficients are
// replaced by the zero word, no shift is applied, and the alternate gain g_n is
// applied instead of a2 (section 0, to the held input) or a1 (later sections, to the
// running sum through the bypass path). With GAIN_SWITCH, switch bit 0 replaces the
// overall gain by zero. Alternate gains are read at ALT_BASE + set*2^(MEM_BANK-2) +
// n + 1, where ALT_BASE is the second filter set when the memory holds two sets and
// the last quarter of the memory when it holds four or more. The step order within
// a section and this alternate-gain addressing are this design's choices.
//
// Interface: ctrl and coef_addr are registered, updated when ce is high.
module iir_microcode
  import iir_pkg::*;
#(
  parameter int unsigned CYCLES      = 6,
  parameter int unsigned MEM_DEPTH   = 10,
  parameter int unsigned MEM_BANK    = 7,
  parameter int unsigned MEM_DELAY   = 0,
  parameter int unsigned MULT_STAGES = 2,
  parameter bit          GAIN_SWITCH = 1'b0,
  parameter bit          SOS_SWITCH  = 1'b0,
  localparam int unsigned SEL_W      = (MEM_DEPTH > MEM_BANK) ? MEM_DEPTH - MEM_BANK : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic [CYCLES-1:0]    cycle,
  input  logic                 odd,
  input  logic [SEL_W-1:0]     fsel,        // filter set selection
  input  logic [WORD_W-1:0]    mem_rdata,   // coefficient memory port A, for the switches
  output iir_ctrl_t            ctrl,
  output logic [MEM_DEPTH-1:0] coef_addr,
  output logic [SEL_W-1:0]     fsel_active
);

  localparam int unsigned NSOS    = (1 << (CYCLES - 2)) - 1;
  localparam int unsigned LAST    = 4 * NSOS;              // last multiply step
  localparam int unsigned OFFSET  = MEM_DELAY + MULT_STAGES + 1;
  localparam int unsigned NSETS   = 1 << (MEM_DEPTH - MEM_BANK);
  localparam int unsigned GROUP_W = MEM_BANK - 2;
  localparam int unsigned ALT_BASE = (NSETS == 2) ? (1 << MEM_BANK) : 3 * (1 << MEM_DEPTH) / 4;

  initial begin
    if (CYCLES < 3 || CYCLES > 9) $error("CYCLES must be 3..9");
    if (MEM_BANK < 6 || MEM_BANK > MEM_DEPTH) $error("MEM_BANK must be 6..MEM_DEPTH");
    if (NSOS + 1 > (1 << GROUP_W)) $error("MEM_BANK too small for %0d sections", NSOS);
    if (SOS_SWITCH && NSETS < 2) $error("SOS switches need at least two filter sets");
    if (SOS_SWITCH && MULT_STAGES > 2) $error("SOS switches need MULT_STAGES <= 2");
  end

  logic [CYCLES:0]      kk;
  logic [CYCLES-1:0]    k;
  logic                 par;
  logic [SEL_W-1:0]     fsel_q, fsel_cur;
  logic [63:0]          sw_q, sw;
  logic [1:0]           tag_n;
  logic [1:0]           tag_d [MEM_DELAY + 2];
  iir_ctrl_t            ctrl_n;
  logic [MEM_DEPTH-1:0] addr_n;

  // history address {section index, h}; role 1 = -2 value, 0 = -1 value
  function automatic logic [HADDR_W-1:0] haddr(input int unsigned idx, input logic role,
                                               input logic p);
    return HADDR_W'((idx << 1) | ((role ^ p) ? 1 : 0));
  endfunction

  // coefficient address inside the selected filter set
  function automatic logic [MEM_DEPTH-1:0] caddr(input logic [SEL_W-1:0] set,
                                                 input int unsigned group, input logic [1:0] w);
    logic [MEM_DEPTH-1:0] a;
    a = MEM_DEPTH'((group << 2) | int'(w));
    if (MEM_DEPTH > MEM_BANK) a = a | MEM_DEPTH'(int'(set) << MEM_BANK);
    return a;
  endfunction

  function automatic logic [MEM_DEPTH-1:0] alt_addr(input logic [SEL_W-1:0] set,
                                                    input int unsigned sec);
    return MEM_DEPTH'(ALT_BASE + (int'(set) << GROUP_W) + sec + 1);
  endfunction

  function automatic logic sos_off(input logic [63:0] swv, input int unsigned sec);
    return SOS_SWITCH && (sec < 63) && swv[sec + 1];
  endfunction

  // switch words, forwarded from the memory in the cycle they arrive
  always_comb begin
    sw = sw_q;
    if (tag_d[MEM_DELAY + 1] == 2'd1) sw[31:0]  = mem_rdata[31:0];
    if (tag_d[MEM_DELAY + 1] == 2'd2) sw[63:32] = mem_rdata[31:0];
  end

  always_comb begin
    int unsigned j, n, p;
    logic        off_n, off_next;
    kk       = {odd, cycle} + (CYCLES + 1)'(OFFSET);
    k        = kk[CYCLES-1:0];
    par      = kk[CYCLES];
    fsel_cur = (int'(k) == LAST + 1) ? fsel : fsel_q;
    ctrl_n   = CTRL_IDLE;
    addr_n   = caddr(fsel_cur, 0, W_ZERO);
    tag_n    = 2'd0;
    j = 0; n = 0; p = 0;
    off_n = 1'b0; off_next = 1'b0;
    if (int'(k) <= LAST) begin
      ctrl_n.op = 1'b1;
      if (k < 3) begin
        off_n = sos_off(sw, 0);
        unique case (k[1:0])
          2'd0: begin
            ctrl_n.first     = 1'b1;
            ctrl_n.acc_reset = 1'b1;
            ctrl_n.raddr     = haddr(0, 1'b1, par);
            addr_n           = off_n ? caddr(fsel_cur, 0, W_ZERO) : caddr(fsel_cur, 1, W_B2);
          end
          2'd1: begin
            ctrl_n.raddr = haddr(0, 1'b0, par);
            addr_n       = off_n ? caddr(fsel_cur, 0, W_ZERO) : caddr(fsel_cur, 1, W_B1);
          end
          default: begin
            ctrl_n.sel     = SEL_INPUT;
            ctrl_n.wr_prod = 1'b1;
            ctrl_n.waddr   = haddr(0, 1'b1, par);
            addr_n         = (GAIN_SWITCH && sw[0]) ? caddr(fsel_cur, 0, W_ZERO)
                                                      : caddr(fsel_cur, 0, W_GAIN);
          end
        endcase
      end else begin
        j = int'(k) - 3;
        n = j / 4;
        p = j % 4;
        off_n    = sos_off(sw, n);
        off_next = sos_off(sw, n + 1);
        unique case (p)
          0: begin                               // a2 * y[-2] after the c0 shift
            ctrl_n.raddr = haddr(n + 1, 1'b1, par);
            if (!off_n) begin
              ctrl_n.acc_shift = 1'b1;
              addr_n = caddr(fsel_cur, n + 1, W_A2);
            end else if (n == 0) begin           // section 0 off: g_1 * x
              ctrl_n.sel = SEL_HELD;
              addr_n = alt_addr(fsel_cur, n);
            end else begin
              addr_n = caddr(fsel_cur, 0, W_ZERO);
            end
          end
          1: begin                               // a1 * y[-1], section result
            ctrl_n.raddr  = haddr(n + 1, 1'b0, par);
            ctrl_n.wr_acc = 1'b1;
            ctrl_n.waddr  = haddr(n + 1, 1'b1, par);
            ctrl_n.out    = (n == NSOS - 1);
            if (!off_n) begin
              addr_n = caddr(fsel_cur, n + 1, W_A1);
            end else if (n == 0) begin
              addr_n = caddr(fsel_cur, 0, W_ZERO);
            end else begin                       // later section off: g_n * y_(n-1)
              ctrl_n.sel = SEL_BYPASS;
              addr_n = alt_addr(fsel_cur, n);
            end
          end
          2: begin                               // b2 * x[-2] of section n+1
            ctrl_n.raddr = haddr(n + 1, 1'b1, par);
            addr_n = off_next ? caddr(fsel_cur, 0, W_ZERO) : caddr(fsel_cur, n + 2, W_B2);
          end
          default: begin                         // b1 * x[-1] of section n+1
            ctrl_n.raddr = haddr(n + 1, 1'b0, par);
            addr_n = off_next ? caddr(fsel_cur, 0, W_ZERO) : caddr(fsel_cur, n + 2, W_B1);
          end
        endcase
      end
    end else if (int'(k) == LAST + 1) begin
      addr_n = caddr(fsel_cur, 0, W_SW0);
      tag_n  = 2'd1;
    end else if (int'(k) == LAST + 2) begin
      addr_n = caddr(fsel_cur, 0, W_SW1);
      tag_n  = 2'd2;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl      <= CTRL_IDLE;
      coef_addr <= '0;
      fsel_q    <= '0;
      sw_q      <= '0;
      for (int i = 0; i < int'(MEM_DELAY) + 2; i++) tag_d[i] <= 2'd0;
    end else if (ce) begin
      ctrl      <= ctrl_n;
      coef_addr <= addr_n;
      fsel_q    <= fsel_cur;
      tag_d[0]  <= tag_n;
      for (int i = 1; i < int'(MEM_DELAY) + 2; i++) tag_d[i] <= tag_d[i-1];
      sw_q      <= sw;
    end
  end

  assign fsel_active = fsel_q;

endmodule
