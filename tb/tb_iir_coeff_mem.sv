// tb_iir_coeff_mem: checks the coefficient memory.
// Two memories are tested: a 32-bit host port with the filter-side output register
// (MEM_DELAY 1) and the host-side output register (MEM_REG 2), and a 64-bit host port
// with neither. Random host writes (half words on the 32-bit port) build an image kept
// here; the filter port must then return every written word with its latency, and
// host reads must return the same data. A ROM instance must ignore host writes.
module tb_iir_coeff_mem;
  import iir_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int unsigned DB = 10;
  int checks = 0, failures = 0;

  // instance 1: 32-bit host port, both output registers
  logic [DB-1:0] a1;
  logic [63:0]   q1;
  logic          en1, we1;
  logic [DB:0]   ab1;
  logic [31:0]   wd1, rd1;
  iir_coeff_mem #(.DEPTH_BITS(DB), .MEM_DELAY(1), .MEM_REG(2), .B_WIDTH(32)) m1 (
    .clk, .ce (1'b1), .addr_a (a1), .rdata_a (q1),
    .clk_b (clk), .en_b (en1), .we_b (we1), .addr_b (ab1), .wdata_b (wd1), .rdata_b (rd1));

  // instance 2: 64-bit host port, no extra registers
  logic [DB-1:0] a2;
  logic [63:0]   q2;
  logic          en2, we2;
  logic [DB-1:0] ab2;
  logic [63:0]   wd2, rd2;
  iir_coeff_mem #(.DEPTH_BITS(DB), .B_WIDTH(64)) m2 (
    .clk, .ce (1'b1), .addr_a (a2), .rdata_a (q2),
    .clk_b (clk), .en_b (en2), .we_b (we2), .addr_b (ab2), .wdata_b (wd2), .rdata_b (rd2));

  // instance 3: ROM
  logic [63:0] q3, rd3;
  logic [DB-1:0] a3;
  logic we3;
  iir_coeff_mem #(.MEM_TYPE(MEM_SPROM), .DEPTH_BITS(DB), .B_WIDTH(64)) m3 (
    .clk, .ce (1'b1), .addr_a (a3), .rdata_a (q3),
    .clk_b (clk), .en_b (1'b1), .we_b (we3), .addr_b (a3), .wdata_b ('1), .rdata_b (rd3));

  logic [63:0] img1 [1 << DB], img2 [1 << DB];

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    en1 = 0; we1 = 0; ab1 = '0; wd1 = '0; a1 = '0;
    en2 = 0; we2 = 0; ab2 = '0; wd2 = '0; a2 = '0; a3 = '0; we3 = 0;
    for (int i = 0; i < (1 << DB); i++) begin img1[i] = '0; img2[i] = '0; end
    // host writes
    for (int i = 0; i < 600; i++) begin
      int w;
      logic h;
      logic [31:0] d32;
      logic [63:0] d64;
      w = $urandom_range((1 << DB) - 1, 0);
      h = 1'($urandom_range(1, 0));
      d32 = $urandom;
      d64 = {$urandom, $urandom};
      @(negedge clk);
      en1 = 1; we1 = 1; ab1 = {DB'(w), h}; wd1 = d32;
      en2 = 1; we2 = 1; ab2 = DB'(w); wd2 = d64;
      if (h) img1[w][63:32] = d32; else img1[w][31:0] = d32;
      img2[w] = d64;
    end
    @(negedge clk);
    en1 = 0; we1 = 0; en2 = 0; we2 = 0;
    // filter-side reads
    for (int i = 0; i < 300; i++) begin
      int w;
      w = (i < 100) ? i : $urandom_range((1 << DB) - 1, 0);
      @(negedge clk);
      a1 = DB'(w); a2 = DB'(w);
      @(negedge clk);
      chk(q2, img2[w], "port A, no delay");
      @(negedge clk);
      chk(q1, img1[w], "port A, delay 1");
    end
    // host-side reads
    for (int i = 0; i < 200; i++) begin
      int w;
      logic h;
      w = $urandom_range((1 << DB) - 1, 0);
      h = 1'($urandom_range(1, 0));
      @(negedge clk);
      en1 = 1; ab1 = {DB'(w), h}; en2 = 1; ab2 = DB'(w);
      @(negedge clk);
      en1 = 0; en2 = 0;
      chk(rd2, img2[w], "port B 64, latch");
      @(negedge clk);
      chk(64'(rd1), h ? 64'(img1[w][63:32]) : 64'(img1[w][31:0]), "port B 32, register");
    end
    // ROM ignores writes
    @(negedge clk);
    a3 = 10'd5; we3 = 1;
    @(negedge clk);
    we3 = 0;
    @(negedge clk);
    chk(q3, 64'd0, "ROM after write attempt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
