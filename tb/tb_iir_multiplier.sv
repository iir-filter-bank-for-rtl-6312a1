// tb_iir_multiplier: checks the pipelined multiplier.
// Random signed operands, including the extreme values, are applied every cycle with
// random clock enables; each product must appear exactly STAGES enabled cycles later
// and equal the 128-bit product computed here.
module tb_iir_multiplier;
  import iir_pkg::*;

  localparam int unsigned STAGES = 2;
  logic clk = 0;
  always #5 clk = ~clk;

  logic ce;
  logic signed [DATA_W-1:0] a;
  logic signed [COEF_W-1:0] b;
  logic signed [PROD_W-1:0] p;
  int checks = 0, failures = 0;
  logic signed [127:0] hist [$];

  iir_multiplier #(.STAGES(STAGES)) dut (.clk, .ce, .a, .b, .p);

  function automatic logic signed [DATA_W-1:0] rnd_a(int i);
    if (i % 17 == 0) return {1'b1, {(DATA_W-1){1'b0}}};
    if (i % 19 == 0) return {1'b0, {(DATA_W-1){1'b1}}};
    return DATA_W'({$urandom, $urandom});
  endfunction

  function automatic logic signed [COEF_W-1:0] rnd_b(int i);
    if (i % 13 == 0) return {1'b1, {(COEF_W-1){1'b0}}};
    return COEF_W'({$urandom, $urandom});
  endfunction

  initial begin
    ce = 0; a = '0; b = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (hist.size() > STAGES) void'(hist.pop_front());
      if (hist.size() == STAGES) begin
        checks++;
        if (p !== PROD_W'(hist[0])) begin
          failures++;
          $display("FAIL i=%0d p=%h expected %h", i, p, PROD_W'(hist[0]));
        end
      end
      ce = ($urandom_range(3, 0) != 0);
      a  = rnd_a(i);
      b  = rnd_b(i);
      if (ce) hist.push_back(128'(a) * 128'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
