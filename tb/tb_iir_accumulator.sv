// tb_iir_accumulator: checks the accumulator and its c0 shifter.
// Random products are added with random clear and shift requests and shift values
// over the whole -32..31 range, with occasional huge products to force clamping.
// The expected value is kept here in 128-bit arithmetic: clear, shift by 2^c0, clamp
// to 67 significant bits, add the product scaled by 2^-43, clamp again. Both the
// accumulator value and the overflow flag are compared after every enabled cycle.
module tb_iir_accumulator;
  import iir_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, ce, add, clr, shift;
  logic [SHIFT_W-1:0] c0;
  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0] acc;
  logic ovf;
  int checks = 0, failures = 0, n_sat = 0, n_neg = 0, n_pos = 0;

  iir_accumulator #(.SHIFT_BITS(6)) dut (.clk, .rst, .ce, .add, .clr, .shift, .c0, .prod, .acc, .ovf);

  typedef logic signed [127:0] w_t;
  w_t model;
  bit mo;

  function automatic w_t clamp67(w_t v, inout bit o);
    w_t lim = w_t'(1) <<< 66;
    if (v >= lim)  begin o = 1; return lim - 1; end
    if (v < -lim)  begin o = 1; return -lim; end
    return v;
  endfunction

  initial begin
    rst = 1; ce = 0; add = 0; clr = 0; shift = 0; c0 = '0; prod = '0;
    model = 0; mo = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int sh;
      @(negedge clk);
      ce    = ($urandom_range(4, 0) != 0);
      add   = ($urandom_range(5, 0) != 0);
      clr   = ($urandom_range(6, 0) == 0);
      shift = ($urandom_range(3, 0) == 0);
      sh    = $urandom_range(63, 0) - 32;
      c0    = {$urandom_range(3, 0) == 0 ? 2'b10 : 2'b00, 6'(sh)};   // upper bits ignored
      prod  = PROD_W'({$urandom, $urandom, $urandom, $urandom}) >>> $urandom_range(60, 40);
      if (i % 50 == 7) prod = {2'b01, {(PROD_W-2){1'b0}}};
      if (ce && add) begin
        w_t base;
        mo = 0;
        if (clr) base = 0;
        else if (shift) begin
          base = (sh >= 0) ? (model <<< sh) : (model >>> (-sh));
          base = clamp67(base, mo);
          if (sh < 0) n_neg++; else n_pos++;
        end else base = model;
        model = clamp67(base + (w_t'(prod) >>> 43), mo);
        if (mo) n_sat++;
      end else if (ce) begin
        mo = 0;
      end
      @(posedge clk);
      #1;
      checks++;
      if (acc !== ACC_W'(model) || ovf !== mo) begin
        failures++;
        $display("FAIL i=%0d acc=%h ovf=%0d expected %h %0d", i, acc, ovf, ACC_W'(model), mo);
      end
    end
    checks += 3;
    if (n_sat == 0 || n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
