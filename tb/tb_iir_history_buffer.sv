// tb_iir_history_buffer: checks the history memory.
// Random reads and writes with random clock enables are compared with an array kept
// here: read data appears one enabled cycle after the address, a read of the address
// being written returns the old value, unwritten entries read as zero, and a clear
// makes every entry read as zero and discards writes while it is high.
module tb_iir_history_buffer;
  import iir_pkg::*;

  localparam int unsigned AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic ce, clear, we;
  logic [AW-1:0] raddr, waddr;
  logic signed [DATA_W-1:0] rdata, wdata;
  logic [DATA_W-1:0] ref_mem [1 << AW];
  logic [DATA_W-1:0] expect_q;
  int checks = 0, failures = 0, n_clear = 0;

  iir_history_buffer #(.AW(AW)) dut (.clk, .ce, .clear, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    ce = 1; clear = 1; we = 0; raddr = '0; waddr = '0; wdata = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    @(negedge clk);
    clear = 0;
    expect_q = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL i=%0d rdata=%h expected %h", i, rdata, expect_q);
        end
      end
      ce    = ($urandom_range(5, 0) != 0);
      clear = ($urandom_range(300, 0) == 0);
      we    = 1'($urandom_range(1, 0));
      raddr = AW'($urandom);
      waddr = ($urandom_range(3, 0) == 0) ? raddr : AW'($urandom);
      wdata = 52'({$urandom, $urandom});
      if (ce) expect_q = ref_mem[raddr];
      if (clear) begin
        foreach (ref_mem[j]) ref_mem[j] = '0;
        n_clear++;
      end else if (ce && we) ref_mem[waddr] = wdata;
    end
    checks++;
    if (n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
