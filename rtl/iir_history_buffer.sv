// iir_history_buffer: history memory of one filter lane.
//
// Holds the two previous values (-1 and -2) of every section input. Because the output
// of section n is the input of section n+1, one entry pair per section boundary is
// enough: index 0 holds the (gain-scaled) filter input history, index n+1 the output
// history of section n. The address is {index, h}. The microcode flips h with the
// odd/even filter cycle, so the slot written as "new -2 value" in one filter cycle is
// read as the -1 value in the next and no value is ever copied.
//
// Interface: one synchronous read port (data one clock-enabled cycle after the
// address) and one write port. A read and a write of the same address in one cycle
// return the old data. 'clear' empties the buffer: while it is high all entries read
// as zero and writes are discarded. The per-entry valid bits that implement this are
// this design's choice; the specification only says that the reset clears the filter.
module iir_history_buffer
  import iir_pkg::*;
#(
  parameter int unsigned AW = 5      // {section index, h}; Cycles-1 bits
) (
  input  logic                     clk,
  input  logic                     ce,
  input  logic                     clear,
  input  logic [AW-1:0]            raddr,
  output logic signed [DATA_W-1:0] rdata,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic signed [DATA_W-1:0] wdata
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]  valid;

  always_ff @(posedge clk) begin
    if (ce) begin
      rdata <= valid[raddr] ? mem[raddr] : '0;
      if (we) mem[waddr] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (clear)         valid <= '0;
    else if (ce && we) valid[waddr] <= 1'b1;
  end

endmodule
