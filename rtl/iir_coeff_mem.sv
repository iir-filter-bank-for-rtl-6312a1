// iir_coeff_mem: coefficient memory of the filter bank.
//
// 2^DEPTH_BITS words of 64 bits. Port A is the filter side: read only, 64 bits wide,
// read data MEM_DELAY+1 clock-enabled cycles after the address (MEM_DELAY = 0: next
// cycle, 1: extra output register). Port B is the host side, B_WIDTH (32 or 64) bits
// wide on its own clock; with 32 bits, B address bit 0 selects the lower (0) or upper
// (1) half of a 64-bit word. Port B read data follows MEM_REG cycles after the address
// (1: memory latch only, 2: extra output register). With MEM_TYPE = MEM_SPROM the
// memory is a ROM: port B writes are ignored and the contents come from MEM_FILE.
// The contents start as zero unless MEM_FILE (hex, one 64-bit word per line) is given.
//
// The organisation by filter sets, the word widths and the parameters follow the
// specification; the half-word order on port B is this design's choice.
module iir_coeff_mem
  import iir_pkg::*;
#(
  parameter mem_type_e   MEM_TYPE   = MEM_TDPRAM,
  parameter int unsigned DEPTH_BITS = 10,
  parameter int unsigned MEM_DELAY  = 0,
  parameter string       MEM_FILE   = "none",
  parameter int unsigned MEM_REG    = 1,
  parameter int unsigned B_WIDTH    = 32,
  localparam int unsigned RATIO     = WORD_W / B_WIDTH,
  localparam int unsigned BSEL_W    = (RATIO > 1) ? $clog2(RATIO) : 1,
  localparam int unsigned BADDR_W   = DEPTH_BITS + ((RATIO > 1) ? BSEL_W : 0)
) (
  // port A: filter side
  input  logic                  clk,
  input  logic                  ce,
  input  logic [DEPTH_BITS-1:0] addr_a,
  output logic [WORD_W-1:0]     rdata_a,
  // port B: host side
  input  logic                  clk_b,
  input  logic                  en_b,
  input  logic                  we_b,
  input  logic [BADDR_W-1:0]    addr_b,
  input  logic [B_WIDTH-1:0]    wdata_b,
  output logic [B_WIDTH-1:0]    rdata_b
);

  localparam int unsigned DEPTH = 1 << DEPTH_BITS;

  initial begin
    if (B_WIDTH != 32 && B_WIDTH != 64) $error("B_WIDTH must be 32 or 64");
    if (MEM_TYPE == MEM_TDPRAM && DEPTH_BITS < 10) $error("TDPRAM needs DEPTH_BITS >= 10");
    if (MEM_TYPE == MEM_SPROM && DEPTH_BITS < 9) $error("SPROM needs DEPTH_BITS >= 9");
    if (MEM_DELAY > 1) $error("MEM_DELAY must be 0 or 1");
    if (MEM_REG < 1 || MEM_REG > 2) $error("MEM_REG must be 1 or 2");
  end

  logic [WORD_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (MEM_FILE != "none") $readmemh(MEM_FILE, mem);
  end

  // ---- port A ----
  logic [WORD_W-1:0] qa;
  always_ff @(posedge clk) begin
    if (ce) qa <= mem[addr_a];
  end

  if (MEM_DELAY == 0) begin : g_a_direct
    assign rdata_a = qa;
  end else begin : g_a_reg
    always_ff @(posedge clk) begin
      if (ce) rdata_a <= qa;
    end
  end

  // ---- port B ----
  logic [DEPTH_BITS-1:0] wa_b;
  logic [BSEL_W-1:0]     hsel_b, hsel_q;
  logic [WORD_W-1:0]     qb;
  logic [B_WIDTH-1:0]    qb_half;

  if (RATIO > 1) begin : g_b_split
    assign wa_b   = addr_b[BADDR_W-1:BSEL_W];
    assign hsel_b = addr_b[BSEL_W-1:0];
  end else begin : g_b_full
    assign wa_b   = addr_b[DEPTH_BITS-1:0];
    assign hsel_b = '0;
  end

  always_ff @(posedge clk_b) begin
    if (en_b) begin
      if (we_b && MEM_TYPE == MEM_TDPRAM)
        mem[wa_b][int'(hsel_b)*B_WIDTH +: B_WIDTH] <= wdata_b;
      qb     <= mem[wa_b];
      hsel_q <= hsel_b;
    end
  end

  assign qb_half = qb[int'(hsel_q)*B_WIDTH +: B_WIDTH];

  if (MEM_REG == 1) begin : g_b_latch
    assign rdata_b = qb_half;
  end else begin : g_b_reg
    always_ff @(posedge clk_b) rdata_b <= qb_half;
  end

endmodule
