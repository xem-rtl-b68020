// axsp: AXSP, the user-programmable scratchpad data memory of a XEMIS
// (256 KB), from which the issuing core fetches the XMM vector operands.
//
// Organised as 256-bit lines. Two read ports (A and B) return a whole
// 32-byte line so that both XMM operands can be fetched in the same cycle;
// the low five address bits are ignored (operands are line aligned). Port C
// reads or writes one 64-bit word (address bits 4:3 pick the word, bits
// 2:0 are ignored) and serves XACC load/store transfers and external
// fills. All ports are synchronous: read data appears the cycle after the
// enable and is held until the next read on that port. A read on A or B in
// the cycle of a port C write to the same line returns the old data.
//
// From the architecture: a 256 KB user-programmable scratchpad from which XMM
// operands are read. Its ports, widths, latency and the line alignment of
// operands are choices made here; it is written as a plain array that a
// synthesis flow maps to memory macros.
module axsp #(
  parameter int unsigned SIZE_BYTES = 256 * 1024
) (
  input  logic                          clk,
  input  logic                          re_a,
  input  logic [$clog2(SIZE_BYTES)-1:0] addr_a,
  output logic [255:0]                  rdata_a,
  input  logic                          re_b,
  input  logic [$clog2(SIZE_BYTES)-1:0] addr_b,
  output logic [255:0]                  rdata_b,
  input  logic                          en_c,
  input  logic                          we_c,
  input  logic [$clog2(SIZE_BYTES)-1:0] addr_c,
  input  logic [63:0]                   wdata_c,
  output logic [63:0]                   rdata_c
);
  localparam int unsigned AW    = $clog2(SIZE_BYTES);
  localparam int unsigned LINES = SIZE_BYTES / 32;

  logic [255:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (re_a) rdata_a <= mem[addr_a[AW-1:5]];
    if (re_b) rdata_b <= mem[addr_b[AW-1:5]];
    if (en_c) begin
      if (we_c) mem[addr_c[AW-1:5]][64 * addr_c[4:3] +: 64] <= wdata_c;
      else      rdata_c <= mem[addr_c[AW-1:5]][64 * addr_c[4:3] +: 64];
    end
  end

endmodule
