// sfpu: single-precision FPU of an AFPU, used in FP32 mode only.
//
// It computes the two off-diagonal products of the AFPU's 2x2 FP32 block.
// Operand B has its 32-bit halves swapped, so lane 0 computes
// a0 op hi(b) and lane 1 computes a1 op lo(b). With a0 = lo(A), a1 = hi(A)
// these are lo(A)*hi(B) (stored in XACC2) and hi(A)*lo(B) (stored in XACC1).
// The two A inputs are separate so that the AFPU can feed XACC2 and XACC1
// as operand A in XACC-operand (AO) mode.
//
// Interface and timing as dfpu: inputs sampled in the issue cycle, results
// after STAGES-1 register stages, flags the OR of both lanes.
//
// From the architecture: two FP32 operations with the halves of B swapped,
// results to XACC1 and XACC2, four stages. The separate A inputs and the
// pipeline arrangement are choices made here.
module sfpu #(
  parameter int unsigned STAGES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  xem_pkg::xop_e    op,
  input  xem_pkg::rm_e     rm,
  input  logic [31:0]      a0,
  input  logic [31:0]      a1,
  input  logic [63:0]      b,
  input  logic [31:0]      c0,
  input  logic [31:0]      c1,
  output logic             out_valid,
  output logic [31:0]      res0,
  output logic [31:0]      res1,
  output xem_pkg::fflags_t flags
);
  import xem_pkg::*;

  logic    v0, v1;
  fflags_t f0, f1;

  fpu_lane #(.EW(8), .MW(23), .STAGES(STAGES)) u_l0 (
    .clk, .rst_n, .in_valid, .op, .rm, .a(a0), .b(b[63:32]), .c(c0),
    .out_valid(v0), .res(res0), .flags(f0));
  fpu_lane #(.EW(8), .MW(23), .STAGES(STAGES)) u_l1 (
    .clk, .rst_n, .in_valid, .op, .rm, .a(a1), .b(b[31:0]), .c(c1),
    .out_valid(v1), .res(res1), .flags(f1));

  assign out_valid = v0 && v1;
  assign flags     = f0 | f1;

endmodule
