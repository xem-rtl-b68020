// dfpu: double-precision FPU of an AFPU.
//
// In FP64 mode it computes one FP64 operation on the 64-bit operands; in
// FP32 mode the operands each hold two FP32 numbers and it computes the two
// element-wise ("vectored") FP32 operations lo(a) op lo(b) and
// hi(a) op hi(b). These are the diagonal products of the AFPU's 2x2 block
// and go to XACC0 and XACC3. The FP32 half-lanes are separate datapaths
// here; the FP64 and FP32 lanes share the issue signals and the pipeline.
//
// Interface: in_valid/op/fp32/rm with operands a, b and accumulator c, all
// sampled in the issue cycle. out_valid, res and flags appear STAGES-1
// cycles later (see fpu_lane); the caller's register write completes the
// STAGES-deep pipeline. Flags are the OR of the active lanes.
//
// From the architecture: one FP64 or two element-wise FP32 operations, add,
// sub, mul and MAC, four pipeline stages. Choices made here: separate FP32
// half-lanes rather than a shared split datapath, and the placement of all
// arithmetic ahead of the registers (a synthesis tool retimes it).
module dfpu #(
  parameter int unsigned STAGES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  xem_pkg::xop_e    op,
  input  logic             fp32,
  input  xem_pkg::rm_e     rm,
  input  logic [63:0]      a,
  input  logic [63:0]      b,
  input  logic [63:0]      c,
  output logic             out_valid,
  output logic [63:0]      res,
  output xem_pkg::fflags_t flags
);
  import xem_pkg::*;

  logic        v64, vlo, vhi, fp32_q_last;
  logic [63:0] r64;
  logic [31:0] rlo, rhi;
  fflags_t     f64, flo, fhi;
  logic [STAGES-2:0] mode_q;

  fpu_lane #(.EW(11), .MW(52), .STAGES(STAGES)) u_d64 (
    .clk, .rst_n, .in_valid(in_valid && !fp32), .op, .rm, .a, .b, .c,
    .out_valid(v64), .res(r64), .flags(f64));
  fpu_lane #(.EW(8), .MW(23), .STAGES(STAGES)) u_s_lo (
    .clk, .rst_n, .in_valid(in_valid && fp32), .op, .rm, .a(a[31:0]), .b(b[31:0]), .c(c[31:0]),
    .out_valid(vlo), .res(rlo), .flags(flo));
  fpu_lane #(.EW(8), .MW(23), .STAGES(STAGES)) u_s_hi (
    .clk, .rst_n, .in_valid(in_valid && fp32), .op, .rm, .a(a[63:32]), .b(b[63:32]), .c(c[63:32]),
    .out_valid(vhi), .res(rhi), .flags(fhi));

  // mode of the operation in each pipeline stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= '0;
    else        mode_q <= {mode_q[STAGES-3:0], fp32};
  end
  assign fp32_q_last = mode_q[STAGES-2];

  assign out_valid = fp32_q_last ? (vlo && vhi) : v64;
  assign res       = fp32_q_last ? {rhi, rlo} : r64;
  assign flags     = fp32_q_last ? (flo | fhi) : f64;

endmodule
