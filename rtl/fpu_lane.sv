// fpu_lane: one pipelined floating-point lane (add, sub, mul or multiply-
// accumulate) in a parameterised IEEE format.
//
// The XMM operation field is mapped onto the fused core: ADD is a*1 + b,
// SUB is a*1 - b, MUL is a*b with no addend, MAC is a*b + c, where c is the
// accumulator (a pipeline register PREG or XACC) read in the issue cycle.
// The result and its flags travel through STAGES-1 registers; the enclosing
// AFPU writes them into PREG or XACC at the next clock edge, which is the
// last of the STAGES pipeline stages. An operation issued in cycle t is thus
// visible in its destination register in cycle t+STAGES.
// Data registers only load when a valid operation moves through them.
//
// From the architecture: four-cycle latency for every operation. The mapping
// of ADD/SUB onto the fused core and the register arrangement are choices
// made here.
module fpu_lane #(
  parameter int unsigned EW     = 11,
  parameter int unsigned MW     = 52,
  parameter int unsigned STAGES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  xem_pkg::xop_e     op,
  input  xem_pkg::rm_e      rm,
  input  logic [EW+MW:0]    a,
  input  logic [EW+MW:0]    b,
  input  logic [EW+MW:0]    c,
  output logic              out_valid,
  output logic [EW+MW:0]    res,
  output xem_pkg::fflags_t  flags
);
  import xem_pkg::*;

  localparam logic [EW+MW:0] ONE = {2'b00, {(EW-1){1'b1}}, {MW{1'b0}}};
  localparam int unsigned    NR  = STAGES - 1;

  logic [EW+MW:0] fx, fy, fz, fres;
  logic           fno_add;
  fflags_t        fflg;

  always_comb begin
    fx      = a;
    fy      = b;
    fz      = c;
    fno_add = 1'b0;
    unique case (op)
      OP_ADD: begin fy = ONE; fz = b; end
      OP_SUB: begin fy = ONE; fz = {~b[EW+MW], b[EW+MW-1:0]}; end
      OP_MUL: fno_add = 1'b1;
      OP_MAC: ;
    endcase
  end

  fp_fma #(.EW(EW), .MW(MW)) u_fma (
    .x(fx), .y(fy), .z(fz), .no_add(fno_add), .rm(rm), .res(fres), .flags(fflg)
  );

  logic [NR-1:0]          v_q;
  logic [EW+MW:0]         r_q [NR];
  fflags_t                f_q [NR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[NR-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      r_q[0] <= fres;
      f_q[0] <= fflg;
    end
    for (int i = 1; i < int'(NR); i++) begin
      if (v_q[i-1]) begin
        r_q[i] <= r_q[i-1];
        f_q[i] <= f_q[i-1];
      end
    end
  end

  assign out_valid = v_q[NR-1];
  assign res       = r_q[NR-1];
  assign flags     = f_q[NR-1];

endmodule
