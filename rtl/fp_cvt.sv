// fp_cvt: conversion between FP32 and FP64 for the XACC single-element
// transfer (ALS), whose source and destination types may differ.
//
// to64 = 1: in[31:0] holds an FP32 value; out is the exact FP64 value
// (subnormal inputs are normalised). to64 = 0: in is FP64; out[31:0] is the
// FP32 value rounded with rm (RISC-V encodings, other codes round as RNE),
// out[63:32] is zero. NaNs become the canonical quiet NaN, a signalling NaN
// raises NV; narrowing raises OF, UF (tiny and inexact, tininess judged on
// the rounded result) and NX as usual. Purely combinational.
//
// From the architecture: ALS names a source and a destination type and a
// rounding mode for the conversion between them. The conversion rules
// (exact widening, RISC-V style narrowing and flags) are choices made here.
module fp_cvt (
  input  logic [63:0]      in,
  input  logic             to64,
  input  xem_pkg::rm_e     rm,
  output logic [63:0]      out,
  output xem_pkg::fflags_t flags
);
  import xem_pkg::*;

  logic        s;
  logic [7:0]  e8;
  logic [22:0] f23;
  logic [10:0] e11;
  logic [51:0] f52;
  logic [22:0] fsh;
  int          lz, e, sh, efin;
  logic [53:0] m;      // 53-bit significand and one guard position below
  logic [53:0] msh;
  logic        st, g, up, inexact;
  logic [24:0] mr;

  always_comb begin
    out   = '0;
    flags = '0;
    s     = to64 ? in[31] : in[63];
    e8    = in[30:23];
    f23   = in[22:0];
    e11   = in[62:52];
    f52   = in[51:0];
    lz = 0; e = 0; sh = 0; efin = 0; m = '0; msh = '0; st = 1'b0; g = 1'b0;
    up = 1'b0; inexact = 1'b0; mr = '0; fsh = '0;
    if (to64) begin
      if (e8 == '1) begin
        if (f23 == '0) out = {s, 11'h7FF, 52'b0};
        else begin
          out      = 64'h7FF8_0000_0000_0000;
          flags.nv = !f23[22];
        end
      end else if (e8 == '0) begin
        if (f23 == '0) out = {s, 63'b0};
        else begin
          for (int i = 0; i < 23; i++) if (f23[i]) lz = 22 - i;
          fsh = f23 << (lz + 1);
          out = {s, 11'(896 - lz), fsh, 29'b0};
        end
      end else begin
        out = {s, 11'(int'(e8) + 896), f23, 29'b0};
      end
    end else begin
      if (e11 == '1) begin
        if (f52 == '0) out = {32'b0, s, 8'hFF, 23'b0};
        else begin
          out      = 64'h0000_0000_7FC0_0000;
          flags.nv = !f52[51];
        end
      end else if (e11 == '0 && f52 == '0) begin
        out = {32'b0, s, 31'b0};
      end else begin
        m = {(e11 != '0), f52, 1'b0};
        e = ((e11 == '0) ? 1 : int'(e11)) - 896;
        sh = (e < 1) ? 1 - e : 0;
        if (sh > 54) begin
          msh = '0;
          st  = |m;
        end else begin
          msh = m >> sh;
          st  = |(m & ~({54{1'b1}} << sh));
        end
        // kept significand msh[53:30], guard msh[29], sticky below
        g       = msh[29];
        st      = st | (|msh[28:0]);
        inexact = g | st;
        case (rm)
          RM_RTZ:  up = 1'b0;
          RM_RDN:  up = s & inexact;
          RM_RUP:  up = !s & inexact;
          RM_RMM:  up = g;
          default: up = g & (st | msh[30]);
        endcase
        mr   = {1'b0, msh[53:30]} + 25'(up);
        efin = (e < 1) ? 0 : e;
        if (mr[24]) begin
          efin = efin + 1;
          mr   = mr >> 1;
        end else if (mr[23] && efin == 0) begin
          efin = 1;
        end
        if (efin >= 255) begin
          flags.of = 1'b1;
          flags.nx = 1'b1;
          if ((rm == RM_RTZ) || (rm == RM_RDN && !s) || (rm == RM_RUP && s))
            out = {32'b0, s, 8'hFE, 23'h7FFFFF};
          else
            out = {32'b0, s, 8'hFF, 23'b0};
        end else begin
          out      = {32'b0, s, 8'(efin), mr[22:0]};
          flags.nx = inexact;
          flags.uf = inexact && (e < 1) && (efin == 0 || !mr[23] || (e < 0));
        end
      end
    end
  end

endmodule
