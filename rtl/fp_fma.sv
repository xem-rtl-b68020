// fp_fma: IEEE-754 binary floating-point fused multiply-add, x*y + z, with a
// single rounding. It is the arithmetic core of every DFPU and SFPU lane.
//
// Add and subtract are issued as x*1 + z and x*1 + (-z); multiply sets
// no_add, which removes the addend so that signed zeros come out right.
// The format is a parameter (EW exponent bits, MW fraction bits): the FP64
// lane uses 11/52, the FP32 lanes 8/23.
//
// How it works: subnormal inputs are first normalised. The exact 2P-bit
// product and the addend are placed in a window of 4P+4 bits; the operand
// with the smaller exponent is shifted right, and anything shifted out of
// the window is kept as a sticky bit. After the add or subtract the leading
// one sets the result exponent, the LSB position is clamped at the
// subnormal boundary, and the result is rounded once with the RISC-V
// rounding mode (RNE, RTZ, RDN, RUP, RMM; other codes round as RNE).
// Flags follow RISC-V: NaN results are the canonical quiet NaN, tininess
// is detected after rounding, an exact zero sum is +0 (-0 under RDN).
//
// Timing: purely combinational; the enclosing FPU registers its output.
//
// From the architecture: FP64/FP32 add, sub, mul and MAC, the four flags
// NV/OF/UF/NX and the RISC-V rounding modes. The fused (single rounding)
// MAC follows the FMA the cells perform; full subnormal support, tininess
// after rounding and canonical NaNs are choices made here, taken from the
// RISC-V floating-point rules.
module fp_fma #(
  parameter int unsigned EW = 11,
  parameter int unsigned MW = 52
) (
  input  logic [EW+MW:0]    x,
  input  logic [EW+MW:0]    y,
  input  logic [EW+MW:0]    z,
  input  logic              no_add,
  input  xem_pkg::rm_e      rm,
  output logic [EW+MW:0]    res,
  output xem_pkg::fflags_t  flags
);
  import xem_pkg::*;

  localparam int P    = int'(MW) + 1;           // precision
  localparam int BIAS = (1 << (EW - 1)) - 1;
  localparam int EMAX = (1 << EW) - 1;          // all-ones exponent field
  localparam int GB   = 2 * P + 3;              // zero bits below the significand
  localparam int WX   = 4 * P + 4;              // alignment window

  localparam logic [EW+MW:0] QNAN = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};

  typedef struct packed {
    logic               s;
    logic               zero;
    logic               inf;
    logic               nan;
    logic               snan;
    logic signed [31:0] e;   // biased exponent after normalisation (may be < 1)
    logic [P-1:0]       m;   // significand with the leading one at bit P-1
  } unp_t;

  function automatic unp_t unpack(input logic [EW+MW:0] v);
    unp_t          u;
    logic [EW-1:0] ef;
    logic [MW-1:0] f;
    int            lz;
    logic          found;
    ef     = v[MW +: EW];
    f      = v[MW-1:0];
    u.s    = v[EW+MW];
    u.zero = (ef == '0) && (f == '0);
    u.inf  = (ef == '1) && (f == '0);
    u.nan  = (ef == '1) && (f != '0);
    u.snan = u.nan && !f[MW-1];
    if (ef == '0) begin
      lz    = 0;
      found = 1'b0;
      for (int bit_i = int'(MW) - 1; bit_i >= 0; bit_i--) begin
        if (!found) begin
          if (f[bit_i]) found = 1'b1;
          else      lz    = lz + 1;
        end
      end
      u.m = {1'b0, f} << (lz + 1);
      u.e = -lz;
    end else begin
      u.m = {1'b1, f};
      u.e = 32'(ef);
    end
    return u;
  endfunction

  function automatic logic round_up(input rm_e mode, input logic sign,
                                    input logic lsb, input logic g, input logic s);
    case (mode)
      RM_RTZ:  return 1'b0;
      RM_RDN:  return sign & (g | s);
      RM_RUP:  return ~sign & (g | s);
      RM_RMM:  return g;
      default: return g & (s | lsb);
    endcase
  endfunction

  unp_t               ux, uy, uz;
  logic               sp;
  logic [2*P-1:0]     mp;
  logic signed [31:0] ep, ec, eb, d, eres, klsb, sh, efin, epre;
  logic [WX-1:0]      xp, xc, xb, xs, xsh, sum;
  logic [WX:0]        sum2;
  logic [MW+2:0]      t;
  logic               sb, ss, rs, sticky, sticky2, eff_sub;
  logic               g, s, up, up2, inexact, tiny;
  logic [MW:0]        m;
  logic [MW+1:0]      mr;
  logic [MW-1:0]      frac;
  int                 lead;

  always_comb begin
    ux      = unpack(x);
    uy      = unpack(y);
    uz      = unpack(z);
    if (no_add) begin
      uz      = '0;
      uz.zero = 1'b1;
      uz.s    = ux.s ^ uy.s;
    end
    sp      = ux.s ^ uy.s;
    res     = '0;
    flags   = '0;
    // defaults for the general path
    mp = '0; ep = '0; ec = '0; eb = '0; d = '0; eres = '0; klsb = '0; sh = '0;
    efin = '0; epre = '0; xp = '0; xc = '0; xb = '0; xs = '0; xsh = '0; sum = '0;
    sum2 = '0; t = '0; sb = 1'b0; ss = 1'b0; rs = 1'b0; sticky = 1'b0;
    sticky2 = 1'b0; eff_sub = 1'b0; g = 1'b0; s = 1'b0; up = 1'b0; up2 = 1'b0;
    inexact = 1'b0; tiny = 1'b0; m = '0; mr = '0; frac = '0; lead = 0;

    flags.nv = ux.snan | uy.snan | uz.snan;
    if (ux.nan || uy.nan || uz.nan) begin
      res = QNAN;
    end else if ((ux.inf || uy.inf) && (ux.zero || uy.zero)) begin
      res      = QNAN;                      // inf * 0
      flags.nv = 1'b1;
    end else if ((ux.inf || uy.inf) && uz.inf && (sp != uz.s)) begin
      res      = QNAN;                      // inf - inf
      flags.nv = 1'b1;
    end else if (ux.inf || uy.inf) begin
      res = {sp, {EW{1'b1}}, {MW{1'b0}}};
    end else if (uz.inf) begin
      res = {uz.s, {EW{1'b1}}, {MW{1'b0}}};
    end else if (ux.zero || uy.zero) begin
      if (uz.zero) res = {(sp == uz.s) ? sp : (rm == RM_RDN), {(EW+MW){1'b0}}};
      else         res = z;
    end else begin
      // ---- exact product and alignment ----
      mp = ux.m * uy.m;
      ep = ux.e + uy.e - BIAS;
      xp = {1'b0, mp, {GB{1'b0}}};
      if (uz.zero) begin
        ec = ep;
        xc = '0;
      end else begin
        ec = uz.e;
        xc = {1'b0, (2*P)'({uz.m, {MW{1'b0}}}), {GB{1'b0}}};
      end
      if (ep >= ec) begin
        eb = ep; d = ep - ec; xb = xp; xs = xc; sb = sp;   ss = uz.s;
      end else begin
        eb = ec; d = ec - ep; xb = xc; xs = xp; sb = uz.s; ss = sp;
      end
      if (d >= WX) begin
        xsh    = '0;
        sticky = |xs;
      end else begin
        xsh    = xs >> d;
        sticky = |(xs & ~({WX{1'b1}} << d));
      end
      xsh[0]  = xsh[0] | sticky;
      eff_sub = sb ^ ss;
      if (!eff_sub) begin
        sum = xb + xsh;
        rs  = sb;
      end else if (xb >= xsh) begin
        sum = xb - xsh;
        rs  = sb;
      end else begin
        sum = xsh - xb;
        rs  = ss;
      end

      if (sum == '0) begin
        res = {(rm == RM_RDN), {(EW+MW){1'b0}}};   // exact cancellation
      end else begin
        // ---- normalise ----
        for (int i = 0; i < WX; i++) if (sum[i]) lead = i;
        eres = lead - GB + eb - 2 * int'(MW);
        klsb = lead - int'(MW);
        if (GB + 1 + int'(MW) - eb > klsb) klsb = GB + 1 + int'(MW) - eb;
        sum2 = {sum, 1'b0};
        sh   = klsb - 1;
        if (sh >= WX + 1) begin
          t       = '0;
          sticky2 = |sum2;
        end else begin
          t       = (MW+3)'(sum2 >> sh);
          sticky2 = |(sum2 & ~({(WX+1){1'b1}} << sh));
        end
        // ---- round ----
        m       = t[MW+2:2];
        g       = t[1];
        s       = t[0] | sticky2;
        inexact = g | s;
        up      = round_up(rm, rs, m[0], g, s);
        mr      = {1'b0, m} + (MW+2)'(up);
        epre    = (eres >= 1) ? eres : 0;
        if (mr[MW+1]) begin
          frac = '0;
          efin = epre + 1;
        end else if (mr[MW]) begin
          frac = mr[MW-1:0];
          efin = (epre < 1) ? 1 : epre;
        end else begin
          frac = mr[MW-1:0];
          efin = 0;
        end
        // tininess after rounding: unbounded-exponent rounding stays below 2^emin
        up2  = round_up(rm, rs, t[1], t[0], sticky2);
        tiny = (eres < 1) && !((eres == 0) && (&t[MW+1:1]) && up2);
        if (efin >= EMAX) begin
          flags.of = 1'b1;
          flags.nx = 1'b1;
          if ((rm == RM_RTZ) || (rm == RM_RDN && !rs) || (rm == RM_RUP && rs))
            res = {rs, EW'(EMAX - 1), {MW{1'b1}}};
          else
            res = {rs, {EW{1'b1}}, {MW{1'b0}}};
        end else begin
          res      = {rs, efin[EW-1:0], frac};
          flags.nx = inexact;
          flags.uf = inexact & tiny;
        end
      end
    end
  end

endmodule
