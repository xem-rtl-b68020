// tb_fp_pkg: helpers shared by the XEM testbenches to build and read
// floating-point bit patterns from simulator reals. f32 conversions are
// exact for values that a single-precision number can hold; d2f rounds a
// normal double to nearest-even single precision.
//
// Testbench support only; no hardware behaviour is defined here.
package tb_fp_pkg;

  function automatic logic [63:0] r2d(input real r);
    return $realtobits(r);
  endfunction

  function automatic real d2r(input logic [63:0] d);
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] b;
    logic [52:0] mant;
    logic [24:0] m24;
    int          e;
    b = $realtobits(r);
    if (b[62:0] == '0) return {b[63], 31'b0};
    mant = {1'b1, b[51:0]};
    e    = int'(b[62:52]) - 1023 + 127;
    m24  = {1'b0, mant[52:29]};
    if (mant[28] && ((|mant[27:0]) || mant[29])) m24 = m24 + 1;
    if (m24[24]) begin m24 = m24 >> 1; e = e + 1; end
    return {b[63], 8'(e), m24[22:0]};
  endfunction

  function automatic real f2r(input logic [31:0] f);
    if (f[30:0] == '0) return f[31] ? -0.0 : 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0});
  endfunction

endpackage
