// tb_fp_fma: self-checking test of the fused multiply-add core in its FP64
// and FP32 configurations. References come from the simulator's own IEEE
// double arithmetic: FP64 add/sub/mul results are compared bit for bit;
// FMA operands are chosen so that the exact result fits a double; FP32
// references are exact doubles rounded to single precision by a small
// round-to-nearest-even routine of this testbench. Directed cases cover
// NaN, infinity, overflow, subnormals, signed zero and rounding modes.
//
// Rounding and flag rules checked are the IEEE 754 / RISC-V ones the
// architecture refers to.
module tb_fp_fma;
  import xem_pkg::*;

  logic [63:0] x64, y64, z64, r64;
  logic [31:0] x32, y32, z32, r32;
  logic        na64, na32;
  rm_e         rm64, rm32;
  fflags_t     f64, f32;
  int          checks = 0, failures = 0;

  fp_fma #(.EW(11), .MW(52)) u64 (.x(x64), .y(y64), .z(z64), .no_add(na64), .rm(rm64), .res(r64), .flags(f64));
  fp_fma #(.EW(8),  .MW(23)) u32 (.x(x32), .y(y32), .z(z32), .no_add(na32), .rm(rm32), .res(r32), .flags(f32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // double -> single, round to nearest even, normal range only
  function automatic logic [31:0] d2f(input real r);
    logic [63:0] b;
    logic [52:0] mant;
    logic [24:0] m24;
    int          e;
    b    = $realtobits(r);
    if (b[62:0] == '0) return {b[63], 31'b0};
    mant = {1'b1, b[51:0]};
    e    = int'(b[62:52]) - 1023 + 127;
    m24  = {1'b0, mant[52:29]};
    if (mant[28] && ((|mant[27:0]) || mant[29])) m24 = m24 + 1;
    if (m24[24]) begin m24 = m24 >> 1; e = e + 1; end
    return {b[63], 8'(e), m24[22:0]};
  endfunction

  function automatic real f2d(input logic [31:0] f);
    logic [63:0] b;
    b = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    return $bitstoreal(b);
  endfunction

  function automatic logic [63:0] rnd64(input int span);
    logic [10:0] e;
    e = 11'(1023 - span + int'($urandom_range(0, 2 * span)));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  // FP64 value with a 12-bit significand
  function automatic logic [63:0] small64(input int span);
    logic [10:0] e;
    e = 11'(1023 - span + int'($urandom_range(0, 2 * span)));
    return {1'($urandom), e, 12'($urandom), 40'b0};
  endfunction

  function automatic logic [31:0] rnd32(input int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(0, 2 * span)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic logic [31:0] small32(input int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(0, 2 * span)));
    return {1'($urandom), e, 12'($urandom), 11'b0};
  endfunction

  task automatic chk64(input string what, input logic [63:0] exp_r, input logic [3:0] exp_f, input logic cmp_f);
    #1;
    checks++;
    if (r64 !== exp_r || (cmp_f && f64 !== exp_f)) begin
      failures++;
      $display("FAIL %s: x=%h y=%h z=%h got %h/%b exp %h/%b", what, x64, y64, z64, r64, f64, exp_r, exp_f);
    end
  endtask

  task automatic chk32(input string what, input logic [31:0] exp_r, input logic [3:0] exp_f, input logic cmp_f);
    #1;
    checks++;
    if (r32 !== exp_r || (cmp_f && f32 !== exp_f)) begin
      failures++;
      $display("FAIL %s: x=%h y=%h z=%h got %h/%b exp %h/%b", what, x32, y32, z32, r32, f32, exp_r, exp_f);
    end
  endtask

  initial begin
    real ra, rb, rc;
    rm64 = RM_RNE; rm32 = RM_RNE; na64 = 0; na32 = 0;
    x32 = '0; y32 = '0; z32 = '0;
    // ---------------- FP64 random add / sub / mul ----------------
    for (int i = 0; i < 3000; i++) begin
      x64 = rnd64(60); z64 = rnd64(60);
      ra = $bitstoreal(x64); rb = $bitstoreal(z64);
      y64 = FP64_ONE; na64 = 0;
      chk64("add64", $realtobits(ra + rb), 4'b0, 1'b0);
      z64 = {~z64[63], z64[62:0]};
      chk64("sub64", $realtobits(ra - rb), 4'b0, 1'b0);
      y64 = rnd64(60); z64 = '0; na64 = 1;
      rc = $bitstoreal(y64);
      chk64("mul64", $realtobits(ra * rc), 4'b0, 1'b0);
    end
    // ---------------- FP64 FMA with exactly representable results ----------------
    na64 = 0;
    for (int i = 0; i < 2000; i++) begin
      x64 = small64(8); y64 = small64(8); z64 = small64(8);
      ra = $bitstoreal(x64); rb = $bitstoreal(y64); rc = $bitstoreal(z64);
      chk64("fma64", $realtobits(ra * rb + rc), 4'b0000, 1'b1);
    end
    // ---------------- FP64 directed cases ----------------
    x64 = 64'h7FF0_0000_0000_0000; y64 = 64'h0; z64 = FP64_ONE; na64 = 0;
    chk64("inf*0", 64'h7FF8_0000_0000_0000, 4'b1000, 1'b1);
    x64 = 64'h7FF0_0000_0000_0000; y64 = FP64_ONE; z64 = 64'hFFF0_0000_0000_0000;
    chk64("inf-inf", 64'h7FF8_0000_0000_0000, 4'b1000, 1'b1);
    x64 = 64'h7FF4_0000_0000_0000; y64 = FP64_ONE; z64 = FP64_ONE;
    chk64("snan", 64'h7FF8_0000_0000_0000, 4'b1000, 1'b1);
    x64 = 64'h7FEF_FFFF_FFFF_FFFF; y64 = 64'h4000_0000_0000_0000; na64 = 1;
    chk64("ovf rne", 64'h7FF0_0000_0000_0000, 4'b0101, 1'b1);
    rm64 = RM_RTZ;
    chk64("ovf rtz", 64'h7FEF_FFFF_FFFF_FFFF, 4'b0101, 1'b1);
    rm64 = RM_RNE;
    // 1 + 2^-60 under several rounding modes
    x64 = FP64_ONE; y64 = FP64_ONE; z64 = 64'h3C30_0000_0000_0000; na64 = 0;
    chk64("1+tiny rne", FP64_ONE, 4'b0001, 1'b1);
    rm64 = RM_RUP;
    chk64("1+tiny rup", 64'h3FF0_0000_0000_0001, 4'b0001, 1'b1);
    rm64 = RM_RDN;
    chk64("1+tiny rdn", FP64_ONE, 4'b0001, 1'b1);
    z64 = 64'hBC30_0000_0000_0000;
    chk64("1-tiny rdn", 64'h3FEF_FFFF_FFFF_FFFF, 4'b0001, 1'b1);
    rm64 = RM_RMM;
    chk64("1-tiny rmm", FP64_ONE, 4'b0001, 1'b1);
    rm64 = RM_RNE;
    // subnormal result, exact, and tiny inexact
    x64 = 64'h0010_0000_0000_0000; y64 = 64'h3FE0_0000_0000_0000; na64 = 1;
    chk64("subnormal exact", 64'h0008_0000_0000_0000, 4'b0000, 1'b1);
    x64 = 64'h0000_0000_0000_0003; y64 = 64'h3FE0_0000_0000_0000;
    chk64("subnormal inexact", 64'h0000_0000_0000_0002, 4'b0011, 1'b1);
    // subnormal input times large number
    x64 = 64'h0000_0000_0000_0001; y64 = 64'h4330_0000_0000_0000;
    chk64("subnormal input", $realtobits($bitstoreal(64'h1) * (2.0 ** 52)), 4'b0000, 1'b1);
    // exact cancellation and signed zero
    x64 = FP64_ONE; y64 = FP64_ONE; z64 = 64'hBFF0_0000_0000_0000; na64 = 0;
    chk64("cancel +0", 64'h0, 4'b0000, 1'b1);
    rm64 = RM_RDN;
    chk64("cancel -0", 64'h8000_0000_0000_0000, 4'b0000, 1'b1);
    rm64 = RM_RNE;
    x64 = 64'h8000_0000_0000_0000; y64 = FP64_ONE; na64 = 1;
    chk64("mul -0", 64'h8000_0000_0000_0000, 4'b0000, 1'b1);

    // ---------------- FP32 random add / sub / mul ----------------
    for (int i = 0; i < 3000; i++) begin
      x32 = rnd32(10); z32 = rnd32(10);
      ra = f2d(x32); rb = f2d(z32);
      y32 = FP32_ONE; na32 = 0;
      chk32("add32", d2f(ra + rb), 4'b0, 1'b0);
      z32 = {~z32[31], z32[30:0]};
      chk32("sub32", d2f(ra - rb), 4'b0, 1'b0);
      y32 = rnd32(10); na32 = 1;
      rc = f2d(y32);
      chk32("mul32", d2f(ra * rc), 4'b0, 1'b0);
    end
    // FP32 FMA: exact in double, rounded once to single
    na32 = 0;
    for (int i = 0; i < 2000; i++) begin
      x32 = small32(8); y32 = small32(8); z32 = rnd32(8);
      ra = f2d(x32); rb = f2d(y32); rc = f2d(z32);
      chk32("fma32", d2f(ra * rb + rc), 4'b0, 1'b0);
    end
    x32 = 32'h7F7F_FFFF; y32 = 32'h4000_0000; na32 = 1;
    chk32("ovf32", 32'h7F80_0000, 4'b0101, 1'b1);
    x32 = 32'h7F80_0000; y32 = 32'h0; na32 = 0; z32 = FP32_ONE;
    chk32("inf*0 32", 32'h7FC0_0000, 4'b1000, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
