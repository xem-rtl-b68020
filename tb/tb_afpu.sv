// tb_afpu: self-checking test of one AFPU cell. Operands are small integers
// so every sum is exact and the reference is independent of summation
// order. It checks FP64 and FP32 add/sub/mul with the 4-cycle latency, the
// placement of the four FP32 products in XACC0..3, back-to-back MAC loops
// followed by the four-step ELPR reduction, masking, the XACC-operand mode
// and direct XACC writes.
//
// The expected behaviour (latency, PREG round robin, ELPR, XACC placement)
// follows the architecture; the stimulus and the element pairing checked
// are this design's own.
module tb_afpu;
  import xem_pkg::*;
  import tb_fp_pkg::*;

  localparam int STAGES = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             issue, ao, fp32, elpr_issue, preg_clear, busy, flags_valid;
  xop_e             op;
  rm_e              rm;
  logic [3:0]       en, wr_en;
  logic [63:0]      a, b;
  logic [1:0]       elpr_idx;
  logic [3:0][31:0] wr_data, xacc;
  fflags_t          flags;

  int checks = 0, failures = 0;

  afpu #(.STAGES(STAGES)) dut (.*, .xacc_o(xacc));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    issue = 0; elpr_issue = 0; preg_clear = 0; wr_en = 0; ao = 0; en = 4'hF;
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] x64();
    return {xacc[3], xacc[0]};
  endfunction

  task automatic do_op(input xop_e o, input logic f, input logic [63:0] av, input logic [63:0] bv);
    @(negedge clk);
    issue = 1; op = o; fp32 = f; a = av; b = bv;
    @(negedge clk);
    idle();
  endtask

  // ELPR as the XEM sequences it: four adds spaced STAGES cycles, then clear
  task automatic elpr();
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      elpr_issue = 1; elpr_idx = 2'(i);
      @(negedge clk);
      elpr_issue = 0;
      repeat (STAGES - 1) @(negedge clk);
    end
    preg_clear = 1;
    @(negedge clk);
    preg_clear = 0;
  endtask

  initial begin
    real ref64, ref32 [4];
    real av, bv, a0, a1, b0, b1;
    idle(); op = OP_ADD; fp32 = 0; rm = RM_RNE; a = 0; b = 0; elpr_idx = 0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- FP64 add with latency check ----
    @(negedge clk);
    issue = 1; op = OP_ADD; fp32 = 0; a = r2d(1.5); b = r2d(2.25);
    @(negedge clk); idle();           // now cycle t+1
    repeat (2) @(negedge clk);        // t+3
    check("add64 not before latency", x64(), 64'h0);
    @(negedge clk);                   // t+4
    check("add64 at latency", x64(), r2d(3.75));
    do_op(OP_SUB, 0, r2d(1.0), r2d(4.0)); repeat (4) @(negedge clk);
    check("sub64", x64(), r2d(-3.0));
    do_op(OP_MUL, 0, r2d(-3.0), r2d(7.0)); repeat (4) @(negedge clk);
    check("mul64", x64(), r2d(-21.0));
    check("fp64 keeps xacc1/2", {xacc[2], xacc[1]}, 64'h0);

    // ---- FP32 2x2 outer product placement ----
    do_op(OP_MUL, 1, {r2f(3.0), r2f(2.0)}, {r2f(7.0), r2f(5.0)}); repeat (4) @(negedge clk);
    check("xacc0 = a.lo*b.lo", 64'(xacc[0]), 64'(r2f(10.0)));
    check("xacc1 = a.hi*b.lo", 64'(xacc[1]), 64'(r2f(15.0)));
    check("xacc2 = a.lo*b.hi", 64'(xacc[2]), 64'(r2f(14.0)));
    check("xacc3 = a.hi*b.hi", 64'(xacc[3]), 64'(r2f(21.0)));
    do_op(OP_ADD, 1, {r2f(3.0), r2f(2.0)}, {r2f(7.0), r2f(5.0)}); repeat (4) @(negedge clk);
    check("add32 xacc0", 64'(xacc[0]), 64'(r2f(7.0)));
    check("add32 xacc1", 64'(xacc[1]), 64'(r2f(8.0)));
    check("add32 xacc2", 64'(xacc[2]), 64'(r2f(9.0)));
    check("add32 xacc3", 64'(xacc[3]), 64'(r2f(10.0)));

    // ---- direct write then FP64 MAC loop, back-to-back, then ELPR ----
    @(negedge clk);
    wr_en = 4'b1001; wr_data[0] = 32'(r2d(100.0)); wr_data[3] = 32'(r2d(100.0) >> 32);
    @(negedge clk); idle();
    ref64 = 100.0;
    for (int i = 0; i < 37; i++) begin
      av = real'($urandom_range(0, 200)) - 100.0;
      bv = real'($urandom_range(0, 200)) - 100.0;
      ref64 = ref64 + av * bv;
      issue = 1; op = OP_MAC; fp32 = 0; a = r2d(av); b = r2d(bv);
      @(negedge clk);
    end
    idle();
    repeat (STAGES) @(negedge clk);
    check("mac64 leaves xacc until ELPR", x64(), r2d(100.0));
    elpr();
    check("mac64 + elpr", x64(), r2d(ref64));

    // ---- FP32 MAC loop with gaps, then ELPR ----
    @(negedge clk);
    wr_en = 4'hF; for (int k = 0; k < 4; k++) wr_data[k] = r2f(real'(k));
    @(negedge clk); idle();
    for (int k = 0; k < 4; k++) ref32[k] = real'(k);
    for (int i = 0; i < 23; i++) begin
      a0 = real'($urandom_range(0, 60)) - 30.0; a1 = real'($urandom_range(0, 60)) - 30.0;
      b0 = real'($urandom_range(0, 60)) - 30.0; b1 = real'($urandom_range(0, 60)) - 30.0;
      ref32[0] += a0 * b0; ref32[1] += a1 * b0; ref32[2] += a0 * b1; ref32[3] += a1 * b1;
      issue = 1; op = OP_MAC; fp32 = 1; a = {r2f(a1), r2f(a0)}; b = {r2f(b1), r2f(b0)};
      @(negedge clk);
      if (i % 5 == 2) begin idle(); @(negedge clk); end
    end
    idle();
    repeat (STAGES) @(negedge clk);
    elpr();
    for (int k = 0; k < 4; k++) check("mac32 + elpr", 64'(xacc[k]), 64'(r2f(ref32[k])));

    // ---- masking: only XACC1 and XACC2 enabled ----
    @(negedge clk);
    issue = 1; op = OP_MUL; fp32 = 1; en = 4'b0110; a = {r2f(2.0), r2f(2.0)}; b = {r2f(2.0), r2f(2.0)};
    @(negedge clk); idle(); repeat (4) @(negedge clk);
    check("masked xacc0 kept", 64'(xacc[0]), 64'(r2f(ref32[0])));
    check("enabled xacc1", 64'(xacc[1]), 64'(r2f(4.0)));
    check("enabled xacc2", 64'(xacc[2]), 64'(r2f(4.0)));
    check("masked xacc3 kept", 64'(xacc[3]), 64'(r2f(ref32[3])));

    // ---- XACC as operand A: xacc = xacc * b ----
    @(negedge clk);
    issue = 1; op = OP_MUL; fp32 = 1; ao = 1; a = '0; b = {r2f(3.0), r2f(-1.0)};
    @(negedge clk); idle(); repeat (4) @(negedge clk);
    check("ao xacc0", 64'(xacc[0]), 64'(r2f(-ref32[0])));
    check("ao xacc1", 64'(xacc[1]), 64'(r2f(-4.0)));
    check("ao xacc2", 64'(xacc[2]), 64'(r2f(12.0)));
    check("ao xacc3", 64'(xacc[3]), 64'(r2f(3.0 * ref32[3])));

    // ---- flags: FP64 overflow reported on the write-back cycle ----
    @(negedge clk);
    issue = 1; op = OP_MUL; fp32 = 0; a = 64'h7FEF_FFFF_FFFF_FFFF; b = r2d(4.0);
    @(negedge clk); idle();
    repeat (2) @(negedge clk);
    checks++;
    if (!(flags_valid && flags.of && flags.nx)) begin failures++; $display("FAIL overflow flags %b", flags); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
