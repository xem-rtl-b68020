// tb_xem: self-checking test of the XEM accelerator through its command
// port. Operands are small integers so all sums are exact and the
// reference outer products can be formed in any order. It checks FP64 and
// FP32 outer-product MAC loops issued one per cycle, the ELPR duration,
// XACC transfers (full and diagonal), register-operand and masking modes,
// blocking after ADD, ALS with type conversion, XFCSR and XMSK access.
//
// Broadcast pattern, MAC rate, blocking and diagonal transfers follow the
// architecture; element numbering, beat packing and ELPR duration are this
// design's own choices and are checked as such.
module tb_xem;
  import xem_pkg::*;
  import tb_fp_pkg::*;

  localparam int STAGES = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready, ld_valid, ld_ready, rsp_valid, rsp_ready, rsp_last, busy;
  xem_cmd_t    cmd;
  logic [63:0] ld_data, rsp_data;
  logic [6:0]  xfcsr;
  xdt_e        xdt;

  xem #(.STAGES(STAGES)) dut (.*, .xfcsr_o(xfcsr), .xdt_o(xdt));

  int checks = 0, failures = 0;
  logic [63:0] rq [$];

  always @(posedge clk) if (rsp_valid && rsp_ready) rq.push_back(rsp_data);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic xem_cmd_t mk(input xcmd_e k);
    xem_cmd_t c;
    c      = '0;
    c.kind = k;
    return c;
  endfunction

  task automatic send(input xem_cmd_t c);
    cmd = c; cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_rsp(input int n);
    int guard = 0;
    while (rq.size() < n && guard < 1000) begin @(negedge clk); guard++; end
  endtask

  task automatic store_all(input logic fp32, input logic di, input int n);
    xem_cmd_t c;
    c = mk(XC_AAS_STORE); c.dt = fp32 ? DT_FP32 : DT_FP64; c.di = di;
    rq.delete();
    send(c);
    wait_rsp(n);
    check("store beat count", 64'(rq.size()), 64'(n));
  endtask

  real r64 [16];
  real r32 [64];
  real av [8], bv [8];
  logic [63:0] word;
  int t0, t1;

  initial begin
    xem_cmd_t c;
    cmd_valid = 0; cmd = '0; ld_valid = 0; ld_data = '0; rsp_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ================= FP64 outer-product MAC loop =================
    c = mk(XC_AAS_SET); c.dt = DT_FP64; c.b = r2d(1.0); send(c);
    for (int n = 0; n < 16; n++) r64[n] = 1.0;
    t0 = $time;
    for (int k = 0; k < 12; k++) begin
      c = mk(XC_XMM); c.op = OP_MAC; c.dt = DT_FP64;
      for (int l = 0; l < 4; l++) begin
        av[l] = real'($urandom_range(0, 40)) - 20.0;
        bv[l] = real'($urandom_range(0, 40)) - 20.0;
        c.a[64*l +: 64] = r2d(av[l]);
        c.b[64*l +: 64] = r2d(bv[l]);
      end
      for (int r = 0; r < 4; r++) for (int q = 0; q < 4; q++) r64[4*r+q] += av[q] * bv[r];
      send(c);
    end
    t1 = $time;
    check("12 MACs issue in 12 cycles", 64'((t1 - t0) / 10), 64'd12);
    send(mk(XC_ELPR));
    t0 = $time;
    @(negedge clk);
    while (busy) @(negedge clk);
    // ELPR was accepted once the last MAC drained; it then runs 4*STAGES+1 cycles
    check("ELPR duration", 64'(($time - t0) / 10), 64'(4 * STAGES + 1));
    store_all(0, 0, 16);
    for (int n = 0; n < 16; n++) check("fp64 gemm element", rq[n], r2d(r64[n]));
    store_all(0, 1, 4);
    for (int d = 0; d < 4; d++) check("fp64 diagonal", rq[d], r2d(r64[5*d]));

    // ================= blocking after ADD =================
    c = mk(XC_XMM); c.op = OP_ADD; c.dt = DT_FP64;
    for (int l = 0; l < 4; l++) begin c.a[64*l +: 64] = r2d(real'(l)); c.b[64*l +: 64] = r2d(10.0 * l); end
    send(c);
    t0 = $time;
    send(c);
    check("ADD blocks for STAGES cycles", 64'(($time - t0) / 10), 64'(STAGES));
    while (busy) @(negedge clk);
    store_all(0, 0, 16);
    for (int r = 0; r < 4; r++) for (int q = 0; q < 4; q++)
      check("add64 element", rq[4*r+q], r2d(real'(q) + 10.0 * r));

    // ================= FP32: AAS load, RO + masked MAC, ELPR =================
    c = mk(XC_AAS_LOAD); c.dt = DT_FP32; send(c);
    for (int e = 0; e < 64; e++) r32[e] = real'(e);
    for (int bt = 0; bt < 32; bt++) begin
      ld_valid = 1; ld_data = {r2f(r32[2*bt+1]), r2f(r32[2*bt])};
      @(negedge clk);
      if (bt == 7) begin ld_valid = 0; @(negedge clk); end
    end
    ld_valid = 0;
    check("xdt after fp32 load", 64'(xdt), 64'(DT_FP32));
    // mask: groups 0 and 2 via immediate mode, thread 1
    c = mk(XC_MSK_IMM); c.tid = 1; c.mg = 0; c.imm = 16'hA5C3; send(c);
    c = mk(XC_MSK_IMM); c.tid = 1; c.mg = 1; c.imm = 16'h0000; send(c);
    c = mk(XC_MSK_IMM); c.tid = 1; c.mg = 2; c.imm = 16'hFFFF; send(c);
    c = mk(XC_MSK_IMM); c.tid = 1; c.mg = 3; c.imm = 16'h1234; send(c);
    word = {16'h1234, 16'hFFFF, 16'h0000, 16'hA5C3};
    for (int k = 0; k < 9; k++) begin
      c = mk(XC_XMM); c.op = OP_MAC; c.dt = DT_FP32; c.ro = 1; c.msk = 1; c.tid = 1;
      for (int l = 0; l < 8; l++) begin
        av[l] = real'($urandom_range(0, 30)) - 15.0;
        c.a[32*l +: 32] = r2f(av[l]);
      end
      bv[0] = real'($urandom_range(0, 30)) - 15.0;
      c.b[31:0] = r2f(bv[0]);
      // element e = 8*row + col gets A element col times the scalar
      for (int e = 0; e < 64; e++) if (word[e]) r32[e] += av[e % 8] * bv[0];
      send(c);
    end
    send(mk(XC_ELPR));
    store_all(1, 0, 32);
    for (int bt = 0; bt < 32; bt++) begin
      check("fp32 masked mac lo", 64'(rq[bt][31:0]), 64'(r2f(r32[2*bt])));
      check("fp32 masked mac hi", 64'(rq[bt][63:32]), 64'(r2f(r32[2*bt+1])));
    end
    store_all(1, 1, 4);
    for (int d = 0; d < 8; d++) check("fp32 diagonal", 64'(rq[d/2][32*(d%2) +: 32]), 64'(r2f(r32[9*d])));

    // ================= XACC as operand A, FP32 MUL, full vectors =================
    c = mk(XC_XMM); c.op = OP_MUL; c.dt = DT_FP32; c.ao = 1;
    for (int l = 0; l < 8; l++) begin bv[l] = real'(l) - 3.0; c.b[32*l +: 32] = r2f(bv[l]); end
    send(c);
    for (int e = 0; e < 64; e++) r32[e] = r32[e] * bv[e / 8];
    store_all(1, 0, 32);
    for (int bt = 0; bt < 32; bt++) check("ao mul", rq[bt], {r2f(r32[2*bt+1]), r2f(r32[2*bt])});

    // ================= ALS with conversion =================
    c = mk(XC_ALS_RD); c.idx = 6'd13; c.sdt = DT_FP32; c.ddt = DT_FP64;
    rq.delete(); send(c); wait_rsp(1);
    check("als read fp32->fp64", rq[0], r2d(r32[13]));
    c = mk(XC_ALS_WR); c.idx = 6'd9; c.sdt = DT_FP64; c.ddt = DT_FP32; c.rm = RM_RNE;
    c.b[63:0] = r2d(1.0 + 2.0 ** -30);   // rounds to 1.0, inexact
    send(c);
    c = mk(XC_ALS_RD); c.idx = 6'd9; c.sdt = DT_FP32; c.ddt = DT_FP32;
    rq.delete(); send(c); wait_rsp(1);
    check("als write fp64->fp32", rq[0], 64'(r2f(1.0)));
    c = mk(XC_FCSR_RD); rq.delete(); send(c); wait_rsp(1);
    check("inexact flag from conversion", rq[0] & 64'h1, 64'h1);

    // ================= XFCSR write, rounding mode, overflow flag =================
    c = mk(XC_FCSR_WR); c.b = 64'h10; send(c);    // RTZ, flags cleared
    c = mk(XC_AAS_SET); c.dt = DT_FP64; c.b = 64'h7FEF_FFFF_FFFF_FFFF; send(c);
    c = mk(XC_XMM); c.op = OP_ADD; c.dt = DT_FP64; c.ao = 1; c.ro = 1; c.b[63:0] = 64'h7FEF_FFFF_FFFF_FFFF;
    send(c);
    while (busy) @(negedge clk);
    c = mk(XC_FCSR_RD); rq.delete(); send(c); wait_rsp(1);
    check("fcsr after overflow", rq[0], 64'h15);
    c = mk(XC_ALS_RD); c.idx = 6'd7; c.sdt = DT_FP64; c.ddt = DT_FP64;
    rq.delete(); send(c); wait_rsp(1);
    check("RTZ overflow gives max finite", rq[0], 64'h7FEF_FFFF_FFFF_FFFF);

    // ================= MSK indirect, FP64 masked MUL =================
    c = mk(XC_MSK_IND); c.tid = 0; c.b = 64'h0000_0000_0000_8001; send(c);
    c = mk(XC_FCSR_WR); c.b = 64'h0; send(c);
    c = mk(XC_AAS_SET); c.dt = DT_FP64; c.b = r2d(2.0); send(c);
    c = mk(XC_XMM); c.op = OP_MUL; c.dt = DT_FP64; c.msk = 1; c.tid = 0; c.ro = 1; c.b[63:0] = r2d(3.0);
    for (int l = 0; l < 4; l++) c.a[64*l +: 64] = r2d(5.0);
    send(c);
    store_all(0, 0, 16);
    for (int n = 0; n < 16; n++) check("fp64 mask", rq[n], r2d((n == 0 || n == 15) ? 15.0 : 2.0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
