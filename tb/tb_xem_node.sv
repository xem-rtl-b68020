// tb_xem_node: end-to-end test of the XEM issue path, scratchpad and
// accelerator at their default sizes. A host fills the scratchpad through
// the external port; the test then plays the role of the XEC core: it
// issues encoded XEM instructions with register values, raises ELPR after
// each MAC loop, and checks results written back to the scratchpad and to
// the register write-back port against products formed here from small
// integers (exact in floating point).
// Workloads: an FP64 GEMM (4 x K times K x 4, K = 16) with relative
// addressing; an FP32 GEMM (8 x K times K x 8) with masked MACs; a GEMV
// style loop with a register scalar (RO); an AXPY-style element-wise
// update on the diagonal. Each mechanism (back-to-back MAC, ELPR, stall
// after ADD, AAS load/store/set and diagonal mode, RO, AO, masking, ALS
// with conversion, XFCSR access, flag raising, illegal instruction) is
// counted, and one that never happened counts as a failure.
//
// The instruction set, ELPR after each MAC loop and the one-MAC-per-cycle
// rate follow the architecture; the scratchpad layout of AAS transfers and
// the external port are this design's own.
// Runs with every parameter at its default.
module tb_xem_node;
  import xem_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        instr_valid, instr_ready, is_elpr, tid, illegal;
  logic [31:0] instr;
  logic [63:0] rs1_val, rs2_val, rs3_val, rd_val;
  logic        wb_valid, wb_tid, wb_fp;
  logic [4:0]  wb_rd;
  logic [63:0] wb_data;
  logic        ext_en, ext_we, ext_ready, busy;
  logic [17:0] ext_addr;
  logic [63:0] ext_wdata, ext_rdata;
  logic [6:0]  xfcsr;
  xdt_e        xdt;

  xem_node dut (.*);

  int checks = 0, failures = 0;
  int n_mac_b2b = 0, n_elpr = 0, n_add_stall = 0, n_aas_load = 0, n_aas_store = 0, n_aas_set = 0;
  int n_diag = 0, n_ro = 0, n_ao = 0, n_msk = 0, n_am = 0, n_als_cvt = 0, n_fcsr = 0, n_flag = 0, n_illegal = 0;
  logic [63:0] wbq [$];
  logic [4:0]  wbrq [$];

  always @(posedge clk) begin
    if (wb_valid) begin wbq.push_back(wb_data); wbrq.push_back(wb_rd); end
    if (illegal) n_illegal++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] i_xmm(input xop_e op, input logic am, ro, ao, msk, input xdt_e dt);
    return {op, am, ro, ao, msk, 1'b0, 5'd2, 5'd1, dt, 5'd3, 7'b0001011};
  endfunction
  function automatic logic [31:0] i_als(input logic ls, input xdt_e sdt, ddt, input rm_e rm, input logic [4:0] rd);
    return {ls, sdt, ddt, 5'd0, 5'd1, rm, rd, 7'b1101011};
  endfunction
  function automatic logic [31:0] i_aas(input logic di, input logic [1:0] lss, input xdt_e dt);
    return {1'b1, di, lss, dt, 5'd0, 5'd1, 3'd0, 5'd4, 7'b1110111};
  endfunction
  function automatic logic [31:0] i_fcsr(input logic st, input logic [4:0] rd);
    return {12'd0, 5'd1, 1'b1, st, 1'b0, rd, 7'b1111011};
  endfunction
  function automatic logic [31:0] i_msk_ind();
    return {4'd0, 3'd1, 5'd0, 5'd1, 3'b001, 5'd0, 7'b0101011};
  endfunction
  function automatic logic [31:0] i_msk_imm(input logic [15:0] m, input logic [1:0] g);
    return {m, 1'b0, 3'b011, 3'b000, g, 7'b0101011};
  endfunction

  // positive a + b rounded toward zero, from the nearest-even sum and its
  // exact error term (TwoSum)
  function automatic logic [63:0] add_rtz(input real a, input real b);
    real s, bb, err;
    s   = a + b;
    bb  = s - a;
    err = (a - (s - bb)) + (b - bb);
    return (err < 0.0) ? r2d(s) - 64'd1 : r2d(s);
  endfunction

  // ---------------- drivers ----------------
  int stall_cycles;
  task automatic issue(input logic [31:0] w, input logic [63:0] r1, r2, r3, rdv);
    instr = w; rs1_val = r1; rs2_val = r2; rs3_val = r3; rd_val = rdv; is_elpr = 0;
    instr_valid = 1;
    stall_cycles = 0;
    #1;
    while (!instr_ready) begin @(negedge clk); #1; stall_cycles++; end
    @(negedge clk);
    instr_valid = 0;
  endtask

  task automatic elpr();
    instr_valid = 1; is_elpr = 1;
    #1;
    while (!instr_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    instr_valid = 0; is_elpr = 0;
    n_elpr++;
  endtask

  task automatic drain();
    #1;
    while (busy) begin @(negedge clk); #1; end
  endtask

  task automatic ext_write(input logic [17:0] a, input logic [63:0] v);
    #1;
    while (!ext_ready) begin @(negedge clk); #1; end
    ext_en = 1; ext_we = 1; ext_addr = a; ext_wdata = v;
    @(negedge clk);
    ext_en = 0; ext_we = 0;
  endtask

  task automatic ext_read(input logic [17:0] a, output logic [63:0] v);
    #1;
    while (!ext_ready) begin @(negedge clk); #1; end
    ext_en = 1; ext_we = 0; ext_addr = a;
    @(negedge clk);
    ext_en = 0;
    v = ext_rdata;
  endtask

  task automatic wait_wb(input int n);
    int g = 0;
    while (wbq.size() < n && g < 200) begin @(negedge clk); g++; end
    check("write-back count", 64'(wbq.size()), 64'(n));
  endtask

  localparam int K = 16;
  localparam logic [17:0] A_BASE = 18'h01000, B_BASE = 18'h02000, C_BASE = 18'h03000, L_BASE = 18'h04000;
  real ref64 [16];
  real ref32 [64];
  real av, bv;
  logic [63:0] v, mask;
  int t0;

  initial begin
    instr_valid = 0; is_elpr = 0; tid = 0; instr = '0;
    rs1_val = '0; rs2_val = '0; rs3_val = '0; rd_val = '0;
    ext_en = 0; ext_we = 0; ext_addr = '0; ext_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ================= FP64 GEMM: C[r][c] = sum_k A_k[c] * B_k[r] =================
    for (int n = 0; n < 16; n++) ref64[n] = 0.0;
    for (int k = 0; k < K; k++) begin
      real a [4], b [4];
      for (int l = 0; l < 4; l++) begin
        a[l] = real'($urandom_range(0, 64)) - 32.0;
        b[l] = real'($urandom_range(0, 64)) - 32.0;
        ext_write(A_BASE + 18'(32 * k + 8 * l), r2d(a[l]));
        ext_write(B_BASE + 18'(32 * k + 8 * l), r2d(b[l]));
      end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) ref64[4*r+c] += a[c] * b[r];
    end
    issue(i_aas(0, 2'b10, DT_FP64), 0, 0, 0, r2d(0.0)); n_aas_set++;
    t0 = $time;
    for (int k = 0; k < K; k++) begin
      issue(i_xmm(OP_MAC, 1, 0, 0, 0, DT_FP64), A_BASE, B_BASE, {32'(32 * k), 32'(32 * k)}, 0);
      n_am++;
      if (k > 0 && stall_cycles == 0) n_mac_b2b++;
    end
    check("FP64 MAC loop at one instruction per cycle", 64'(($time - t0) / 10), 64'(K));
    elpr();
    issue(i_aas(0, 2'b01, DT_FP64), C_BASE, 0, 0, 0); n_aas_store++;
    drain();
    for (int n = 0; n < 16; n++) begin
      ext_read(C_BASE + 18'(8 * n), v);
      check("fp64 gemm", v, r2d(ref64[n]));
    end
    // diagonal store
    issue(i_aas(1, 2'b01, DT_FP64), C_BASE + 18'h100, 0, 0, 0); n_aas_store++; n_diag++;
    drain();
    for (int d = 0; d < 4; d++) begin
      ext_read(C_BASE + 18'h100 + 18'(8 * d), v);
      check("fp64 diagonal store", v, r2d(ref64[5*d]));
    end

    // ================= ADD blocks the next instruction =================
    issue(i_xmm(OP_ADD, 0, 1, 1, 0, DT_FP64), 0, r2d(0.5), 0, 0); n_ro++; n_ao++;
    issue(i_fcsr(0, 5'd9), 0, 0, 0, 0); n_fcsr++;   // taken into the decode stage at once
    issue(i_fcsr(0, 5'd10), 0, 0, 0, 0);            // waits until the ADD has written XACC
    n_add_stall += stall_cycles;
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FAIL no stall behind ADD"); end
    wait_wb(2);
    check("fcsr read back", wbq[0], 64'h0);
    wbq.delete(); wbrq.delete();
    for (int n = 0; n < 16; n++) ref64[n] += 0.5;
    issue(i_als(0, DT_FP64, DT_FP64, RM_RNE, 5'd7), 6, 0, 0, 0);
    wait_wb(1);
    check("als read fp64 element 6", wbq[0], r2d(ref64[6]));
    check("als rd index", 64'(wbrq[0]), 64'd7);
    wbq.delete(); wbrq.delete();

    // ================= FP32 GEMM with masking: C[row][col] = sum_k A_k[col]*B_k[row] =================
    for (int e = 0; e < 64; e++) ref32[e] = real'(e % 7);
    for (int w = 0; w < 32; w++)
      ext_write(L_BASE + 18'(8 * w), {r2f(ref32[2*w+1]), r2f(ref32[2*w])});
    issue(i_aas(0, 2'b00, DT_FP32), L_BASE, 0, 0, 0); n_aas_load++;
    mask = {$urandom, $urandom};
    issue(i_msk_imm(mask[15:0], 2'd0), 0, 0, 0, 0);
    issue(i_msk_imm(mask[31:16], 2'd1), 0, 0, 0, 0);
    issue(i_msk_ind(), {mask[63:32], 32'h0}, 0, 0, 0);     // sets all 64 bits
    issue(i_msk_imm(mask[31:16], 2'd1), 0, 0, 0, 0);        // restore groups 0 and 1
    issue(i_msk_imm(mask[15:0], 2'd0), 0, 0, 0, 0);
    n_msk++;
    for (int k = 0; k < K; k++) begin
      real a [8], b [8];
      for (int l = 0; l < 8; l++) begin
        a[l] = real'($urandom_range(0, 20)) - 10.0;
        b[l] = real'($urandom_range(0, 20)) - 10.0;
      end
      for (int l = 0; l < 4; l++) begin
        ext_write(A_BASE + 18'(32 * k + 8 * l), {r2f(a[2*l+1]), r2f(a[2*l])});
        ext_write(B_BASE + 18'(32 * k + 8 * l), {r2f(b[2*l+1]), r2f(b[2*l])});
      end
      for (int e = 0; e < 64; e++) if (mask[e]) ref32[e] += a[e % 8] * b[e / 8];
    end
    t0 = $time;
    for (int k = 0; k < K; k++) begin
      issue(i_xmm(OP_MAC, 0, 0, 0, 1, DT_FP32), A_BASE + 18'(32 * k), B_BASE + 18'(32 * k), 0, 0);
      if (k > 0 && stall_cycles == 0) n_mac_b2b++;
    end
    check("FP32 MAC loop at one instruction per cycle", 64'(($time - t0) / 10), 64'(K));
    elpr();
    issue(i_aas(0, 2'b01, DT_FP32), C_BASE, 0, 0, 0); n_aas_store++;
    drain();
    for (int w = 0; w < 32; w++) begin
      ext_read(C_BASE + 18'(8 * w), v);
      check("fp32 masked gemm", v, {r2f(ref32[2*w+1]), r2f(ref32[2*w])});
    end

    // ================= GEMV-style loop: register scalar operand B (RO) =================
    issue(i_aas(0, 2'b10, DT_FP32), 0, 0, 0, 64'(r2f(0.0))); n_aas_set++;
    issue(i_msk_ind(), '1, 0, 0, 0);
    for (int e = 0; e < 64; e++) ref32[e] = 0.0;
    for (int k = 0; k < 4; k++) begin
      bv = real'(k + 1);
      issue(i_xmm(OP_MAC, 0, 1, 0, 0, DT_FP32), A_BASE + 18'(32 * k), 64'(r2f(bv)), 0, 0); n_ro++;
      for (int l = 0; l < 4; l++) begin
        ext_read(A_BASE + 18'(32 * k + 8 * l), v);   // read while MACs are in flight
        ref32[2*l]   += f2r(v[31:0]) * bv;
        ref32[2*l+1] += f2r(v[63:32]) * bv;
      end
    end
    elpr();
    // every row holds the same vector: read row 5 element by element with ALS
    for (int c = 0; c < 8; c++) begin
      issue(i_als(0, DT_FP32, DT_FP64, RM_RNE, 5'(c)), 40 + c, 0, 0, 0); n_als_cvt++;
    end
    wait_wb(8);
    for (int c = 0; c < 8; c++) check("gemv row via ALS fp32->fp64", wbq[c], r2d(ref32[c]));
    wbq.delete(); wbrq.delete();

    // ================= AXPY-style diagonal update, rounding mode and flags =================
    issue(i_fcsr(1, 5'd0), 64'h10, 0, 0, 0); n_fcsr++;          // RTZ, flags clear
    for (int d = 0; d < 4; d++) ext_write(L_BASE + 18'h300 + 18'(8 * d), r2d(real'(d) + 0.25));
    issue(i_aas(1, 2'b00, DT_FP64), L_BASE + 18'h300, 0, 0, 0); n_aas_load++; n_diag++;
    // y = y + 1/3 (inexact; RTZ) using XACC as operand A and register scalar B
    issue(i_xmm(OP_ADD, 0, 1, 1, 0, DT_FP64), 0, r2d(1.0 / 3.0), 0, 0);
    issue(i_fcsr(0, 5'd3), 0, 0, 0, 0);
    wait_wb(1);
    check("inexact flag set, RTZ kept", wbq[0] & 64'h71, 64'h11);
    if (wbq[0][0]) n_flag++;
    wbq.delete(); wbrq.delete();
    issue(i_aas(1, 2'b01, DT_FP64), C_BASE + 18'h200, 0, 0, 0); n_aas_store++;
    drain();
    for (int d = 0; d < 4; d++) begin
      ext_read(C_BASE + 18'h200 + 18'(8 * d), v);
      check("axpy diagonal (RTZ)", v, add_rtz(real'(d) + 0.25, 1.0 / 3.0));
    end

    // ================= ALS store with conversion, illegal instruction =================
    issue(i_als(1, DT_FP64, DT_FP64, RM_RNE, 5'd2), 5, 0, 0, r2d(-7.5)); n_als_cvt++;
    issue(i_als(0, DT_FP64, DT_FP32, RM_RNE, 5'd2), 5, 0, 0, 0);
    wait_wb(1);
    check("als fp64->fp32 read", wbq[0], 64'(r2f(-7.5)));
    wbq.delete(); wbrq.delete();
    issue(32'h0000_0013, 0, 0, 0, 0);   // an ordinary RISC-V instruction is not for the XEM
    check("illegal pulse seen", 64'(n_illegal), 64'd1);

    // ================= mechanism coverage =================
    if (n_mac_b2b == 0)  begin failures++; $display("FAIL never: back-to-back MAC"); end
    if (n_elpr == 0)     begin failures++; $display("FAIL never: ELPR"); end
    if (n_add_stall == 0)begin failures++; $display("FAIL never: stall after ADD"); end
    if (n_aas_load == 0 || n_aas_store == 0 || n_aas_set == 0) begin failures++; $display("FAIL never: AAS mode"); end
    if (n_diag == 0)     begin failures++; $display("FAIL never: diagonal mode"); end
    if (n_ro == 0 || n_ao == 0 || n_msk == 0 || n_am == 0) begin failures++; $display("FAIL never: XMM mode"); end
    if (n_als_cvt == 0 || n_fcsr == 0 || n_flag == 0 || n_illegal == 0) begin failures++; $display("FAIL never: ALS/XFCSR/flag/illegal"); end
    checks++;
    $display("mechanisms: mac_b2b=%0d elpr=%0d add_stall=%0d aas_load=%0d aas_store=%0d aas_set=%0d diag=%0d ro=%0d ao=%0d msk=%0d am=%0d als=%0d fcsr=%0d flag=%0d illegal=%0d",
             n_mac_b2b, n_elpr, n_add_stall, n_aas_load, n_aas_store, n_aas_set, n_diag, n_ro, n_ao, n_msk, n_am, n_als_cvt, n_fcsr, n_flag, n_illegal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
