// xem: the XEM tensor accelerator - a 4x4 grid of AFPUs that computes the
// outer product of two 256-bit operand vectors and accumulates it in the
// XACC registers, plus its control and status registers and the sequencers
// for reduction and XACC transfers.
//
// Operand broadcast: A = {A3,A2,A1,A0} and B = {B3,B2,B1,B0} are four
// 64-bit lanes. AFPU n = 4*r + c (r row, c column) receives A lane c and
// B lane r, so A[63:0] feeds AFPUs 0,4,8,12 and B[255:192] feeds AFPUs
// 12..15. One XMM thus performs 16 FP64 or 64 FP32 operations. With RO the
// scalar b[63:0] is replicated to all B lanes (FP32: b[31:0] eight times).
//
// Element numbering (ALS, AAS and XMSK), raster order of the result matrix:
//   FP64: element n = AFPU n (4x4 matrix); diagonal = 0, 5, 10, 15.
//   FP32: 8x8 matrix, element e = 8*row + col, row = 2r + k/2,
//         col = 2c + k%2 for XACCk of AFPU 4r+c; diagonal = 0, 9, ..., 63.
//   An FP64 value lives in XACC0 (low word) and XACC3 (high word).
//
// CSRs: two 64-bit XMSK (one per XEC thread; an XMM with msk set enables
// element e only where XMSK[e] = 1), XDT (type of the XACC contents, set by
// every instruction that writes XACC), XFCSR (bits 3:0 sticky flags
// NV,OF,UF,NX; bits 6:4 rounding mode used by XMM), ELPR_CNT (internal
// reduction cycle counter).
//
// Command port (valid/ready, one xem_cmd_t per transfer):
//   XMM      ADD/SUB/MUL block further commands until the result is in
//            XACC (STAGES cycles); MACs are accepted every cycle.
//   ELPR     waits for the pipeline to drain, then issues the four
//            XACC += PREG[i] steps STAGES cycles apart (ELPR_CNT 0..4*STAGES)
//            and clears the PREGs; 4*STAGES+1 cycles in all.
//   ALS_RD   one response beat: element idx, converted from sdt to ddt.
//   ALS_WR   writes b[63:0] (type sdt) to element idx as type ddt.
//   AAS_LOAD takes 64-bit beats from the load stream (FP64: one element per
//            beat; FP32: two consecutive elements, lower index in bits 31:0);
//            16/32 beats, or 4 in diagonal mode.
//   AAS_STORE emits the same beats on the response stream.
//   AAS_SET  writes b[63:0] (FP64) or b[31:0] (FP32) to every element.
//   FCSR_RD/WR, MSK_IND (whole XMSK), MSK_IMM (16-bit group mg of XMSK).
// Every command other than a MAC waits until no FPU result is in flight.
//
// From the architecture: the 4x4 grid and its A/B broadcast, RO replication,
// AO and masking, two XMSK registers, XDT, the 7-bit XFCSR, ELPR with its
// internal counter, blocking of other instructions while ADD/SUB/MUL run,
// single-element and whole-XACC transfers with a diagonal mode, and the
// 16-bit MSK immediate groups. Choices made here: the element numbering
// within the raster order, the group-to-bit mapping of MSK immediate, the
// flag bit order, the AAS beat packing, the reset values (XMSK all ones,
// XFCSR zero = round to nearest even, XDT FP64, XACC and PREG zero), and the
// ELPR timing of four steps STAGES cycles apart.
// The handshake assertions are disabled during reset through rst_n; the
// linter reports this as a reset used both asynchronously and in a
// synchronous expression, which is confined to the checks and intended.
module xem #(
  parameter int unsigned STAGES = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  xem_pkg::xem_cmd_t  cmd,
  input  logic               ld_valid,
  output logic               ld_ready,
  input  logic [63:0]        ld_data,
  output logic               rsp_valid,
  input  logic               rsp_ready,
  output logic [63:0]        rsp_data,
  output logic               rsp_last,
  output logic               busy,
  output logic [6:0]         xfcsr_o,
  output xem_pkg::xdt_e      xdt_o
);
  import xem_pkg::*;

  localparam int unsigned CW = $clog2(4 * STAGES + 1);

  typedef enum logic [2:0] {S_IDLE, S_ELPR, S_LOAD, S_STORE, S_RSP} state_e;

  // ---------------- registers ----------------
  state_e           state;
  logic [63:0]      xmsk [N_THREADS];
  xdt_e             xdt;
  logic [6:0]       xfcsr;
  logic [CW-1:0]    elpr_cnt;
  logic [$clog2(STAGES+1)-1:0] drain_cnt, nonmac_cnt;
  logic             mac_fp32;
  logic [5:0]       beat, nbeats;
  logic             seq_fp32, seq_di;
  logic [63:0]      rsp_q;

  // ---------------- AFPU grid ----------------
  logic [N_AFPU-1:0]            g_issue, g_busy, g_fv;
  logic [N_AFPU-1:0][3:0]       g_en, g_wr_en;
  logic [N_AFPU-1:0][3:0][31:0] g_wr_data, g_xacc;
  fflags_t                      g_flags [N_AFPU];
  logic [N_AFPU-1:0][63:0]      g_a, g_b;
  logic                         elpr_issue, preg_clear;
  logic [1:0]                   elpr_idx;
  logic                         issue_fp32, elpr_fp32;

  for (genvar n = 0; n < int'(N_AFPU); n++) begin : g_afpu
    afpu #(.STAGES(STAGES)) u_afpu (
      .clk, .rst_n,
      .issue(g_issue[n]), .op(cmd.op), .fp32(elpr_issue ? elpr_fp32 : issue_fp32),
      .rm(rm_e'(xfcsr[6:4])), .ao(cmd.ao), .en(g_en[n]), .a(g_a[n]), .b(g_b[n]),
      .elpr_issue, .elpr_idx, .preg_clear,
      .wr_en(g_wr_en[n]), .wr_data(g_wr_data[n]), .xacc_o(g_xacc[n]),
      .busy(g_busy[n]), .flags_valid(g_fv[n]), .flags(g_flags[n]));
  end

  // ---------------- element helpers ----------------
  function automatic int unsigned elem32(input int unsigned n, input int unsigned k);
    return (2 * (n / 4) + k / 2) * 8 + 2 * (n % 4) + k % 2;
  endfunction

  function automatic logic [31:0] rd32(input logic [N_AFPU-1:0][3:0][31:0] xa, input logic [5:0] e);
    int unsigned row, col;
    row = int'(e) / 8;
    col = int'(e) % 8;
    return xa[(row / 2) * 4 + col / 2][(row % 2) * 2 + col % 2];
  endfunction

  function automatic logic [63:0] rd64(input logic [N_AFPU-1:0][3:0][31:0] xa, input logic [3:0] n);
    return {xa[n][3], xa[n][0]};
  endfunction

  // element index of beat b, half h (FP32) or of beat b (FP64)
  function automatic logic [5:0] beat_elem(input logic fp32, input logic di, input logic [5:0] bt, input logic h);
    if (!fp32) return di ? 6'(5 * int'(bt)) : bt;
    return di ? 6'(9 * (2 * int'(bt) + int'(h))) : 6'(2 * int'(bt) + int'(h));
  endfunction

  // ---------------- format conversion for ALS ----------------
  logic [63:0] cvt_in, cvt_out;
  logic        cvt_to64, cvt_same;
  fflags_t     cvt_flags;
  fp_cvt u_cvt (.in(cvt_in), .to64(cvt_to64), .rm(cmd.rm), .out(cvt_out), .flags(cvt_flags));

  logic        cmd_fp32, sdt32, ddt32, xdt32;
  logic [5:0]  ecmd;
  assign cmd_fp32 = cmd.dt[0];
  assign sdt32    = cmd.sdt[0];
  assign ddt32    = cmd.ddt[0];
  assign xdt32    = xdt[0];
  assign ecmd     = cmd.idx;

  always_comb begin
    cvt_to64 = !ddt32;
    cvt_same = (sdt32 == ddt32);
    if (cmd.kind == XC_ALS_RD)
      cvt_in = sdt32 ? 64'(rd32(g_xacc, ecmd)) : rd64(g_xacc, ecmd[3:0]);
    else
      cvt_in = sdt32 ? {32'b0, cmd.b[31:0]} : cmd.b[63:0];
  end

  // ---------------- accept logic ----------------
  logic is_mac, can_mac, drained, acc;
  assign is_mac  = (cmd.kind == XC_XMM) && (cmd.op == OP_MAC);
  assign drained = (drain_cnt == '0);
  assign can_mac = (nonmac_cnt == '0) && (drained || (cmd_fp32 == mac_fp32));
  assign cmd_ready = (state == S_IDLE) && (is_mac ? can_mac : drained);
  assign acc       = cmd_valid && cmd_ready;
  assign busy      = (state != S_IDLE) || !drained;

  // ---------------- XMM issue: broadcast, masking ----------------
  always_comb begin
    issue_fp32 = cmd_fp32;
    for (int n = 0; n < int'(N_AFPU); n++) begin
      g_issue[n] = acc && (cmd.kind == XC_XMM);
      g_a[n]     = cmd.a[64 * (n % 4) +: 64];
      if (cmd.ro) g_b[n] = cmd_fp32 ? {2{cmd.b[31:0]}} : cmd.b[63:0];
      else        g_b[n] = cmd.b[64 * (n / 4) +: 64];
      if (!cmd.msk) g_en[n] = 4'hF;
      else if (!cmd_fp32) g_en[n] = {3'b000, xmsk[cmd.tid][n]};
      else for (int k = 0; k < 4; k++) g_en[n][k] = xmsk[cmd.tid][elem32(n, k)];
    end
  end

  // ---------------- ELPR sequencing ----------------
  always_comb begin
    elpr_fp32  = xdt32;
    elpr_issue = (state == S_ELPR) && (elpr_cnt < CW'(4 * STAGES)) && (32'(elpr_cnt) % STAGES == 0);
    elpr_idx   = 2'(32'(elpr_cnt) / STAGES);
    preg_clear = (state == S_ELPR) && (elpr_cnt == CW'(4 * STAGES));
  end

  // ---------------- direct XACC writes ----------------
  logic [63:0] wval;
  always_comb begin
    g_wr_en   = '0;
    g_wr_data = '0;
    wval      = '0;
    if (acc && cmd.kind == XC_ALS_WR) begin
      wval = cvt_same ? cmd.b[63:0] : cvt_out;
      if (ddt32) begin
        for (int n = 0; n < int'(N_AFPU); n++)
          for (int k = 0; k < 4; k++)
            if (elem32(n, k) == int'(ecmd)) begin
              g_wr_en[n][k]   = 1'b1;
              g_wr_data[n][k] = wval[31:0];
            end
      end else begin
        g_wr_en[ecmd[3:0]]      = 4'b1001;
        g_wr_data[ecmd[3:0]][0] = wval[31:0];
        g_wr_data[ecmd[3:0]][3] = wval[63:32];
      end
    end else if (acc && cmd.kind == XC_AAS_SET) begin
      for (int n = 0; n < int'(N_AFPU); n++) begin
        if (cmd_fp32) begin
          g_wr_en[n]   = 4'hF;
          g_wr_data[n] = {4{cmd.b[31:0]}};
        end else begin
          g_wr_en[n]      = 4'b1001;
          g_wr_data[n][0] = cmd.b[31:0];
          g_wr_data[n][3] = cmd.b[63:32];
        end
      end
    end else if (state == S_LOAD && ld_valid) begin
      for (int h = 0; h < 2; h++) begin
        for (int n = 0; n < int'(N_AFPU); n++) begin
          if (seq_fp32) begin
            for (int k = 0; k < 4; k++)
              if (elem32(n, k) == int'(beat_elem(1'b1, seq_di, beat, h[0]))) begin
                g_wr_en[n][k]   = 1'b1;
                g_wr_data[n][k] = ld_data[32 * h +: 32];
              end
          end else if (h == 0 && n == int'(beat_elem(1'b0, seq_di, beat, 1'b0))) begin
            g_wr_en[n]      = 4'b1001;
            g_wr_data[n][0] = ld_data[31:0];
            g_wr_data[n][3] = ld_data[63:32];
          end
        end
      end
    end
  end
  assign ld_ready = (state == S_LOAD);

  // ---------------- response data ----------------
  logic [63:0] store_beat;
  always_comb begin
    if (seq_fp32)
      store_beat = {rd32(g_xacc, beat_elem(1'b1, seq_di, beat, 1'b1)),
                    rd32(g_xacc, beat_elem(1'b1, seq_di, beat, 1'b0))};
    else
      store_beat = rd64(g_xacc, beat_elem(1'b0, seq_di, beat, 1'b0)[3:0]);
  end
  assign rsp_valid = (state == S_RSP) || (state == S_STORE);
  assign rsp_data  = (state == S_STORE) ? store_beat : rsp_q;
  assign rsp_last  = (state == S_RSP) || (beat == nbeats - 1'b1);

  // ---------------- flags gathered from the grid ----------------
  fflags_t grid_flags;
  always_comb begin
    grid_flags = '0;
    for (int n = 0; n < int'(N_AFPU); n++) if (g_fv[n]) grid_flags = grid_flags | g_flags[n];
  end

  // ---------------- state machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      for (int t = 0; t < int'(N_THREADS); t++) xmsk[t] <= '1;
      xdt        <= DT_FP64;
      xfcsr      <= '0;
      elpr_cnt   <= '0;
      drain_cnt  <= '0;
      nonmac_cnt <= '0;
      mac_fp32   <= 1'b0;
      beat       <= '0;
      nbeats     <= '0;
      seq_fp32   <= 1'b0;
      seq_di     <= 1'b0;
      rsp_q      <= '0;
    end else begin
      if (drain_cnt != '0)  drain_cnt  <= drain_cnt - 1'b1;
      if (nonmac_cnt != '0) nonmac_cnt <= nonmac_cnt - 1'b1;
      xfcsr[3:0] <= xfcsr[3:0] | grid_flags;

      unique case (state)
        S_IDLE: if (acc) begin
          unique case (cmd.kind)
            XC_XMM: begin
              drain_cnt <= ($bits(drain_cnt))'(STAGES - 1);
              if (cmd.op != OP_MAC) nonmac_cnt <= ($bits(nonmac_cnt))'(STAGES - 1);
              else mac_fp32 <= cmd_fp32;
              xdt <= cmd.dt;
            end
            XC_ELPR: begin
              state    <= S_ELPR;
              elpr_cnt <= '0;
            end
            XC_ALS_RD: begin
              state <= S_RSP;
              rsp_q <= cvt_same ? cvt_in : cvt_out;
              if (!cvt_same) xfcsr[3:0] <= xfcsr[3:0] | cvt_flags;
            end
            XC_ALS_WR: begin
              xdt <= cmd.ddt;
              if (!cvt_same) xfcsr[3:0] <= xfcsr[3:0] | cvt_flags;
            end
            XC_AAS_LOAD, XC_AAS_STORE: begin
              state    <= (cmd.kind == XC_AAS_LOAD) ? S_LOAD : S_STORE;
              beat     <= '0;
              nbeats   <= cmd.di ? 6'd4 : (cmd_fp32 ? 6'd32 : 6'd16);
              seq_fp32 <= cmd_fp32;
              seq_di   <= cmd.di;
              if (cmd.kind == XC_AAS_LOAD) xdt <= cmd.dt;
            end
            XC_AAS_SET: xdt <= cmd.dt;
            XC_FCSR_RD: begin
              state <= S_RSP;
              rsp_q <= 64'(xfcsr);
            end
            XC_FCSR_WR: xfcsr <= cmd.b[6:0];
            XC_MSK_IND: xmsk[cmd.tid] <= cmd.b[63:0];
            XC_MSK_IMM: xmsk[cmd.tid][16 * cmd.mg +: 16] <= cmd.imm;
            default: ;
          endcase
        end
        S_ELPR: begin
          if (elpr_cnt == CW'(4 * STAGES)) state <= S_IDLE;
          else elpr_cnt <= elpr_cnt + 1'b1;
        end
        S_LOAD: if (ld_valid) begin
          beat <= beat + 1'b1;
          if (beat == nbeats - 1'b1) state <= S_IDLE;
        end
        S_STORE: if (rsp_ready) begin
          beat <= beat + 1'b1;
          if (beat == nbeats - 1'b1) state <= S_IDLE;
        end
        S_RSP: if (rsp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign xfcsr_o = xfcsr;
  assign xdt_o   = xdt;

  // handshake rules
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp_data));
  // the grid moves in lock step
  assert property (@(posedge clk) disable iff (!rst_n) (g_busy == '0) || (g_busy == '1));

endmodule
