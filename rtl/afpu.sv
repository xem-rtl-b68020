// afpu: one AB21 FPU cell of the XEM grid: a DFPU, an SFPU, four 32-bit
// accumulation registers XACC0..3 and four pipeline registers (PREG) per
// XACC.
//
// Operands a and b are 64-bit: one FP64 number or two FP32 numbers
// {hi, lo}. In FP64 mode the DFPU result is split into XACC0 (low word) and
// XACC3 (high word); XACC1 and XACC2 keep their contents. In FP32 mode the
// cell computes the 2x2 outer product of {a.hi, a.lo} and {b.hi, b.lo}:
//   XACC0 = a.lo op b.lo   (DFPU)      XACC1 = a.hi op b.lo   (SFPU)
//   XACC2 = a.lo op b.hi   (SFPU)      XACC3 = a.hi op b.hi   (DFPU)
// XACCk sits at row k/2, column k%2 of the block; rows follow B, columns A.
//
// MAC: results go to the PREG selected by a pointer that advances every
// cycle (0,1,2,3,0,...), and the FMA addend is read from that same PREG.
// As the FPUs have exactly as many stages as there are PREGs, a MAC can
// issue every cycle without a hazard: its result is written back just
// before the pointer returns to the same PREG. A MAC leaves the element
// marked dirty. ELPR (end-loop pipeline reduction) is driven by the XEM
// through elpr_issue/elpr_idx: step i computes XACC = XACC + PREG[i] for
// each dirty element; the XEM spaces the four steps STAGES cycles apart and
// then pulses preg_clear, which zeroes all PREGs and dirty marks.
// ADD, SUB and MUL write XACC directly. With ao set, XACC is operand A
// (FP64: {XACC3,XACC0}; FP32: each element's own XACC).
//
// Masking: en[k] enables element k (FP64 uses en[0]); a disabled element
// keeps its registers and contributes no flags. Direct writes (wr_en,
// wr_data) come from XACC load/store instructions; the XEM never issues
// them while an FPU result is in flight (checked by an assertion).
//
// Timing: issue in cycle t, destination register updated at the end of
// cycle t+STAGES-1, visible in cycle t+STAGES; flags_valid/flags mark the
// write-back cycle.
//
// From the architecture: DFPU plus SFPU per cell, four XACC words, the FP64
// result split over XACC0 and XACC3, SFPU results in XACC1 and XACC2, four
// PREGs per XACC used round robin with one MAC per cycle, the ELPR reduction
// and the clearing of PREGs after it. Choices made here: which FP64 half
// goes to which XACC, the exact XACC1/XACC2 pairing, the dirty marks that keep
// masked elements out of ELPR, and the order of the four reduction steps.
// The assertions are disabled during reset through rst_n, which the linter
// reports as a reset used both asynchronously and in a synchronous
// expression; that use is confined to the checks and is intended.
module afpu #(
  parameter int unsigned STAGES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // XMM issue
  input  logic                  issue,
  input  xem_pkg::xop_e         op,
  input  logic                  fp32,
  input  xem_pkg::rm_e          rm,
  input  logic                  ao,
  input  logic [3:0]            en,
  input  logic [63:0]           a,
  input  logic [63:0]           b,
  // end-loop pipeline reduction
  input  logic                  elpr_issue,
  input  logic [1:0]            elpr_idx,
  input  logic                  preg_clear,
  // direct XACC access
  input  logic [3:0]            wr_en,
  input  logic [3:0][31:0]      wr_data,
  output logic [3:0][31:0]      xacc_o,
  // status
  output logic                  busy,
  output logic                  flags_valid,
  output xem_pkg::fflags_t      flags
);
  import xem_pkg::*;

  localparam int unsigned NR = STAGES - 1;

  typedef struct packed {
    logic       v;
    logic       to_preg;
    logic [1:0] pidx;
    logic       fp32;
    logic [3:0] en;
  } ctl_t;

  logic [3:0][31:0]         xacc;
  logic [3:0][STAGES-1:0][31:0] preg;
  logic [3:0]               dirty;
  logic [$clog2(STAGES)-1:0] ptr;
  ctl_t                     ctl_q [NR];
  ctl_t                     ctl_in, wb;

  // ---------------- issue-side operand selection ----------------
  logic                     go, f32;
  xop_e                     fop;
  logic [$clog2(STAGES)-1:0] ridx;
  logic [63:0]              d_a, d_b, d_c, s_b;
  logic [31:0]              s_a0, s_a1, s_c0, s_c1;

  always_comb begin
    go   = issue || elpr_issue;
    f32  = fp32;
    fop  = elpr_issue ? OP_ADD : op;
    ridx = elpr_issue ? elpr_idx[$clog2(STAGES)-1:0] : ptr;
    if (elpr_issue) begin
      d_a  = {xacc[3], xacc[0]};
      d_b  = {preg[3][ridx], preg[0][ridx]};
      s_a0 = xacc[2];
      s_a1 = xacc[1];
      s_b  = {preg[2][ridx], preg[1][ridx]};   // lane 0 sees hi half, lane 1 lo half
    end else begin
      d_a  = ao ? {xacc[3], xacc[0]} : a;
      d_b  = b;
      s_a0 = ao ? xacc[2] : a[31:0];
      s_a1 = ao ? xacc[1] : a[63:32];
      s_b  = b;
    end
    d_c  = {preg[3][ridx], preg[0][ridx]};
    s_c0 = preg[2][ridx];
    s_c1 = preg[1][ridx];

    ctl_in.v       = go;
    ctl_in.to_preg = issue && (op == OP_MAC);
    ctl_in.pidx    = 2'(ptr);
    ctl_in.fp32    = f32;
    ctl_in.en      = elpr_issue ? dirty : en;
    if (!f32) ctl_in.en = {3'b000, ctl_in.en[0]};
  end

  logic             dv, sv;
  logic [63:0]      dres;
  logic [31:0]      sres0, sres1;
  fflags_t          dflg, sflg;

  dfpu #(.STAGES(STAGES)) u_dfpu (
    .clk, .rst_n, .in_valid(go), .op(fop), .fp32(f32), .rm,
    .a(d_a), .b(d_b), .c(d_c), .out_valid(dv), .res(dres), .flags(dflg));

  sfpu #(.STAGES(STAGES)) u_sfpu (
    .clk, .rst_n, .in_valid(go && f32), .op(fop), .rm,
    .a0(s_a0), .a1(s_a1), .b(s_b), .c0(s_c0), .c1(s_c1),
    .out_valid(sv), .res0(sres0), .res1(sres1), .flags(sflg));

  // ---------------- control pipeline ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NR); i++) ctl_q[i] <= '0;
      ptr <= '0;
    end else begin
      ctl_q[0] <= ctl_in;
      for (int i = 1; i < int'(NR); i++) ctl_q[i] <= ctl_q[i-1];
      ptr <= ptr + 1'b1;
    end
  end
  assign wb = ctl_q[NR-1];

  // ---------------- write-back ----------------
  logic [3:0][31:0] wres;
  always_comb begin
    wres[0] = dres[31:0];
    wres[3] = dres[63:32];
    wres[2] = sres0;
    wres[1] = sres1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xacc  <= '0;
      preg  <= '0;
      dirty <= '0;
    end else begin
      for (int k = 0; k < 4; k++) begin
        if (wr_en[k]) xacc[k] <= wr_data[k];
      end
      if (wb.v) begin
        if (!wb.fp32) begin
          if (wb.en[0]) begin
            if (wb.to_preg) begin
              preg[0][wb.pidx] <= dres[31:0];
              preg[3][wb.pidx] <= dres[63:32];
              dirty[0]         <= 1'b1;
            end else begin
              xacc[0] <= dres[31:0];
              xacc[3] <= dres[63:32];
            end
          end
        end else begin
          for (int k = 0; k < 4; k++) begin
            if (wb.en[k]) begin
              if (wb.to_preg) begin
                preg[k][wb.pidx] <= wres[k];
                dirty[k]         <= 1'b1;
              end else begin
                xacc[k] <= wres[k];
              end
            end
          end
        end
      end
      if (preg_clear) begin
        preg  <= '0;
        dirty <= '0;
      end
    end
  end

  always_comb begin
    flags_valid = wb.v;
    flags       = '0;
    if (wb.v) begin
      if (wb.en[0] || wb.en[3]) flags = flags | dflg;
      if (wb.fp32 && (wb.en[1] || wb.en[2])) flags = flags | sflg;
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < int'(NR); i++) busy = busy | ctl_q[i].v;
  end

  assign xacc_o = xacc;

  // the FPU and the direct write port never write in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(wb.v && (wr_en != '0)));
  // a reduction only starts once the pipeline is empty
  assert property (@(posedge clk) disable iff (!rst_n) !(elpr_issue && issue));
  // dfpu and sfpu stay in step
  assert property (@(posedge clk) disable iff (!rst_n) !(wb.v && wb.fp32) || (dv && sv));

endmodule
