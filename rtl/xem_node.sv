// xem_node: one XEM accelerator with its issue path - the part of an XECM
// compute module that turns the XEM custom instructions of the RISC-V XEC
// core into XEM commands - and the AXSP scratchpad that holds the operands.
//
// The XEC core itself is outside this design: the core presents each XEM
// instruction on the instruction port together with the values of its
// register fields, and receives register results on the write-back port.
// ELPR, which the core raises after a MAC loop, arrives on the same port
// with is_elpr set (the instruction word is then ignored).
//
// Flow: an accepted instruction is decoded (xem_decode) and its operand
// reads are started on AXSP ports A and B. One cycle later the line data is
// in, the XMM command is complete and is offered to the XEM. The
// instruction port is stalled while the XEM holds the command back, so a
// stream of MACs goes through at one per cycle, and ADD/SUB/MUL/ELPR and
// transfers stall it as long as the XEM is busy. In RO mode the XEM
// replicates the register scalar; in AO mode no A operand is fetched.
// AAS load streams the XACC image from AXSP (one 64-bit word per cycle,
// consecutive addresses), AAS store writes the beats the XEM emits back to
// AXSP; the instruction port is stalled during these transfers. ALS loads
// and XFCSR reads return their value on the write-back port.
// The external port reaches AXSP port C whenever no AAS transfer uses it
// (ext_ready), so that a host can fill and read the scratchpad.
//
// From the architecture: the core fetches XMM operands from AXSP and hands
// them to the XEM with the instruction, ELPR is a signal the core raises
// after a MAC loop, AAS moves XACC to and from memory, ALS and XFCSR read
// results go to core registers. Choices made here: the one-stage decode and
// fetch, the word-per-cycle AAS transfer at consecutive addresses, and the
// external scratchpad port; the core, its caches and the sharing of AXSP
// between four compute modules are not part of this design.
// The handshake assertions are disabled during reset through rst_n; the
// linter reports this as a reset used both asynchronously and in a
// synchronous expression, which is confined to the checks and intended.
module xem_node #(
  parameter int unsigned STAGES     = 4,
  parameter int unsigned AXSP_BYTES = 256 * 1024
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // instructions from the XEC core
  input  logic                           instr_valid,
  output logic                           instr_ready,
  input  logic                           is_elpr,
  input  logic [31:0]                    instr,
  input  logic                           tid,
  input  logic [63:0]                    rs1_val,
  input  logic [63:0]                    rs2_val,
  input  logic [63:0]                    rs3_val,
  input  logic [63:0]                    rd_val,
  output logic                           illegal,
  // register write-back to the XEC core
  output logic                           wb_valid,
  output logic                           wb_tid,
  output logic                           wb_fp,
  output logic [4:0]                     wb_rd,
  output logic [63:0]                    wb_data,
  // external access to AXSP port C
  input  logic                           ext_en,
  input  logic                           ext_we,
  input  logic [$clog2(AXSP_BYTES)-1:0]  ext_addr,
  input  logic [63:0]                    ext_wdata,
  output logic [63:0]                    ext_rdata,
  output logic                           ext_ready,
  // status
  output logic                           busy,
  output logic [6:0]                     xfcsr,
  output xem_pkg::xdt_e                  xdt
);
  import xem_pkg::*;

  localparam int unsigned AW = $clog2(AXSP_BYTES);

  // ---------------- decode stage ----------------
  xem_dec_t d, x_dec;
  logic     x_valid, x_elpr, x_tid;
  logic     cmd_valid, cmd_ready, acc_cmd;

  xem_decode u_dec (.instr, .tid, .rs1_val, .rs2_val, .rs3_val, .rd_val, .dec(d));

  typedef enum logic [1:0] {Q_RUN, Q_LOAD, Q_STORE, Q_WAIT} seq_e;
  seq_e             seq;
  logic [AW-1:0]    seq_addr;
  logic [5:0]       seq_left;       // AXSP reads still to issue (load)
  logic             ld_pend;        // a load word arrives this cycle
  logic             pend_rsp;       // an ALS/XFCSR read result is awaited
  logic             pend_fp, pend_tid;
  logic [4:0]       pend_rd;

  logic take;
  assign instr_ready = (seq == Q_RUN) && !pend_rsp && (!x_valid || acc_cmd);
  assign take        = instr_valid && instr_ready && (is_elpr || d.valid);
  assign illegal     = instr_valid && instr_ready && !is_elpr && !d.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid <= 1'b0;
      x_dec   <= '0;
      x_elpr  <= 1'b0;
      x_tid   <= 1'b0;
    end else begin
      if (acc_cmd) x_valid <= 1'b0;
      if (take) begin
        x_valid <= 1'b1;
        x_dec   <= d;
        x_elpr  <= is_elpr;
        x_tid   <= tid;
      end
    end
  end

  // ---------------- AXSP ----------------
  logic [255:0] rdata_a, rdata_b;
  logic         en_c, we_c;
  logic [AW-1:0] addr_c;
  logic [63:0]  wdata_c, rdata_c;

  axsp #(.SIZE_BYTES(AXSP_BYTES)) u_axsp (
    .clk,
    .re_a(take && !is_elpr && d.need_a), .addr_a(AW'(d.addr_a)), .rdata_a,
    .re_b(take && !is_elpr && d.need_b), .addr_b(AW'(d.addr_b)), .rdata_b,
    .en_c, .we_c, .addr_c, .wdata_c, .rdata_c);

  // ---------------- XEM ----------------
  xem_cmd_t     cmd;
  logic         ld_valid, ld_ready, rsp_valid, rsp_ready, rsp_last, xem_busy;
  logic [63:0]  rsp_data;

  always_comb begin
    cmd = x_dec.cmd;
    if (x_elpr) begin
      cmd      = '0;
      cmd.kind = XC_ELPR;
      cmd.tid  = x_tid;
    end else if (x_dec.cmd.kind == XC_XMM) begin
      cmd.a = x_dec.need_a ? rdata_a : '0;
      if (x_dec.need_b) cmd.b = rdata_b;
    end
  end
  assign cmd_valid = x_valid;
  assign acc_cmd   = cmd_valid && cmd_ready;

  xem #(.STAGES(STAGES)) u_xem (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .ld_valid, .ld_ready, .ld_data(rdata_c),
    .rsp_valid, .rsp_ready, .rsp_data, .rsp_last,
    .busy(xem_busy), .xfcsr_o(xfcsr), .xdt_o(xdt));

  // ---------------- AAS transfers and read results ----------------
  assign rsp_ready = 1'b1;
  assign ld_valid  = ld_pend;
  assign ext_ready = (seq == Q_RUN);
  assign ext_rdata = rdata_c;

  always_comb begin
    en_c    = 1'b0;
    we_c    = 1'b0;
    addr_c  = seq_addr;
    wdata_c = rsp_data;
    if (seq == Q_LOAD && seq_left != '0) begin
      en_c = 1'b1;
    end else if (seq == Q_STORE && rsp_valid) begin
      en_c = 1'b1;
      we_c = 1'b1;
    end else if (seq == Q_RUN) begin
      en_c    = ext_en;
      we_c    = ext_we;
      addr_c  = ext_addr;
      wdata_c = ext_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq      <= Q_RUN;
      seq_addr <= '0;
      seq_left <= '0;
      ld_pend  <= 1'b0;
      pend_rsp <= 1'b0;
      pend_fp  <= 1'b0;
      pend_tid <= 1'b0;
      pend_rd  <= '0;
    end else begin
      ld_pend <= 1'b0;
      unique case (seq)
        Q_RUN: if (acc_cmd && !x_elpr) begin
          if (x_dec.aas_mem) begin
            seq      <= (x_dec.cmd.kind == XC_AAS_LOAD) ? Q_LOAD : Q_STORE;
            seq_addr <= AW'(x_dec.aas_addr);
            seq_left <= x_dec.cmd.di ? 6'd4 : (x_dec.cmd.dt[0] ? 6'd32 : 6'd16);
          end
          if (x_dec.rd_we) begin
            pend_rsp <= 1'b1;
            pend_fp  <= x_dec.rd_fp;
            pend_tid <= x_tid;
            pend_rd  <= x_dec.rd;
          end
        end
        Q_LOAD: begin
          if (seq_left != '0) begin
            ld_pend  <= 1'b1;
            seq_left <= seq_left - 1'b1;
            seq_addr <= seq_addr + AW'(8);
          end else if (!ld_pend) begin
            seq <= Q_RUN;
          end
        end
        Q_STORE: if (rsp_valid) begin
          seq_addr <= seq_addr + AW'(8);
          if (rsp_last) seq <= Q_RUN;
        end
        default: seq <= Q_RUN;
      endcase
      if (pend_rsp && rsp_valid) pend_rsp <= 1'b0;
    end
  end

  assign wb_valid = pend_rsp && rsp_valid;
  assign wb_tid   = pend_tid;
  assign wb_fp    = pend_fp;
  assign wb_rd    = pend_rd;
  assign wb_data  = rsp_data;
  assign busy     = x_valid || xem_busy || (seq != Q_RUN) || pend_rsp;

  // the XEM takes a load word whenever one is offered
  assert property (@(posedge clk) disable iff (!rst_n) ld_valid |-> ld_ready);

endmodule
