// tb_xem_decode: self-checking test of the XEM instruction decoder. Each
// instruction format is encoded here field by field, with random field and
// register values, and the decoded command, operand addresses (absolute and
// relative addressing), fetch requests and write-back fields are compared
// with what the format prescribes. Unknown opcodes and reserved encodings
// must decode as invalid.
//
// Opcodes and field meanings follow the architecture; the order of the XMM
// flag bits, the MSK immediate field position and the RS polarity are this
// design's own choices.
module tb_xem_decode;
  import xem_pkg::*;

  logic [31:0] instr;
  logic        tid;
  logic [63:0] rs1_val, rs2_val, rs3_val, rd_val;
  xem_dec_t    dec;
  int checks = 0, failures = 0;

  xem_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [255:0] got, input logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: instr %h got %h exp %h", what, instr, got, exp);
    end
  endtask

  initial begin
    logic [1:0] op; logic am, ro, ao, msk, ls, di, st; logic [2:0] dt, sdt, ddt, rm; logic [1:0] lss;
    logic [4:0] rd; logic [15:0] m; logic [1:0] g;
    for (int i = 0; i < 300; i++) begin
      rs1_val = {$urandom, $urandom}; rs2_val = {$urandom, $urandom};
      rs3_val = {$urandom, $urandom}; rd_val = {$urandom, $urandom}; tid = 1'($urandom);
      rd = 5'($urandom);
      // ---- XMM ----
      op = 2'($urandom); am = 1'($urandom); ro = 1'($urandom); ao = 1'($urandom); msk = 1'($urandom);
      dt = 3'($urandom_range(0, 1));
      instr = {op, am, ro, ao, msk, 1'b0, 5'd2, 5'd1, dt, 5'd3, 7'b0001011};
      #1;
      check("xmm valid", 256'(dec.valid), 256'(1));
      check("xmm kind", 256'(dec.cmd.kind), 256'(XC_XMM));
      check("xmm op/dt", {dec.cmd.op, dec.cmd.dt}, {op, dt});
      check("xmm flags", {dec.cmd.ro, dec.cmd.ao, dec.cmd.msk, dec.cmd.tid}, {ro, ao, msk, tid});
      check("xmm fetch", {dec.need_a, dec.need_b}, {!ao, !ro});
      check("xmm addr a", 256'(dec.addr_a), 256'(AXSP_AW'(am ? rs1_val + {32'b0, rs3_val[31:0]} : rs1_val)));
      if (!ro) check("xmm addr b", 256'(dec.addr_b), 256'(AXSP_AW'(am ? rs2_val + {32'b0, rs3_val[63:32]} : rs2_val)));
      else     check("xmm scalar b", 256'(dec.cmd.b[63:0]), 256'(rs2_val));
      check("xmm no write-back", 256'(dec.rd_we), 256'(0));
      // ---- ALS ----
      ls = 1'($urandom); sdt = 3'($urandom_range(0, 1)); ddt = 3'($urandom_range(0, 1)); rm = 3'($urandom_range(0, 4));
      instr = {ls, sdt, ddt, 5'd0, 5'd1, rm, rd, 7'b1101011};
      #1;
      check("als kind", 256'(dec.cmd.kind), 256'(ls ? XC_ALS_WR : XC_ALS_RD));
      check("als fields", {dec.valid, dec.cmd.sdt, dec.cmd.ddt, dec.cmd.rm, dec.cmd.idx}, {1'b1, sdt, ddt, rm, rs1_val[5:0]});
      check("als wb", {dec.rd_we, dec.rd_fp, dec.rd}, {!ls, 1'b1, rd});
      if (ls) check("als data", 256'(dec.cmd.b[63:0]), 256'(rd_val));
      // ---- AAS ----
      di = 1'($urandom); lss = 2'($urandom_range(0, 2)); dt = 3'($urandom_range(0, 1));
      instr = {1'b1, di, lss, dt, 5'd0, 5'd1, 3'd0, rd, 7'b1110111};
      #1;
      check("aas kind", 256'(dec.cmd.kind), 256'(lss == 0 ? XC_AAS_LOAD : lss == 1 ? XC_AAS_STORE : XC_AAS_SET));
      check("aas fields", {dec.valid, dec.cmd.di, dec.cmd.dt, dec.aas_mem}, {1'b1, di, dt, (lss != 2)});
      if (lss != 2) check("aas addr", 256'(dec.aas_addr), 256'(AXSP_AW'(rs1_val)));
      else          check("aas set value", 256'(dec.cmd.b[63:0]), 256'(rd_val));
      instr = {1'b1, di, 2'b11, dt, 5'd0, 5'd1, 3'd0, rd, 7'b1110111};
      #1;
      check("aas lss=11 invalid", 256'(dec.valid), 256'(0));
      // ---- XFCSR ----
      st = 1'($urandom);
      instr = {12'd0, 5'd1, 1'b1, st, 1'b0, rd, 7'b1111011};
      #1;
      check("xfcsr", {dec.valid, dec.cmd.kind, dec.rd_we, dec.rd_fp, dec.rd},
            {1'b1, st ? XC_FCSR_WR : XC_FCSR_RD, !st, 1'b0, rd});
      if (st) check("xfcsr value", 256'(dec.cmd.b[6:0]), 256'(rs1_val[6:0]));
      // ---- MSK ----
      instr = {4'd0, 3'd1, 5'd0, 5'd1, 3'b001, 5'd0, 7'b0101011};
      #1;
      check("msk indirect", {dec.valid, dec.cmd.kind, dec.cmd.b[63:0], dec.cmd.tid}, {1'b1, XC_MSK_IND, rs1_val, tid});
      m = 16'($urandom); g = 2'($urandom);
      instr = {m, 1'b0, 3'b011, 3'b000, g, 7'b0101011};
      #1;
      check("msk immediate", {dec.valid, dec.cmd.kind, dec.cmd.imm, dec.cmd.mg}, {1'b1, XC_MSK_IMM, m, g});
      // ---- not an XEM instruction ----
      instr = {$urandom};
      instr[6:0] = 7'b0110011;
      #1;
      check("other opcode invalid", 256'(dec.valid), 256'(0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
