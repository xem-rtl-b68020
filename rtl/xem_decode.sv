// xem_decode: decoder for the XEM custom RISC-V instructions (XMM, ALS, AAS,
// XFRCSR/XFSCSR, MSK) on the issuing core's side.
//
// Inputs are the 32-bit instruction and the values the core read for its
// register fields: rs1, rs2, rs3 (bits 11:7 of XMM) and the register named
// by rd (source of ALS stores and AAS set). The output is an xem_dec_t:
// the XEM command plus what the issue path must do around it - which
// AXSP operands to fetch, the AAS memory address, and whether a result
// comes back to register rd.
//
// Bit fields (bits 1:0 = 11 in every format):
//   XMM   [31:30] OP  [29] AM  [28] RO  [27] AO  [26] MSK  [25] -
//         [24:20] RS2 [19:15] RS1 [14:12] DT [11:7] RS3 [6:2] 00010
//   ALS   [31] LS [30:28] SDT [27:25] DDT [19:15] RS1 [14:12] RM [11:7] RD
//         [6:2] 11010
//   AAS   [31] 1 [30] DI [29:28] LSS [27:25] DT [19:15] RS1 [11:7] RD
//         [6:2] 11101
//   XFCSR [14] 1 [13] RS [12] 0 [19:15] RS1 [11:7] RD [6:2] 11110
//   MSK   [14:12] 001: [27:25] DT, mask in register RS1 (indirect)
//         [14:12] 011: [31:16] mask bits, [11:7] MG group (immediate)
//         [6:2] 01010
// XMM addressing: AM = 0 uses rs1 and rs2 as the addresses of A and B;
// AM = 1 uses A = rs1 + rs3[31:0] and B = rs2 + rs3[63:32]. With RO the
// value of rs2 itself is the scalar operand B; with AO operand A is not
// fetched. ALS: rs1 holds the XACC element index; LS = 0 moves the element
// to f[rd], LS = 1 moves f[rd] into the element. AAS: rs1 holds the AXSP
// address for load/store; set takes its value from register rd. XFCSR:
// RS = 0 reads XFCSR into x[rd], RS = 1 stores rs1[6:0] into it.
// Purely combinational.
//
// From the architecture: the five instruction formats, their opcodes, the
// OP/AM/RO/AO/MSK/DT/LS/SDT/DDT/RM/DI/LSS/RS/MG fields and the relative
// address formula. Choices made here: the order of the single-bit XMM flags,
// the mask field position of MSK immediate, the RS polarity, treating rs1 of
// ALS as the element index and rd as the ALS/AAS-set data register, and
// rejecting reserved data types and LSS = 11 as non-XEM instructions.
module xem_decode (
  input  logic [31:0]        instr,
  input  logic               tid,
  input  logic [63:0]        rs1_val,
  input  logic [63:0]        rs2_val,
  input  logic [63:0]        rs3_val,
  input  logic [63:0]        rd_val,
  output xem_pkg::xem_dec_t  dec
);
  import xem_pkg::*;

  logic [6:0] opc;
  logic [2:0] f3;
  assign opc = instr[6:0];
  assign f3  = instr[14:12];

  always_comb begin
    dec         = '0;
    dec.cmd.tid = tid;
    dec.rd      = instr[11:7];
    unique case (opc)
      OPC_XMM: begin
        dec.valid      = (instr[14:13] == 2'b00);    // FP64 or FP32
        dec.cmd.kind   = XC_XMM;
        dec.cmd.op     = xop_e'(instr[31:30]);
        dec.cmd.ro     = instr[28];
        dec.cmd.ao     = instr[27];
        dec.cmd.msk    = instr[26];
        dec.cmd.dt     = xdt_e'(f3);
        dec.need_a     = !instr[27];
        dec.need_b     = !instr[28];
        dec.addr_a     = instr[29] ? AXSP_AW'(rs1_val + 64'(rs3_val[31:0]))
                                   : AXSP_AW'(rs1_val);
        dec.addr_b     = instr[29] ? AXSP_AW'(rs2_val + 64'(rs3_val[63:32]))
                                   : AXSP_AW'(rs2_val);
        if (instr[28]) dec.cmd.b[63:0] = rs2_val;
      end
      OPC_ALS: begin
        dec.valid      = (instr[30:29] == 2'b00) && (instr[27:26] == 2'b00);
        dec.cmd.kind   = instr[31] ? XC_ALS_WR : XC_ALS_RD;
        dec.cmd.sdt    = xdt_e'(instr[30:28]);
        dec.cmd.ddt    = xdt_e'(instr[27:25]);
        dec.cmd.rm     = rm_e'(f3);
        dec.cmd.idx    = rs1_val[5:0];
        dec.cmd.b      = 256'(rd_val);
        dec.rd_we      = !instr[31];
        dec.rd_fp      = 1'b1;
      end
      OPC_AAS: begin
        dec.valid      = instr[31] && (instr[29:28] != 2'b11) && (instr[27:26] == 2'b00);
        dec.cmd.di     = instr[30];
        dec.cmd.dt     = xdt_e'(instr[27:25]);
        unique case (instr[29:28])
          2'b00:   dec.cmd.kind = XC_AAS_LOAD;
          2'b01:   dec.cmd.kind = XC_AAS_STORE;
          default: dec.cmd.kind = XC_AAS_SET;
        endcase
        dec.aas_mem    = (instr[29] == 1'b0);
        dec.aas_addr   = AXSP_AW'(rs1_val);
        dec.cmd.b      = 256'(rd_val);
      end
      OPC_XFCSR: begin
        dec.valid      = instr[14] && !instr[12];
        dec.cmd.kind   = instr[13] ? XC_FCSR_WR : XC_FCSR_RD;
        dec.cmd.b      = 256'(rs1_val);
        dec.rd_we      = !instr[13];
      end
      OPC_MSK: begin
        dec.valid      = (f3 == 3'b001) || (f3 == 3'b011);
        dec.cmd.kind   = instr[13] ? XC_MSK_IMM : XC_MSK_IND;
        dec.cmd.dt     = xdt_e'(instr[27:25]);
        dec.cmd.b      = 256'(rs1_val);
        dec.cmd.imm    = instr[31:16];
        dec.cmd.mg     = instr[8:7];
      end
      default: dec.valid = 1'b0;
    endcase
    if (!dec.valid) dec = '0;
  end

endmodule
