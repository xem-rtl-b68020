// xem_pkg: types and constants shared by the XEM tensor accelerator.
//
// The XEM is an outer-product matrix engine of 4x4 AFPUs. Each AFPU holds
// four 32-bit accumulation registers (XACC0..3) and computes one FP64 or four
// FP32 operations per cycle. This package holds the operation codes, data
// type codes, rounding-mode encodings, the flag layout of XFCSR and the
// command format through which the issuing core drives the XEM.
//
// The operation, data-type, rounding-mode and opcode encodings follow the
// architecture; the command structure and the flag order are choices made
// here.
package xem_pkg;

  // Grid and register geometry
  localparam int unsigned GRID       = 4;            // AFPUs per row and per column
  localparam int unsigned N_AFPU     = GRID * GRID;  // 16 AFPUs
  localparam int unsigned N_XACC     = 4;            // 32-bit XACC registers per AFPU
  localparam int unsigned N_PREG     = 4;            // pipeline registers per XACC
  localparam int unsigned FPU_STAGES = 4;            // FPU latency in cycles
  localparam int unsigned N_THREADS  = 2;            // XEC hardware threads (XMSK copies)

  // XMM operation field
  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10,
    OP_MAC = 2'b11
  } xop_e;

  // Data type field (DT, SDT, DDT)
  typedef enum logic [2:0] {
    DT_FP64 = 3'b000,
    DT_FP32 = 3'b001
  } xdt_e;

  // RISC-V rounding modes
  typedef enum logic [2:0] {
    RM_RNE = 3'b000,
    RM_RTZ = 3'b001,
    RM_RDN = 3'b010,
    RM_RUP = 3'b011,
    RM_RMM = 3'b100
  } rm_e;

  // Floating-point exception flags, lower 4 bits of XFCSR
  typedef struct packed {
    logic nv;  // invalid operation
    logic of;  // overflow
    logic uf;  // underflow
    logic nx;  // inexact
  } fflags_t;

  // Command kinds accepted by the XEM
  typedef enum logic [3:0] {
    XC_XMM       = 4'd0,   // outer-product operation on operands A and B
    XC_ELPR      = 4'd1,   // end-loop pipeline reduction
    XC_ALS_RD    = 4'd2,   // read one XACC element
    XC_ALS_WR    = 4'd3,   // write one XACC element
    XC_AAS_LOAD  = 4'd4,   // write all (or diagonal) XACC from a beat stream
    XC_AAS_STORE = 4'd5,   // read all (or diagonal) XACC to a beat stream
    XC_AAS_SET   = 4'd6,   // set all XACC elements to one value
    XC_FCSR_RD   = 4'd7,   // read XFCSR
    XC_FCSR_WR   = 4'd8,   // write XFCSR
    XC_MSK_IND   = 4'd9,   // write a whole XMSK register
    XC_MSK_IMM   = 4'd10   // write one 16-bit masking group of XMSK
  } xcmd_e;

  typedef struct packed {
    xcmd_e        kind;
    xop_e         op;     // XMM operation
    xdt_e         dt;     // data type of the operation / of XACC
    xdt_e         sdt;    // ALS source type
    xdt_e         ddt;    // ALS destination type
    rm_e          rm;     // ALS conversion rounding mode
    logic         ao;     // XMM: XACC is operand A
    logic         ro;     // XMM: operand B is a register scalar (b[63:0])
    logic         msk;    // XMM: apply XMSK
    logic         di;     // AAS: diagonal mode
    logic         tid;    // issuing thread
    logic [5:0]   idx;    // ALS element index
    logic [1:0]   mg;     // MSK immediate masking group
    logic [15:0]  imm;    // MSK immediate masking bits
    logic [255:0] a;      // operand A (4 x 64 bit)
    logic [255:0] b;      // operand B (4 x 64 bit) or scalar data in b[63:0]
  } xem_cmd_t;

  // Major opcodes (bits 6:0) of the XEM custom instructions
  localparam logic [6:0] OPC_XMM   = 7'b0001011;
  localparam logic [6:0] OPC_ALS   = 7'b1101011;
  localparam logic [6:0] OPC_AAS   = 7'b1110111;
  localparam logic [6:0] OPC_XFCSR = 7'b1111011;
  localparam logic [6:0] OPC_MSK   = 7'b0101011;

  localparam int unsigned AXSP_AW = 18;   // 256 KB scratchpad byte address

  // Decoded XEM instruction, as produced by xem_decode
  typedef struct packed {
    logic                valid;    // a recognised XEM instruction
    xem_cmd_t            cmd;      // command for the XEM (operands a/b still empty for XMM)
    logic                need_a;   // operand A is read from AXSP at addr_a
    logic                need_b;   // operand B is read from AXSP at addr_b
    logic [AXSP_AW-1:0]  addr_a;
    logic [AXSP_AW-1:0]  addr_b;
    logic                aas_mem;  // AAS load/store: XACC beats move to/from AXSP
    logic [AXSP_AW-1:0]  aas_addr;
    logic                rd_we;    // the instruction returns a value to register rd
    logic                rd_fp;    // ... to the floating-point register file
    logic [4:0]          rd;
  } xem_dec_t;

  localparam logic [63:0] FP64_ONE = 64'h3FF0_0000_0000_0000;
  localparam logic [31:0] FP32_ONE = 32'h3F80_0000;

endpackage
