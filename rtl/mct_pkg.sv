// mct_pkg - types and constants shared by the multi-tag taint coprocessor.
//
// A taint tag is a bit vector. Every byte of a 64-bit register or memory
// doubleword owns SRC_TAGS (128) bits, one per byte of the taint source, so the
// tag of a whole doubleword is 8 x 128 = 1024 bits. Byte i of the data owns
// tag bits [i*128 +: 128]. Taint calculation is done on whole vectors at once.
//
// The coprocessor runs small programs of microcodes (one program per
// "calculation rule"). The function codes follow the document's microcode
// table: custom tag microcodes (tag calculation, tag fetch/save, data
// fetch/save, memory filter) and general 64-bit data microcodes. The numeric
// encodings, the 32-bit microcode word layout and the operand-select codes
// are this design's own choice.
package mct_pkg;

  // ---- sizes ---------------------------------------------------------------
  parameter int unsigned XLEN        = 64;          // RV64 data width
  parameter int unsigned BYTES       = XLEN / 8;    // 8 bytes per doubleword
  parameter int unsigned SRC_TAGS    = 128;         // taint sources per byte
  parameter int unsigned TAG_W       = SRC_TAGS * BYTES;  // 1024-bit tag
  parameter int unsigned BEATS       = TAG_W / XLEN;      // 16 bus beats per tag
  parameter int unsigned NUM_XREGS   = 32;          // RISC-V integer registers
  parameter int unsigned NUM_LREGS   = 6;           // Local_Reg0-5
  parameter int unsigned UCODE_W     = 32;          // microcode word width
  parameter int unsigned RULE_W      = 4;           // rule index width (16 rules max)

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [XLEN-1:0]  xword_t;

  // ---- microcode function codes -------------------------------------------
  typedef enum logic [4:0] {
    FN_END             = 5'd0,   // end of the sequence (empty slot)
    // custom: tag calculation
    FN_ALU_TAINT_REG   = 5'd1,
    FN_ALU_TAINT_IMM   = 5'd2,
    FN_ALU_TAINT_SHIFT = 5'd3,
    // custom: tag fetch and save
    FN_PART_TAG_LOAD   = 5'd4,
    FN_PART_TAG_STORE  = 5'd5,
    FN_MASK_TAG        = 5'd6,
    FN_WRITE_TAG       = 5'd7,
    FN_READ_TAG        = 5'd8,
    // custom: data fetch and save
    FN_WRITE_DATA      = 5'd9,
    FN_READ_DATA       = 5'd10,
    // custom: memory filter
    FN_FILTER          = 5'd11,
    // general 64-bit data calculation
    FN_ADD             = 5'd16,
    FN_SUB             = 5'd17,
    FN_SL              = 5'd18,
    FN_SR              = 5'd19,
    FN_SLT             = 5'd20,
    FN_SEQ             = 5'd21,
    FN_AND             = 5'd22,
    FN_OR              = 5'd23,
    FN_XOR             = 5'd24
  } fn_e;

  // ---- operand selects -----------------------------------------------------
  // A 4-bit select names a 64-bit data operand for data microcodes and a
  // 1024-bit tag operand for tag microcodes.
  // data operands
  parameter logic [3:0] D_LR0     = 4'd0;   // Local_Reg0..5 = 0..5
  parameter logic [3:0] D_MADDR   = 4'd6;   // memory address of the traced instruction
  parameter logic [3:0] D_PTROOT  = 4'd7;   // first address of the root taint page table
  parameter logic [3:0] D_IMM     = 4'd8;   // zero-extended microcode immediate
  parameter logic [3:0] D_PC      = 4'd9;   // PC of the traced instruction
  parameter logic [3:0] D_ZERO    = 4'd15;
  // tag operands
  parameter logic [3:0] T_RS1     = 4'd0;   // TAINT_VEC: taint register of rs1
  parameter logic [3:0] T_RS2     = 4'd1;   // TAINT_VEC: taint register of rs2
  parameter logic [3:0] T_RD      = 4'd2;   // TAINT_VEC: taint register of rd
  parameter logic [3:0] T_TR0     = 4'd3;   // fixed Taint_Reg0
  parameter logic [3:0] T_TR1     = 4'd4;   // fixed Taint_Reg1
  parameter logic [3:0] T_ZERO    = 4'd15;

  // microcode word: {fn, a, b, d, imm}
  typedef struct packed {
    fn_e         fn;    // [31:27]
    logic [3:0]  a;     // [26:23] first input
    logic [3:0]  b;     // [22:19] second input
    logic [3:0]  d;     // [18:15] output
    logic [14:0] imm;   // [14:0]  immediate
  } ucode_t;

  // record produced by the trace unit for one retired instruction
  typedef struct packed {
    logic [31:0] inst;
    xword_t      pc;
    xword_t      maddr;
  } trace_t;

  // queue entry: the record and the rule chosen by the monitoring unit
  typedef struct packed {
    logic [RULE_W-1:0] rule;
    trace_t            tr;
  } qentry_t;

  // ---- RoCC command function codes (funct7) --------------------------------
  typedef enum logic [6:0] {
    CMD_MONITOR_START = 7'd0,
    CMD_MONITOR_END   = 7'd1,
    CMD_SET_PAGETABLE = 7'd2,
    CMD_CHECK_STATUS  = 7'd3,
    CMD_RESUME        = 7'd4,
    CMD_CFG_MONITOR   = 7'd5,
    CMD_CFG_FILT_BASE = 7'd6,
    CMD_CFG_FILT_LIM  = 7'd7,
    CMD_WRITE_UCODE   = 7'd8,
    CMD_WRITE_TREG    = 7'd9,
    CMD_READ_TREG     = 7'd10
  } cmd_e;

  // exception causes reported to the CPU
  parameter logic [3:0] CAUSE_QUEUE_FULL = 4'd1;
  parameter logic [3:0] CAUSE_BAD_UCODE  = 4'd2;

  // ---- RV64I opcodes used to pick a taint-propagation variant --------------
  parameter logic [6:0] OPC_LOAD   = 7'b0000011;
  parameter logic [6:0] OPC_STORE  = 7'b0100011;
  parameter logic [6:0] OPC_OPIMM  = 7'b0010011;
  parameter logic [6:0] OPC_OPIMM32= 7'b0011011;
  parameter logic [6:0] OPC_OP     = 7'b0110011;
  parameter logic [6:0] OPC_OP32   = 7'b0111011;

  // number of bytes accessed by a load/store, from funct3[1:0]
  function automatic int unsigned access_bytes(input logic [1:0] size_code);
    return 1 << size_code;
  endfunction

endpackage
