// alu_unit - vectorised taint calculation and 64-bit data calculation.
//
// Combinational. One microcode is evaluated per call: the tag path works on
// whole 1024-bit tag vectors (8 byte slots of 128 source bits each), the data
// path on 64-bit local-register values. Which propagation variant a tag
// microcode applies is chosen from the traced RISC-V instruction (opcode,
// funct3, funct7 bit 5 and shift amount), as the document says the tag
// calculation "completes the operation according to the instruction".
//
// Tag rules (each result byte is the OR, i.e. union, of the source bytes it
// can depend on):
//   ADD/SUB/ADDI(W)     carry chain: result byte i = union of operand bytes 0..i
//                       (this is the behaviour drawn for ADD: byte 0 keeps its
//                       own tag, every higher byte collects all lower tags)
//   AND/OR/XOR(+I)      bytewise union of the operands
//   SLT(I)(U)           result byte 0 = union of all operand bytes, others clean
//   shift by immediate  tag bytes move with the data; a shift that is not a
//                       whole byte also mixes in the neighbouring byte; SRA
//                       fills with the tag of the sign byte
//   shift by register   every result byte = union of all rs1 bytes and of rs2
//                       byte 0 (the amount is not known to the coprocessor)
//   *W forms            computed on bytes 0..3, bytes 4..7 copy byte 3 (sign
//                       extension)
//   other opcodes       bytewise union (a move when the second input is zero)
// Part-tag microcodes use funct3 (size, signedness) and the low 3 address bits:
//   PART_TAG_LOAD   extract the accessed bytes to byte 0 upwards; signed loads
//                   give the upper bytes the tag of the loaded top byte
//   PART_TAG_STORE  OR the low bytes of the first input into the accessed
//                   bytes of the output vector (clear them first with MASK_TAG
//                   to overwrite)
//   MASK_TAG        clear the accessed bytes of the first input
// The byte-level rules above are this design's reading of the document, which
// gives the rule names and the ADD example but no per-instruction formulas.
module alu_unit
  import mct_pkg::*;
(
  input  fn_e         fn,
  input  logic [31:0] inst,      // traced instruction
  input  logic [2:0]  maddr_lo,  // low 3 bits of the traced memory address
  input  tag_t        tag_a,     // first tag input
  input  tag_t        tag_b,     // second tag input
  input  tag_t        tag_d,     // current value of the tag output (merge)
  input  xword_t      data_a,
  input  xword_t      data_b,
  output tag_t        tag_y,
  output xword_t      data_y,
  output logic        is_tag_op, // fn writes a tag
  output logic        is_data_op // fn writes a data register
);

  typedef logic [SRC_TAGS-1:0] btag_t;   // the tag of one byte

  logic [6:0] opc;
  logic [2:0] f3;
  logic       f7b5;
  logic [5:0] shamt_imm;
  assign opc       = inst[6:0];
  assign f3        = inst[14:12];
  assign f7b5      = inst[30];
  assign shamt_imm = inst[25:20];

  function automatic btag_t bget(input tag_t t, input int i);
    return t[i*SRC_TAGS +: SRC_TAGS];
  endfunction

  // union of bytes 0..n-1
  function automatic btag_t union_n(input tag_t t, input int n);
    btag_t u = '0;
    for (int i = 0; i < BYTES; i++) if (i < n) u |= t[i*SRC_TAGS +: SRC_TAGS];
    return u;
  endfunction

  // carry-chain propagation over bytes 0..n-1
  function automatic tag_t prefix_n(input tag_t t, input int n);
    tag_t  y = '0;
    btag_t acc = '0;
    for (int i = 0; i < BYTES; i++) begin
      if (i < n) begin
        acc |= t[i*SRC_TAGS +: SRC_TAGS];
        y[i*SRC_TAGS +: SRC_TAGS] = acc;
      end
    end
    return y;
  endfunction

  // bytes 4..7 take the tag of byte 3
  function automatic tag_t sext32(input tag_t t);
    tag_t y = t;
    for (int i = 4; i < BYTES; i++) y[i*SRC_TAGS +: SRC_TAGS] = t[3*SRC_TAGS +: SRC_TAGS];
    return y;
  endfunction

  // every one of the first n bytes gets u, the rest are clean
  function automatic tag_t spread_n(input btag_t u, input int n);
    tag_t y = '0;
    for (int i = 0; i < BYTES; i++) if (i < n) y[i*SRC_TAGS +: SRC_TAGS] = u;
    return y;
  endfunction

  // keep bytes 0..n-1, clear the rest
  function automatic tag_t keep_n(input tag_t t, input int n);
    tag_t y = t;
    for (int i = 0; i < BYTES; i++) if (i >= n) y[i*SRC_TAGS +: SRC_TAGS] = '0;
    return y;
  endfunction

  // shift by a known amount sh; n = operand width in bytes (8 or 4)
  // kind: 0 left, 1 logical right, 2 arithmetic right
  // Whole bytes move as a vector shift by k byte slots; a partial-byte shift
  // also ORs in the vector shifted by k+1 slots (the neighbouring byte).
  function automatic tag_t shift_tag(input tag_t t, input logic [5:0] sh, input int kind, input int n);
    tag_t       src = keep_n(t, n);
    tag_t       y;
    logic [2:0] k   = sh[5:3];
    logic       r   = |sh[2:0];
    logic [6:0] bits_n = 7'(n * 8);
    if (kind == 0) begin
      y = src << {k, 7'b0};
      if (r) y |= src << ({k, 7'b0} + 11'(SRC_TAGS));
    end else begin
      y = src >> {k, 7'b0};
      if (r) y |= src >> ({k, 7'b0} + 11'(SRC_TAGS));
      // sign fill reaches byte i when its top bit is at or above n*8-sh
      if (kind == 2)
        for (int i = 0; i < BYTES; i++)
          if (7'(i*8 + 7) >= bits_n - 7'(sh))
            y[i*SRC_TAGS +: SRC_TAGS] |= src[(n-1)*SRC_TAGS +: SRC_TAGS];
    end
    return keep_n(y, n);
  endfunction

  function automatic tag_t part_load(input tag_t t, input int off, input int size, input bit sgn);
    tag_t  y = '0;
    btag_t top = '0;
    for (int i = 0; i < BYTES; i++)
      if (i == off + size - 1) top = t[i*SRC_TAGS +: SRC_TAGS];
    for (int i = 0; i < BYTES; i++) begin
      if (i < size) begin
        for (int j = 0; j < BYTES; j++)
          if (j == off + i) y[i*SRC_TAGS +: SRC_TAGS] = t[j*SRC_TAGS +: SRC_TAGS];
      end else if (sgn) begin
        y[i*SRC_TAGS +: SRC_TAGS] = top;
      end
    end
    return y;
  endfunction

  function automatic tag_t part_store(input tag_t dst, input tag_t src, input int off, input int size);
    tag_t y = dst;
    for (int j = 0; j < BYTES; j++)
      if (j >= off && j < off + size)
        y[j*SRC_TAGS +: SRC_TAGS] |= src[(j-off)*SRC_TAGS +: SRC_TAGS];
    return y;
  endfunction

  function automatic tag_t mask_bytes(input tag_t t, input int off, input int size);
    tag_t y = t;
    for (int j = 0; j < BYTES; j++)
      if (j >= off && j < off + size) y[j*SRC_TAGS +: SRC_TAGS] = '0;
    return y;
  endfunction

  int unsigned nbytes;
  int unsigned off;
  assign nbytes = access_bytes(f3[1:0]);
  assign off    = 32'(maddr_lo);

  tag_t ab_or;
  assign ab_or = tag_a | tag_b;

  // ---- tag path --------------------------------------------------------------
  always_comb begin
    tag_y     = '0;
    is_tag_op = 1'b1;
    unique case (fn)
      FN_ALU_TAINT_REG: begin
        if (opc == OPC_OP) begin
          unique case (f3)
            3'b000:                tag_y = prefix_n(ab_or, 8);
            3'b010, 3'b011:        tag_y = spread_n(union_n(ab_or, 8), 1);
            3'b001, 3'b101:        tag_y = spread_n(union_n(tag_a, 8) | bget(tag_b, 0), 8);
            default:               tag_y = ab_or;
          endcase
        end else if (opc == OPC_OP32) begin
          if (f3 == 3'b000) tag_y = sext32(prefix_n(ab_or, 4));
          else              tag_y = spread_n(union_n(tag_a, 4) | bget(tag_b, 0), 8);
        end else begin
          tag_y = ab_or;
        end
      end
      FN_ALU_TAINT_IMM: begin
        if (opc == OPC_OPIMM) begin
          unique case (f3)
            3'b000:         tag_y = prefix_n(tag_a, 8);
            3'b010, 3'b011: tag_y = spread_n(union_n(tag_a, 8), 1);
            3'b001:         tag_y = shift_tag(tag_a, shamt_imm, 0, 8);
            3'b101:         tag_y = shift_tag(tag_a, shamt_imm, f7b5 ? 2 : 1, 8);
            default:        tag_y = tag_a;
          endcase
        end else if (opc == OPC_OPIMM32) begin
          unique case (f3)
            3'b001:  tag_y = sext32(shift_tag(tag_a, {1'b0, shamt_imm[4:0]}, 0, 4));
            3'b101:  tag_y = sext32(shift_tag(tag_a, {1'b0, shamt_imm[4:0]}, f7b5 ? 2 : 1, 4));
            default: tag_y = sext32(prefix_n(tag_a, 4));
          endcase
        end else begin
          tag_y = tag_a;
        end
      end
      FN_ALU_TAINT_SHIFT: begin
        if (opc == OPC_OP32) tag_y = spread_n(union_n(tag_a, 4) | bget(tag_b, 0), 8);
        else                 tag_y = spread_n(union_n(tag_a, 8) | bget(tag_b, 0), 8);
      end
      FN_PART_TAG_LOAD:  tag_y = part_load(tag_a, int'(off), int'(nbytes), !f3[2]);
      FN_PART_TAG_STORE: tag_y = part_store(tag_d, tag_a, int'(off), int'(nbytes));
      FN_MASK_TAG:       tag_y = mask_bytes(tag_a, int'(off), int'(nbytes));
      default:           is_tag_op = 1'b0;
    endcase
  end

  // ---- data path -------------------------------------------------------------
  always_comb begin
    data_y     = '0;
    is_data_op = 1'b1;
    unique case (fn)
      FN_ADD: data_y = data_a + data_b;
      FN_SUB: data_y = data_a - data_b;
      FN_SL:  data_y = data_a << data_b[5:0];
      FN_SR:  data_y = data_a >> data_b[5:0];
      FN_SLT: data_y = XLEN'($signed(data_a) < $signed(data_b));
      FN_SEQ: data_y = XLEN'(data_a == data_b);
      FN_AND: data_y = data_a & data_b;
      FN_OR:  data_y = data_a | data_b;
      FN_XOR: data_y = data_a ^ data_b;
      default: is_data_op = 1'b0;
    endcase
  end

endmodule
