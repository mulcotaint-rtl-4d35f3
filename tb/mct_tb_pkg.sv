// mct_tb_pkg - testbench helpers for the taint coprocessor.
//
// RV64I instruction encoders, a microcode word builder, the default rule
// programs (page-table walk, load, store, register and immediate ALU rules)
// and a reference model of the tag-propagation rules. The reference works
// bit by bit on the data dependence of each result bit (which source bits can
// change it), then collects the byte tags of those source bits; it is written
// independently of the byte-slice arithmetic in the design.
package mct_tb_pkg;
  import mct_pkg::*;

  typedef logic [SRC_TAGS-1:0] btag_t;

  // ---- instruction encoders -------------------------------------------------
  function automatic logic [31:0] enc_r(input logic [6:0] opc, input logic [2:0] f3,
                                        input logic [6:0] f7, input int rd, input int rs1, input int rs2);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_i(input logic [6:0] opc, input logic [2:0] f3,
                                        input int rd, input int rs1, input logic [11:0] imm);
    return {imm, 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_s(input logic [2:0] f3, input int rs1, input int rs2,
                                        input logic [11:0] imm);
    return {imm[11:5], 5'(rs2), 5'(rs1), f3, imm[4:0], OPC_STORE};
  endfunction

  // ---- microcode -------------------------------------------------------------
  function automatic logic [31:0] uc(input fn_e fn, input logic [3:0] a, input logic [3:0] b,
                                     input logic [3:0] d, input int imm = 0);
    ucode_t w;
    w.fn = fn; w.a = a; w.b = b; w.d = d; w.imm = 15'(imm);
    return w;
  endfunction

  localparam logic [3:0] LR0 = 4'd0, LR1 = 4'd1;

  typedef logic [31:0] prog_t [$];

  // page-table walk: leaves the address of the 1024-bit tag block in LR1.
  // Index fields: VA[38:27], VA[26:15], VA[14:3]; 8-byte entries.
  function automatic prog_t walk_prog();
    prog_t p;
    p.push_back(uc(FN_FILTER, D_MADDR, D_ZERO, D_ZERO));
    for (int lvl = 0; lvl < 3; lvl++) begin
      int sh = (lvl == 0) ? 27 : (lvl == 1) ? 15 : 3;
      p.push_back(uc(FN_SR,  D_MADDR, D_IMM, LR0, sh));
      p.push_back(uc(FN_AND, LR0, D_IMM, LR0, 'hFFF));
      p.push_back(uc(FN_SL,  LR0, D_IMM, LR0, 3));
      p.push_back(uc(FN_ADD, LR0, (lvl == 0) ? D_PTROOT : LR1, LR0));
      p.push_back(uc(FN_READ_DATA, D_ZERO, LR0, LR1));
    end
    return p;
  endfunction

  function automatic prog_t load_prog();
    prog_t p = walk_prog();
    p.push_back(uc(FN_READ_TAG, D_ZERO, LR1, T_TR0));
    p.push_back(uc(FN_PART_TAG_LOAD, T_TR0, T_ZERO, T_TR0));
    p.push_back(uc(FN_ALU_TAINT_REG, T_TR0, T_ZERO, T_RD));
    p.push_back(uc(FN_END, 0, 0, 0));
    return p;
  endfunction

  function automatic prog_t store_prog();
    prog_t p = walk_prog();
    p.push_back(uc(FN_READ_TAG, D_ZERO, LR1, T_TR0));
    p.push_back(uc(FN_MASK_TAG, T_TR0, T_ZERO, T_TR0));
    p.push_back(uc(FN_PART_TAG_STORE, T_RS2, T_ZERO, T_TR0));
    p.push_back(uc(FN_WRITE_TAG, T_TR0, LR1, D_ZERO));
    p.push_back(uc(FN_END, 0, 0, 0));
    return p;
  endfunction

  function automatic prog_t alu_reg_prog();
    prog_t p;
    p.push_back(uc(FN_ALU_TAINT_REG, T_RS1, T_RS2, T_RD));
    p.push_back(uc(FN_END, 0, 0, 0));
    return p;
  endfunction

  function automatic prog_t alu_imm_prog();
    prog_t p;
    p.push_back(uc(FN_ALU_TAINT_IMM, T_RS1, T_ZERO, T_RD));
    p.push_back(uc(FN_END, 0, 0, 0));
    return p;
  endfunction

  function automatic prog_t shift_reg_prog();
    prog_t p;
    p.push_back(uc(FN_ALU_TAINT_SHIFT, T_RS1, T_RS2, T_RD));
    p.push_back(uc(FN_END, 0, 0, 0));
    return p;
  endfunction

  // ---- reference tag model -----------------------------------------------------
  function automatic btag_t bt(input tag_t t, input int i);
    return t[i*SRC_TAGS +: SRC_TAGS];
  endfunction

  // tag of result byte i = union of the byte tags of every source bit that
  // some bit of byte i depends on. n_bits = operand width; for 32-bit (W)
  // forms bytes 4..7 take the tag of result byte 3 (byte-level sign
  // extension). kind: 0 sll, 1 srl, 2 sra
  function automatic tag_t ref_shift(input tag_t a, input int sh, input int kind, input int n_bits);
    tag_t y = '0;
    for (int p = 0; p < n_bits; p++) begin
      int src = (kind == 0) ? p - sh : p + sh;
      btag_t t = '0;
      if (src >= 0 && src < n_bits) t = bt(a, src / 8);
      else if (kind == 2 && src >= n_bits) t = bt(a, (n_bits - 1) / 8);
      y[(p/8)*SRC_TAGS +: SRC_TAGS] |= t;
    end
    if (n_bits == 32)
      for (int i = 4; i < 8; i++) y[i*SRC_TAGS +: SRC_TAGS] = bt(y, 3);
    return y;
  endfunction

  function automatic tag_t ref_carry(input tag_t a, input tag_t b, input int n_bytes);
    tag_t y = '0;
    for (int i = 0; i < 8; i++) begin
      int top = (i < n_bytes) ? i : n_bytes - 1;
      for (int j = 0; j <= top; j++) y[i*SRC_TAGS +: SRC_TAGS] |= bt(a, j) | bt(b, j);
    end
    return y;
  endfunction

  function automatic btag_t ref_all(input tag_t a, input int n_bytes);
    btag_t u = '0;
    for (int j = 0; j < n_bytes; j++) u |= bt(a, j);
    return u;
  endfunction

  function automatic tag_t ref_fill(input btag_t u);
    tag_t y;
    for (int i = 0; i < 8; i++) y[i*SRC_TAGS +: SRC_TAGS] = u;
    return y;
  endfunction

  function automatic tag_t ref_alu(input fn_e fn, input logic [31:0] inst, input logic [2:0] lo,
                                   input tag_t a, input tag_t b, input tag_t d);
    logic [6:0] opc = inst[6:0];
    logic [2:0] f3  = inst[14:12];
    int         sz  = 1 << f3[1:0];
    int         sh  = int'(inst[25:20]);
    int         kind = (f3 == 3'b001) ? 0 : (inst[30] ? 2 : 1);
    tag_t       y   = '0;
    case (fn)
      FN_ALU_TAINT_REG: begin
        if (opc == OPC_OP && f3 == 3'b000)                    y = ref_carry(a, b, 8);
        else if (opc == OPC_OP && (f3 == 3'b010 || f3 == 3'b011)) y[SRC_TAGS-1:0] = ref_all(a | b, 8);
        else if (opc == OPC_OP && (f3 == 3'b001 || f3 == 3'b101)) y = ref_fill(ref_all(a, 8) | bt(b, 0));
        else if (opc == OPC_OP32 && f3 == 3'b000)             y = ref_carry(a, b, 4);
        else if (opc == OPC_OP32)                             y = ref_fill(ref_all(a, 4) | bt(b, 0));
        else                                                  y = a | b;
      end
      FN_ALU_TAINT_IMM: begin
        if (opc == OPC_OPIMM) begin
          if (f3 == 3'b000)                      y = ref_carry(a, '0, 8);
          else if (f3 == 3'b010 || f3 == 3'b011) y[SRC_TAGS-1:0] = ref_all(a, 8);
          else if (f3 == 3'b001 || f3 == 3'b101) y = ref_shift(a, sh, kind, 64);
          else                                   y = a;
        end else if (opc == OPC_OPIMM32) begin
          if (f3 == 3'b001 || f3 == 3'b101)      y = ref_shift(a, sh % 32, kind, 32);
          else                                   y = ref_carry(a, '0, 4);
        end else y = a;
      end
      FN_ALU_TAINT_SHIFT: begin
        y = ref_fill(ref_all(a, (opc == OPC_OP32) ? 4 : 8) | bt(b, 0));
      end
      FN_PART_TAG_LOAD: begin
        for (int i = 0; i < 8; i++) begin
          if (i < sz) y[i*SRC_TAGS +: SRC_TAGS] = bt(a, int'(lo) + i);
          else if (!f3[2]) y[i*SRC_TAGS +: SRC_TAGS] = bt(a, int'(lo) + sz - 1);
        end
      end
      FN_PART_TAG_STORE: begin
        y = d;
        for (int i = 0; i < sz; i++) y[(int'(lo)+i)*SRC_TAGS +: SRC_TAGS] |= bt(a, i);
      end
      FN_MASK_TAG: begin
        y = a;
        for (int i = 0; i < sz; i++) y[(int'(lo)+i)*SRC_TAGS +: SRC_TAGS] = '0;
      end
      default: y = '0;
    endcase
    return y;
  endfunction

  // a tag where byte i carries source bits chosen at random (sparse)
  function automatic tag_t rand_tag();
    tag_t t = '0;
    for (int i = 0; i < 8; i++)
      if ($urandom_range(3) != 0) begin
        t[i*SRC_TAGS + $urandom_range(SRC_TAGS-1)] = 1'b1;
        t[i*SRC_TAGS + $urandom_range(SRC_TAGS-1)] = 1'b1;
      end
    return t;
  endfunction

endpackage
