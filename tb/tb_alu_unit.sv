// tb_alu_unit - checks the vectorised taint calculation and the data ALU.
//
// Directed case: the ADD example (rs1 byte 0 tagged by source A, rs2 byte 1
// by source B gives rd byte 0 = A and bytes 1..7 = A+B). Then random tags
// with every RV64I arithmetic/logic/shift/load/store form through every tag
// microcode, compared with the bit-dependence reference model, and random
// operands through the general data microcodes.
module tb_alu_unit;
  import mct_pkg::*;
  import mct_tb_pkg::*;

  fn_e         fn;
  logic [31:0] inst;
  logic [2:0]  lo;
  tag_t        ta, tb, td, ty;
  xword_t      da, db, dy;
  logic        is_tag, is_data;
  int checks = 0, failures = 0;

  alu_unit dut (.fn, .inst, .maddr_lo(lo), .tag_a(ta), .tag_b(tb), .tag_d(td),
                .data_a(da), .data_b(db), .tag_y(ty), .data_y(dy),
                .is_tag_op(is_tag), .is_data_op(is_data));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_tag(input string what);
    tag_t exp;
    #1;
    exp = ref_alu(fn, inst, lo, ta, tb, td);
    checks++;
    if (ty !== exp || !is_tag) begin
      failures++;
      if (failures < 10) $display("FAIL %s fn=%0d inst=%h lo=%0d", what, fn, inst, lo);
    end
  endtask

  // instruction forms: {opcode, funct3, funct7 bit 5}
  logic [31:0] forms [$];
  initial begin
    // OP
    forms.push_back(enc_r(OPC_OP, 3'b000, 7'h00, 3, 1, 2)); // ADD
    forms.push_back(enc_r(OPC_OP, 3'b000, 7'h20, 3, 1, 2)); // SUB
    forms.push_back(enc_r(OPC_OP, 3'b001, 7'h00, 3, 1, 2)); // SLL
    forms.push_back(enc_r(OPC_OP, 3'b010, 7'h00, 3, 1, 2)); // SLT
    forms.push_back(enc_r(OPC_OP, 3'b011, 7'h00, 3, 1, 2)); // SLTU
    forms.push_back(enc_r(OPC_OP, 3'b100, 7'h00, 3, 1, 2)); // XOR
    forms.push_back(enc_r(OPC_OP, 3'b101, 7'h00, 3, 1, 2)); // SRL
    forms.push_back(enc_r(OPC_OP, 3'b101, 7'h20, 3, 1, 2)); // SRA
    forms.push_back(enc_r(OPC_OP, 3'b110, 7'h00, 3, 1, 2)); // OR
    forms.push_back(enc_r(OPC_OP, 3'b111, 7'h00, 3, 1, 2)); // AND
    forms.push_back(enc_r(OPC_OP32, 3'b000, 7'h00, 3, 1, 2)); // ADDW
    forms.push_back(enc_r(OPC_OP32, 3'b000, 7'h20, 3, 1, 2)); // SUBW
    forms.push_back(enc_r(OPC_OP32, 3'b001, 7'h00, 3, 1, 2)); // SLLW
    forms.push_back(enc_r(OPC_OP32, 3'b101, 7'h00, 3, 1, 2)); // SRLW
    forms.push_back(enc_r(OPC_OP32, 3'b101, 7'h20, 3, 1, 2)); // SRAW
    forms.push_back(enc_i(OPC_LOAD, 3'b000, 3, 1, 12'd0));   // LB
    forms.push_back(enc_i(OPC_LOAD, 3'b100, 3, 1, 12'd0));   // LBU
    forms.push_back(enc_i(OPC_LOAD, 3'b001, 3, 1, 12'd0));   // LH
    forms.push_back(enc_i(OPC_LOAD, 3'b101, 3, 1, 12'd0));   // LHU
    forms.push_back(enc_i(OPC_LOAD, 3'b010, 3, 1, 12'd0));   // LW
    forms.push_back(enc_i(OPC_LOAD, 3'b110, 3, 1, 12'd0));   // LWU
    forms.push_back(enc_i(OPC_LOAD, 3'b011, 3, 1, 12'd0));   // LD
    forms.push_back(enc_s(3'b000, 1, 2, 12'd0));             // SB
    forms.push_back(enc_s(3'b001, 1, 2, 12'd0));             // SH
    forms.push_back(enc_s(3'b010, 1, 2, 12'd0));             // SW
    forms.push_back(enc_s(3'b011, 1, 2, 12'd0));             // SD
  end

  function automatic logic [31:0] rand_imm_form();
    int k = $urandom_range(9);
    logic [5:0] sh = 6'($urandom_range(63));
    case (k)
      0: return enc_i(OPC_OPIMM, 3'b000, 3, 1, 12'($urandom));          // ADDI
      1: return enc_i(OPC_OPIMM, 3'b010, 3, 1, 12'($urandom));          // SLTI
      2: return enc_i(OPC_OPIMM, 3'b011, 3, 1, 12'($urandom));          // SLTIU
      3: return enc_i(OPC_OPIMM, 3'b100 | 3'($urandom_range(3) & 2), 3, 1, 12'($urandom)); // XORI/ORI
      4: return enc_i(OPC_OPIMM, 3'b001, 3, 1, {6'h00, sh});            // SLLI
      5: return enc_i(OPC_OPIMM, 3'b101, 3, 1, {6'h00, sh});            // SRLI
      6: return enc_i(OPC_OPIMM, 3'b101, 3, 1, {6'h10, sh});            // SRAI
      7: return enc_i(OPC_OPIMM32, 3'b000, 3, 1, 12'($urandom));        // ADDIW
      8: return enc_i(OPC_OPIMM32, 3'b001 | 3'($urandom_range(1) * 4), 3, 1,
                      {7'h00, sh[4:0]});                                  // SLLIW/SRLIW
      default: return enc_i(OPC_OPIMM32, 3'b101, 3, 1, {7'h20, sh[4:0]}); // SRAIW
    endcase
  endfunction

  initial begin
    tag_t e;
    xword_t exp;
    // ---- directed: the ADD example --------------------------------------------
    fn = FN_ALU_TAINT_REG; inst = enc_r(OPC_OP, 3'b000, 7'h00, 3, 1, 2); lo = 0;
    ta = '0; tb = '0; td = '0; da = '0; db = '0;
    ta[0] = 1'b1;                 // rs1 byte 0: source A
    tb[SRC_TAGS + 1] = 1'b1;      // rs2 byte 1: source B
    #1;
    e = '0;
    e[0] = 1'b1;
    for (int i = 1; i < 8; i++) begin e[i*SRC_TAGS] = 1'b1; e[i*SRC_TAGS+1] = 1'b1; end
    checks++;
    if (ty !== e) begin failures++; $display("FAIL directed ADD"); end
    // directed: SLLI by 8 moves byte 0's tag to byte 1
    fn = FN_ALU_TAINT_IMM; inst = enc_i(OPC_OPIMM, 3'b001, 3, 1, 12'd8);
    ta = '0; ta[5] = 1'b1; #1;
    e = '0; e[SRC_TAGS + 5] = 1'b1;
    checks++;
    if (ty !== e) begin failures++; $display("FAIL directed SLLI"); end
    // directed: LBU from byte 5 puts byte 5's tag into byte 0 only
    fn = FN_PART_TAG_LOAD; inst = enc_i(OPC_LOAD, 3'b100, 3, 1, 12'd0); lo = 3'd5;
    ta = '0; ta[5*SRC_TAGS + 9] = 1'b1; #1;
    e = '0; e[9] = 1'b1;
    checks++;
    if (ty !== e) begin failures++; $display("FAIL directed LBU"); end

    // ---- random: register/shift/part-tag microcodes -----------------------------
    for (int n = 0; n < 3000; n++) begin
      automatic int k = $urandom_range(forms.size() - 1);
      inst = forms[k];
      ta = rand_tag(); tb = rand_tag(); td = rand_tag();
      lo = 3'($urandom);
      if (inst[6:0] == OPC_LOAD || inst[6:0] == OPC_STORE) begin
        automatic int sz = 1 << inst[13:12];
        lo = 3'((int'(lo) / sz) * sz);       // naturally aligned
        case ($urandom_range(2))
          0: fn = FN_PART_TAG_LOAD;
          1: fn = FN_PART_TAG_STORE;
          default: fn = FN_MASK_TAG;
        endcase
        if (inst[6:0] == OPC_LOAD && fn != FN_PART_TAG_LOAD && inst[14]) continue;
      end else begin
        fn = ($urandom_range(1) == 0) ? FN_ALU_TAINT_REG : FN_ALU_TAINT_SHIFT;
        if (fn == FN_ALU_TAINT_SHIFT && inst[13:12] != 2'b01) fn = FN_ALU_TAINT_REG;
      end
      check_tag("reg");
    end
    // ---- random: immediate microcode ----------------------------------------------
    for (int n = 0; n < 3000; n++) begin
      fn = FN_ALU_TAINT_IMM;
      inst = rand_imm_form();
      ta = rand_tag(); tb = rand_tag(); td = rand_tag(); lo = 3'($urandom);
      check_tag("imm");
    end
    // ---- random: data microcodes ---------------------------------------------------
    for (int n = 0; n < 2000; n++) begin
      automatic fn_e fns [9] = '{FN_ADD, FN_SUB, FN_SL, FN_SR, FN_SLT, FN_SEQ, FN_AND, FN_OR, FN_XOR};
      fn = fns[$urandom_range(8)];
      da = {$urandom, $urandom}; db = {$urandom, $urandom};
      if ($urandom_range(3) == 0) db = da;
      #1;
      case (fn)
        FN_ADD: exp = da + db;
        FN_SUB: exp = da - db;
        FN_SL:  exp = da << (db % 64);
        FN_SR:  exp = da >> (db % 64);
        FN_SLT: exp = ($signed(da) < $signed(db)) ? 64'd1 : 64'd0;
        FN_SEQ: exp = (da == db) ? 64'd1 : 64'd0;
        FN_AND: exp = da & db;
        FN_OR:  exp = da | db;
        default: exp = da ^ db;
      endcase
      checks++;
      if (dy !== exp || !is_data || is_tag) begin
        failures++;
        if (failures < 10) $display("FAIL data fn=%0d", fn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
