// tb_control_unit - runs the microcode sequencer on real rule programs.
//
// The control unit is connected to the real ALU unit and memory access unit,
// a behavioural memory holding a three-level taint page table, and testbench
// models of the queue, rule store, taint registers and filter. Random
// load/store/ALU/shift instructions are executed and every taint register and
// every memory tag is compared with a reference model afterwards. Also
// checked: the filter ending a rule, the bus beats per load (3 walk reads +
// 16 tag beats) and store (+16 write beats), the cycle count of a one-
// microcode rule, a custom rule using the remaining data microcodes, a fixed
// temporary and a source register as output, suspension on queue full with
// its exception until resume, and the bad-microcode exception.
module tb_control_unit;
  import mct_pkg::*;
  import mct_tb_pkg::*;

  localparam xword_t PT_ROOT = 64'h0010_0000;
  localparam xword_t FBASE   = 64'h0040_0000;  // filtered range
  localparam xword_t FLIM    = 64'h0040_1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- DUT and real neighbours --------------------------------------------------
  logic q_empty, q_full = 0, q_pop, resume = 0;
  qentry_t q_head;
  logic [RULE_W-1:0] rs_rule;
  logic [4:0] rs_slot, tr_ra1, tr_ra2, tr_ra3, tr_wa;
  ucode_t rs_word;
  tag_t tr_rd1, tr_rd2, tr_rd3, tr_wd;
  logic tr_we;
  fn_e alu_fn;
  logic [31:0] alu_inst;
  logic [2:0] alu_maddr_lo;
  tag_t alu_tag_a, alu_tag_b, alu_tag_d, alu_tag_y;
  xword_t alu_data_a, alu_data_b, alu_data_y, flt_addr;
  logic alu_is_tag, alu_is_data, flt_hit;
  logic mem_req_valid, mem_req_ready, mem_req_tag, mem_req_we, mem_done;
  xword_t mem_req_addr, mem_req_wdata, mem_rdata;
  tag_t mem_req_wtag, mem_rtag;
  logic exc_valid, busy, suspended;
  logic [3:0] exc_cause;
  logic [31:0] n_done, n_filtered;
  logic bus_req_valid, bus_req_ready, bus_we, bus_resp_valid;
  xword_t bus_addr, bus_wdata, bus_rdata;

  control_unit #(.SLOTS(30)) dut (
    .clk, .rst_n, .q_empty, .q_full, .q_head, .q_pop, .resume, .pt_root(PT_ROOT),
    .rs_rule, .rs_slot, .rs_word,
    .tr_ra1, .tr_ra2, .tr_ra3, .tr_rd1, .tr_rd2, .tr_rd3, .tr_we, .tr_wa, .tr_wd,
    .alu_fn, .alu_inst, .alu_maddr_lo, .alu_tag_a, .alu_tag_b, .alu_tag_d,
    .alu_data_a, .alu_data_b, .alu_tag_y, .alu_data_y, .alu_is_tag, .alu_is_data,
    .flt_addr, .flt_hit,
    .mem_req_valid, .mem_req_ready, .mem_req_tag, .mem_req_we, .mem_req_addr,
    .mem_req_wdata, .mem_req_wtag, .mem_done, .mem_rdata, .mem_rtag,
    .exc_valid, .exc_cause, .busy, .suspended, .n_done, .n_filtered);

  alu_unit u_alu (.fn(alu_fn), .inst(alu_inst), .maddr_lo(alu_maddr_lo),
    .tag_a(alu_tag_a), .tag_b(alu_tag_b), .tag_d(alu_tag_d), .data_a(alu_data_a),
    .data_b(alu_data_b), .tag_y(alu_tag_y), .data_y(alu_data_y),
    .is_tag_op(alu_is_tag), .is_data_op(alu_is_data));

  mem_access u_ma (.clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_tag(mem_req_tag), .req_we(mem_req_we), .req_addr(mem_req_addr),
    .req_wdata(mem_req_wdata), .req_wtag(mem_req_wtag), .done(mem_done), .rdata(mem_rdata),
    .rtag(mem_rtag), .bus_req_valid, .bus_req_ready, .bus_we, .bus_addr, .bus_wdata,
    .bus_resp_valid, .bus_rdata);

  mem_model #(.LAT(1)) mem (.clk, .req_valid(bus_req_valid), .req_ready(bus_req_ready),
    .req_we(bus_we), .req_addr(bus_addr), .req_wdata(bus_wdata),
    .resp_valid(bus_resp_valid), .resp_rdata(bus_rdata));

  // ---- testbench models ---------------------------------------------------------
  qentry_t qmem [4096];
  int qh = 0, qt = 0;
  assign q_empty = (qh == qt);
  assign q_head  = qmem[qh % 4096];
  always @(posedge clk) if (q_pop && qh != qt) qh <= qh + 1;

  logic [31:0] rom [15][30];
  assign rs_word = (rs_rule < 15 && rs_slot < 30) ? ucode_t'(rom[rs_rule][rs_slot]) : '0;

  tag_t regs [32];
  assign tr_rd1 = regs[tr_ra1];
  assign tr_rd2 = regs[tr_ra2];
  assign tr_rd3 = regs[tr_ra3];
  always @(posedge clk) if (tr_we && tr_wa != 0) regs[tr_wa] <= tr_wd;

  assign flt_hit = (flt_addr >= FBASE) && (flt_addr < FLIM);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- page table built in memory -------------------------------------------------
  xword_t next_free = 64'h0100_0000;
  function automatic xword_t alloc(input int bytes);
    xword_t a = next_free;
    next_free += 64'(bytes);
    return a;
  endfunction
  function automatic xword_t map_va(input xword_t va);   // address of the tag block
    xword_t e1 = PT_ROOT + {va[38:27], 3'b000};
    xword_t e2, e3;
    if (mem.peek(e1) == 0) mem.poke(e1, alloc(4096 * 8));
    e2 = mem.peek(e1) + {va[26:15], 3'b000};
    if (mem.peek(e2) == 0) mem.poke(e2, alloc(4096 * 8));
    e3 = mem.peek(e2) + {va[14:3], 3'b000};
    if (mem.peek(e3) == 0) mem.poke(e3, alloc(128));
    return mem.peek(e3);
  endfunction
  function automatic tag_t read_tag(input xword_t blk);
    tag_t t;
    for (int i = 0; i < 16; i++) t[64*i +: 64] = mem.peek(blk + 64'(8*i));
    return t;
  endfunction
  function automatic void write_tag(input xword_t blk, input tag_t t);
    for (int i = 0; i < 16; i++) mem.poke(blk + 64'(8*i), t[64*i +: 64]);
  endfunction

  // ---- reference state -------------------------------------------------------------
  tag_t   sregs [32];
  xword_t pool [8];
  tag_t   stags [8];       // shadow tag of each pool doubleword

  function automatic void load_rule(input int r, input prog_t p);
    foreach (p[i]) rom[r][i] = p[i];
  endfunction

  task automatic run(input logic [31:0] inst, input int rule, input xword_t maddr);
    qentry_t e;
    e.rule = RULE_W'(rule); e.tr.inst = inst; e.tr.pc = {$urandom, $urandom}; e.tr.maddr = maddr;
    qmem[qt % 4096] = e;
    qt = qt + 1;
  endtask

  task automatic wait_idle;
    do @(posedge clk); while (!q_empty || busy);
    @(negedge clk);
  endtask

  // one random instruction: issue and update the reference
  task automatic random_inst;
    int rd = $urandom_range(31), rs1 = $urandom_range(31), rs2 = $urandom_range(31);
    int kind = $urandom_range(5);
    logic [31:0] inst;
    tag_t y;
    if (kind <= 1) begin
      int pi = $urandom_range(7);
      logic [2:0] f3 = 3'($urandom);
      int sz;
      xword_t a;
      if (kind == 0 && f3 == 3'b111) f3 = 3'b011;
      if (kind == 1) f3[2] = 1'b0;
      sz = 1 << f3[1:0];
      a = pool[pi] + 64'(($urandom_range(7) / sz) * sz);
      if (kind == 0) begin
        inst = enc_i(OPC_LOAD, f3, rd, rs1, 12'd0);
        run(inst, 0, a);
        y = ref_alu(FN_PART_TAG_LOAD, inst, a[2:0], stags[pi], '0, '0);
        if (rd != 0 && pi != 7) sregs[rd] = y;      // pool[7] is filtered
      end else begin
        tag_t m;
        inst = enc_s(f3, rs1, rs2, 12'd0);
        run(inst, 1, a);
        m = ref_alu(FN_MASK_TAG, inst, a[2:0], stags[pi], '0, '0);
        if (pi != 7) stags[pi] = ref_alu(FN_PART_TAG_STORE, inst, a[2:0], sregs[rs2], '0, m);
      end
    end else if (kind == 2 || kind == 3) begin
      logic [2:0] f3 = 3'($urandom);
      if (f3 == 3'b001 || f3 == 3'b101) f3 = 3'b000;
      inst = enc_r($urandom_range(1) ? OPC_OP : OPC_OP32, f3, $urandom_range(1) ? 7'h20 : 7'h00, rd, rs1, rs2);
      if (inst[6:0] == OPC_OP32) inst[14:12] = 3'b000;
      run(inst, 2, '0);
      y = ref_alu(FN_ALU_TAINT_REG, inst, 3'd0, sregs[rs1], sregs[rs2], '0);
      if (rd != 0) sregs[rd] = y;
    end else if (kind == 4) begin
      logic [2:0] f3 = 3'($urandom);
      logic [11:0] imm = 12'($urandom);
      if (f3 == 3'b001) imm[11:6] = 6'h00;
      if (f3 == 3'b101) imm[11:6] = {1'b0, imm[10], 4'h0};
      inst = enc_i(OPC_OPIMM, f3, rd, rs1, imm);
      run(inst, 3, '0);
      y = ref_alu(FN_ALU_TAINT_IMM, inst, 3'd0, sregs[rs1], '0, '0);
      if (rd != 0) sregs[rd] = y;
    end else begin
      inst = enc_r(OPC_OP, $urandom_range(1) ? 3'b001 : 3'b101, 7'h00, rd, rs1, rs2);
      run(inst, 4, '0);
      y = ref_alu(FN_ALU_TAINT_SHIFT, inst, 3'd0, sregs[rs1], sregs[rs2], '0);
      if (rd != 0) sregs[rd] = y;
    end
  endtask

  task automatic compare_all(input string what);
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (regs[i] !== sregs[i]) begin
        failures++; if (failures < 8) $display("FAIL %s: taint reg x%0d", what, i);
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (read_tag(map_va(pool[i])) !== stags[i]) begin
        failures++; if (failures < 8) $display("FAIL %s: memory tag %0d", what, i);
      end
    end
  endtask

  int n_exc_full = 0, n_exc_bad = 0;
  always @(posedge clk) if (rst_n && exc_valid) begin
    if (exc_cause == CAUSE_QUEUE_FULL) n_exc_full++;
    if (exc_cause == CAUSE_BAD_UCODE)  n_exc_bad++;
  end

  initial begin
    int cyc, b0;
    logic [31:0] inst;
    xword_t pc;
    for (int r = 0; r < 15; r++) for (int s = 0; s < 30; s++) rom[r][s] = '0;
    load_rule(0, load_prog());
    load_rule(1, store_prog());
    load_rule(2, alu_reg_prog());
    load_rule(3, alu_imm_prog());
    load_rule(4, shift_reg_prog());
    // rule 5: data microcodes, PC operand, a fixed temporary, rs1 as output
    rom[5][0]  = uc(FN_SUB, D_PC, D_IMM, 4'd2, 4);          // LR2 = pc - 4
    rom[5][1]  = uc(FN_XOR, 4'd2, D_MADDR, 4'd3);           // LR3 = LR2 ^ maddr
    rom[5][2]  = uc(FN_OR,  4'd3, D_IMM, 4'd3, 1);          // LR3 |= 1
    rom[5][3]  = uc(FN_SEQ, 4'd2, 4'd2, 4'd4);              // LR4 = 1
    rom[5][4]  = uc(FN_SLT, D_ZERO, 4'd4, 4'd5);            // LR5 = (0 < 1) = 1
    rom[5][5]  = uc(FN_ADD, 4'd3, 4'd5, 4'd0);              // LR0 = LR3 + 1
    rom[5][6]  = uc(FN_ADD, D_ZERO, D_IMM, 4'd1, 'h7000);   // LR1 = 0x7000
    rom[5][7]  = uc(FN_WRITE_DATA, 4'd0, 4'd1, D_ZERO);     // mem[LR1] = LR0
    rom[5][8]  = uc(FN_ALU_TAINT_REG, T_RS1, T_RS2, T_TR1); // TR1 = rs1 | rs2
    rom[5][9]  = uc(FN_ALU_TAINT_REG, T_TR1, T_RD, T_RS1);  // rs1 = TR1 | rd
    rom[6][0]  = {5'd30, 27'd0};                            // undefined function code
    // rule 7: a rule that fills all 30 slots (ends after the last one)
    for (int s = 0; s < 30; s++) rom[7][s] = uc(FN_ADD, 4'd0, D_IMM, 4'd0, 1);

    // pool of doublewords spread over different table entries
    for (int i = 0; i < 8; i++) begin
      pool[i] = {25'h0, 12'($urandom), 12'($urandom_range(3)), 12'($urandom), 3'b000};
      if (i == 7) pool[i] = FBASE + 64'h100;            // lies in the filtered range
      stags[i] = rand_tag();
      write_tag(map_va(pool[i]), stags[i]);
    end
    for (int i = 0; i < 32; i++) begin
      sregs[i] = (i == 0) ? '0 : rand_tag();
      regs[i]  = sregs[i];
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // cycle count of a one-microcode rule: busy for 2 cycles (ALU, END)
    run(enc_r(OPC_OP, 3'b100, 7'h00, 5, 6, 7), 2, '0);
    sregs[5] = sregs[6] | sregs[7];
    cyc = 0;
    @(posedge clk);
    while (!busy) @(posedge clk);
    while (busy) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc != 2) begin failures++; $display("FAIL ALU rule busy %0d cycles, expected 2", cyc); end

    // bus beats of one load and one store
    @(negedge clk);
    b0 = int'(mem.n_beats);
    run(enc_i(OPC_LOAD, 3'b011, 9, 1, 12'd0), 0, pool[0]);
    sregs[9] = stags[0];
    wait_idle();
    checks++;
    if (int'(mem.n_beats) - b0 != 19) begin failures++; $display("FAIL load used %0d beats", int'(mem.n_beats) - b0); end
    b0 = int'(mem.n_beats);
    run(enc_s(3'b011, 1, 9, 12'd0), 1, pool[1]);
    stags[1] = sregs[9];
    wait_idle();
    checks++;
    if (int'(mem.n_beats) - b0 != 35) begin failures++; $display("FAIL store used %0d beats", int'(mem.n_beats) - b0); end
    compare_all("directed");

    // random instruction stream
    for (int n = 0; n < 600; n++) begin
      random_inst();
      if ($urandom_range(3) == 0) wait_idle();
    end
    wait_idle();
    // the filtered doubleword: loads and stores there change nothing
    checks++;
    if (n_filtered == 0) begin failures++; $display("FAIL filter never hit"); end
    compare_all("random");

    // custom rule 5
    pc = 64'h0001_2344;
    begin
      qentry_t e;
      inst = enc_r(OPC_OP, 3'b110, 7'h00, 4, 10, 11);
      e.rule = 5; e.tr.inst = inst; e.tr.pc = pc; e.tr.maddr = 64'hF0;
      qmem[qt % 4096] = e;
      qt = qt + 1;
    end
    sregs[10] = sregs[10] | sregs[11] | sregs[4];
    wait_idle();
    checks++;
    if (mem.peek(64'h7000) !== (((pc - 4) ^ 64'hF0) | 64'h1) + 64'h1) begin
      failures++; $display("FAIL data microcodes: %h", mem.peek(64'h7000));
    end
    compare_all("custom");

    // a full rule: 30 microcodes, then back to idle
    b0 = int'(n_done);
    run(enc_r(OPC_OP, 3'b100, 7'h00, 0, 0, 0), 7, '0);
    wait_idle();
    checks++;
    if (int'(n_done) != b0 + 1) begin failures++; $display("FAIL 30-slot rule"); end

    // bad microcode
    run(enc_r(OPC_OP, 3'b100, 7'h00, 0, 0, 0), 6, '0);
    wait_idle();
    checks++;
    if (n_exc_bad != 1) begin failures++; $display("FAIL bad microcode exception count %0d", n_exc_bad); end

    // queue full: exception, suspension, nothing taken until resume
    @(negedge clk);
    q_full = 1;
    @(negedge clk);
    @(negedge clk);
    q_full = 0;
    for (int i = 0; i < 4; i++) run(enc_r(OPC_OP, 3'b110, 7'h00, 12, 12, 13), 2, '0);
    repeat (20) @(negedge clk);
    checks++;
    if (!suspended || (qt - qh) != 4 || n_exc_full != 1) begin
      failures++; $display("FAIL suspend: susp=%b left=%0d exc=%0d", suspended, qt - qh, n_exc_full);
    end
    resume = 1; @(negedge clk); resume = 0;
    for (int i = 0; i < 4; i++) sregs[12] = sregs[12] | sregs[13];
    wait_idle();
    checks++;
    if (suspended || qh != qt) begin failures++; $display("FAIL resume"); end
    compare_all("resume");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
