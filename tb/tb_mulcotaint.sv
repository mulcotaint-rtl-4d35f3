// tb_mulcotaint - end-to-end test of the taint coprocessor at its default
// size (9000-entry queue, 15 matchers, 15 rules x 30 microcodes, 5 filters,
// 32 x 1024-bit taint registers).
//
// A CPU model retires RV64I instructions into the write-back tap and talks to
// the coprocessor with custom instructions, the way the system software
// would: it loads the default rules (page-table walk + load, store, register
// ALU, immediate ALU, register shift), configures the matchers and one filter
// range, passes the root of the taint page table (built in a behavioural
// memory), labels source registers, and switches monitoring on and off.
// Phase 1 runs a random instruction mix; phase 2 retires loads back to back
// until the queue fills, so the CPU is stalled, the queue-full exception is
// raised and the handler resumes the coprocessor; finally the CPU waits by
// polling the status until all queued work is finished, reads every taint
// register back and compares registers and memory tags with a reference
// model. Each mechanism is counted and must occur at least once.
module tb_mulcotaint;
  import mct_pkg::*;
  import mct_tb_pkg::*;

  localparam xword_t PT_ROOT = 64'h0010_0000;
  localparam xword_t FBASE   = 64'h0040_0000;  // filtered (taint-independent) range
  localparam xword_t FLIM    = 64'h0040_1000;
  localparam int     NPOOL   = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wb_valid = 0, cpu_stall;
  logic [31:0] wb_inst = 0;
  xword_t wb_pc = 0, wb_maddr = 0;
  logic cmd_valid = 0, cmd_ready, resp_valid;
  logic [6:0] cmd_funct = 0;
  xword_t cmd_rs1 = 0, cmd_rs2 = 0, resp_data;
  logic exc_valid;
  logic [3:0] exc_cause;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  xword_t mem_req_addr, mem_req_wdata, mem_resp_rdata;

  mulcotaint dut (
    .clk, .rst_n, .wb_valid, .wb_inst, .wb_pc, .wb_maddr, .cpu_stall,
    .cmd_valid, .cmd_ready, .cmd_funct, .cmd_rs1, .cmd_rs2, .resp_valid, .resp_data,
    .exc_valid, .exc_cause,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata);

  mem_model #(.LAT(1)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_we(mem_req_we), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata));

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ---------------------------------------------------------
  int n_stall = 0, n_exc_full = 0, n_resume = 0, n_poll_busy = 0, n_drop_off = 0;
  int n_drop_unmatched = 0, n_load = 0, n_store = 0, n_alu = 0, n_imm = 0, n_shift = 0;
  int n_tag_beats = 0;
  always @(posedge clk) if (rst_n) begin
    if (cpu_stall) n_stall++;
    if (exc_valid && exc_cause == CAUSE_QUEUE_FULL) n_exc_full++;
  end

  // ---- custom instructions (one at a time) -----------------------------------------
  bit cmd_lock = 0;
  task automatic rocc(input cmd_e c, input xword_t r1, input xword_t r2, output xword_t r);
    while (cmd_lock) @(negedge clk);
    cmd_lock = 1;
    @(negedge clk);
    cmd_valid = 1; cmd_funct = 7'(c); cmd_rs1 = r1; cmd_rs2 = r2;
    @(negedge clk);
    cmd_valid = 0;
    if (!resp_valid) begin failures++; $display("FAIL no response to command %0d", c); end
    r = resp_data;
    cmd_lock = 0;
  endtask
  task automatic rocc0(input cmd_e c, input xword_t r1, input xword_t r2);
    xword_t r;
    rocc(c, r1, r2, r);
  endtask

  // ---- page table in memory (what the instrumentation library builds) -----------
  xword_t next_free = 64'h0100_0000;
  function automatic xword_t alloc(input int bytes);
    xword_t a = next_free;
    next_free += 64'(bytes);
    return a;
  endfunction
  function automatic xword_t map_va(input xword_t va);
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

  // ---- reference state ---------------------------------------------------------------
  tag_t   sregs [32];
  xword_t pool  [NPOOL];
  tag_t   stags [NPOOL];
  bit     monitoring_on = 0;
  xword_t pc = 64'h0001_0000;

  // retire one instruction through write-back (held while stalled)
  task automatic retire(input logic [31:0] inst, input xword_t maddr);
    @(negedge clk);
    wb_valid = 1; wb_inst = inst; wb_pc = pc; wb_maddr = maddr;
    while (cpu_stall) @(negedge clk);
    @(posedge clk);
    #1 wb_valid = 0;
    pc += 4;
  endtask

  task automatic do_load(input int pi, input logic [2:0] f3, input int rd, input int rs1);
    int sz = 1 << f3[1:0];
    xword_t a = pool[pi] + 64'(($urandom_range(7) / sz) * sz);
    logic [31:0] inst = enc_i(OPC_LOAD, f3, rd, rs1, 12'd0);
    retire(inst, a);
    if (monitoring_on) begin
      n_load++;
      if (rd != 0 && pi != NPOOL - 1) sregs[rd] = ref_alu(FN_PART_TAG_LOAD, inst, a[2:0], stags[pi], '0, '0);
    end
  endtask

  task automatic random_inst;
    int rd = $urandom_range(31), rs1 = $urandom_range(31), rs2 = $urandom_range(31);
    int kind = $urandom_range(6);
    logic [31:0] inst;
    if (kind == 0) begin
      logic [2:0] f3 = 3'($urandom);
      if (f3 == 3'b111) f3 = 3'b011;
      do_load($urandom_range(NPOOL - 1), f3, rd, rs1);
    end else if (kind == 1) begin
      int pi = $urandom_range(NPOOL - 1);
      logic [2:0] f3 = {1'b0, 2'($urandom)};
      int sz = 1 << f3[1:0];
      xword_t a = pool[pi] + 64'(($urandom_range(7) / sz) * sz);
      inst = enc_s(f3, rs1, rs2, 12'd0);
      retire(inst, a);
      if (monitoring_on) begin
        n_store++;
        if (pi != NPOOL - 1)
          stags[pi] = ref_alu(FN_PART_TAG_STORE, inst, a[2:0], sregs[rs2], '0,
                              ref_alu(FN_MASK_TAG, inst, a[2:0], stags[pi], '0, '0));
      end
    end else if (kind == 2) begin
      logic [2:0] f3 = 3'($urandom);
      logic [6:0] opc = $urandom_range(1) ? OPC_OP : OPC_OP32;
      if (opc == OPC_OP32 && f3 != 3'b001 && f3 != 3'b101) f3 = 3'b000;
      inst = enc_r(opc, f3, (f3 == 3'b000 || f3 == 3'b101) && $urandom_range(1) ? 7'h20 : 7'h00, rd, rs1, rs2);
      retire(inst, '0);
      if (monitoring_on) begin
        if (f3 == 3'b001 || f3 == 3'b101) begin
          n_shift++;
          if (rd != 0) sregs[rd] = ref_alu(FN_ALU_TAINT_SHIFT, inst, 3'd0, sregs[rs1], sregs[rs2], '0);
        end else begin
          n_alu++;
          if (rd != 0) sregs[rd] = ref_alu(FN_ALU_TAINT_REG, inst, 3'd0, sregs[rs1], sregs[rs2], '0);
        end
      end
    end else if (kind == 3) begin
      logic [2:0] f3 = 3'($urandom);
      logic [11:0] imm = 12'($urandom);
      logic [6:0] opc = $urandom_range(1) ? OPC_OPIMM : OPC_OPIMM32;
      if (opc == OPC_OPIMM32 && f3 != 3'b001 && f3 != 3'b101) f3 = 3'b000;
      if (f3 == 3'b001) imm[11:5] = 7'h00;
      if (f3 == 3'b101) imm[11:5] = {1'b0, imm[10], 5'h00};
      if (opc == OPC_OPIMM && f3[0] && imm[11:6] == 6'h00) imm[5] = $urandom_range(1);
      else if (opc == OPC_OPIMM32) imm[5] = 1'b0;
      inst = enc_i(opc, f3, rd, rs1, imm);
      retire(inst, '0);
      if (monitoring_on) begin
        n_imm++;
        if (rd != 0) sregs[rd] = ref_alu(FN_ALU_TAINT_IMM, inst, 3'd0, sregs[rs1], '0, '0);
      end
    end else begin
      // instructions no matcher selects (LUI, JAL, BEQ)
      logic [6:0] opcs [3] = '{7'b0110111, 7'b1101111, 7'b1100011};
      inst = {25'($urandom), opcs[$urandom_range(2)]};
      retire(inst, '0);
      if (monitoring_on) n_drop_unmatched++;
    end
    if (!monitoring_on) n_drop_off++;
  endtask

  // queue-full exception handler: tell the coprocessor to continue
  initial begin
    automatic int n_handled = 0;
    xword_t st;
    forever begin
      @(posedge clk);
      // serve every counted exception, also one raised while a command was busy
      if (n_handled < n_exc_full) begin
        n_handled = n_exc_full;
        rocc(CMD_CHECK_STATUS, '0, '0, st);
        checks++;
        if (!st[1]) begin failures++; $display("FAIL not suspended after queue-full exception"); end
        rocc0(CMD_RESUME, '0, '0);
        n_resume++;
      end
    end
  end

  // an in-order CPU issues its next instruction only once the stall is over
  task automatic drain_trace;
    @(negedge clk);
    while (cpu_stall) @(negedge clk);
  endtask

  // SYSCALL_WAIT: poll until the coprocessor has finished all queued work
  task automatic wait_finish;
    xword_t st;
    do begin
      rocc(CMD_CHECK_STATUS, '0, '0, st);
      if (!st[0]) n_poll_busy++;
      repeat (4) @(negedge clk);    // leave room for the exception handler
    end while (!st[0]);
  endtask

  task automatic compare_all(input string what);
    xword_t r;
    for (int i = 0; i < 32; i++) begin
      tag_t t;
      for (int c = 0; c < 16; c++) begin
        rocc(CMD_READ_TREG, '0, {51'h0, 5'(i), 4'h0, 4'(c)}, r);
        t[64*c +: 64] = r;
      end
      checks++;
      if (t !== sregs[i]) begin failures++; if (failures < 8) $display("FAIL %s: taint reg x%0d", what, i); end
    end
    for (int i = 0; i < NPOOL; i++) begin
      checks++;
      if (read_tag(map_va(pool[i])) !== stags[i]) begin
        failures++; if (failures < 8) $display("FAIL %s: memory tag %0d", what, i);
      end
    end
  endtask

  function automatic xword_t mon_cfg(input int idx, input int rule, input bit en);
    return {55'h0, en, 4'(rule), 4'(idx)};
  endfunction

  initial begin
    prog_t progs [5];
    xword_t st;
    int b0;
    progs[0] = load_prog(); progs[1] = store_prog(); progs[2] = alu_reg_prog();
    progs[3] = alu_imm_prog(); progs[4] = shift_reg_prog();
    for (int i = 0; i < NPOOL; i++) begin
      pool[i]  = {25'h0, 12'($urandom), 12'($urandom_range(3)), 12'($urandom), 3'b000};
      if (i == NPOOL - 1) pool[i] = FBASE + 64'h200;
      stags[i] = rand_tag();
      write_tag(map_va(pool[i]), stags[i]);      // memory taint sources
    end
    for (int i = 0; i < 32; i++) sregs[i] = '0;

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- initialise the taint engine ------------------------------------------------
    for (int r = 0; r < 5; r++)
      foreach (progs[r][s]) rocc0(CMD_WRITE_UCODE, {32'h0, progs[r][s]}, {52'h0, 4'(r), 3'h0, 5'(s)});
    rocc0(CMD_CFG_MONITOR, {32'h0000_307F, 32'h0000_1033}, mon_cfg(0, 4, 1)); // OP shifts
    rocc0(CMD_CFG_MONITOR, {32'h0000_307F, 32'h0000_103B}, mon_cfg(1, 4, 1)); // OP-32 shifts
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_LOAD)},    mon_cfg(2, 0, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_STORE)},   mon_cfg(3, 1, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_OP)},      mon_cfg(4, 2, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_OP32)},    mon_cfg(5, 2, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_OPIMM)},   mon_cfg(6, 3, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_OPIMM32)}, mon_cfg(7, 3, 1));
    rocc0(CMD_CFG_FILT_BASE, FBASE, 64'd0);
    rocc0(CMD_CFG_FILT_LIM,  FLIM,  64'h100);
    rocc0(CMD_SET_PAGETABLE, PT_ROOT, '0);
    // register taint sources
    for (int i = 1; i < 32; i += 3) begin
      sregs[i] = rand_tag();
      for (int c = 0; c < 16; c++)
        rocc0(CMD_WRITE_TREG, sregs[i][64*c +: 64], {51'h0, 5'(i), 4'h0, 4'(c)});
    end

    // ---- phase 0: monitoring off, nothing may change ------------------------------
    for (int n = 0; n < 200; n++) random_inst();
    // ---- phase 1: random mix with monitoring on -----------------------------------
    rocc0(CMD_MONITOR_START, '0, '0);
    monitoring_on = 1;
    for (int n = 0; n < 3000; n++) random_inst();
    drain_trace();
    rocc0(CMD_MONITOR_END, '0, '0);
    monitoring_on = 0;
    for (int n = 0; n < 200; n++) random_inst();
    wait_finish();
    compare_all("phase 1");

    // ---- phase 2: back-to-back loads fill the queue ---------------------------------
    rocc0(CMD_MONITOR_START, '0, '0);
    monitoring_on = 1;
    b0 = int'(mem.n_beats);
    for (int n = 0; n < 9300; n++)
      do_load($urandom_range(NPOOL - 2), 3'b011, 1 + (n % 31), 0);
    drain_trace();
    rocc0(CMD_MONITOR_END, '0, '0);
    monitoring_on = 0;
    wait_finish();
    compare_all("phase 2");
    n_tag_beats = int'(mem.n_beats) - b0;
    // every load walks 3 table levels and reads 16 tag beats
    checks++;
    if (n_tag_beats != 9300 * 19) begin failures++; $display("FAIL phase 2 bus beats %0d", n_tag_beats); end

    rocc(CMD_CHECK_STATUS, '0, '0, st);
    $display("status: done=%0d filtered=%0d", st[63:32], st[15:4]);
    $display("mechanisms: stall_cycles=%0d queue_full_exc=%0d resume=%0d poll_not_finished=%0d",
             n_stall, n_exc_full, n_resume, n_poll_busy);
    $display("            dropped_monitor_off=%0d dropped_unmatched=%0d filtered=%0d",
             n_drop_off, n_drop_unmatched, st[15:4]);
    $display("            load=%0d store=%0d alu=%0d imm=%0d shift=%0d", n_load, n_store, n_alu, n_imm, n_shift);
    checks++; if (n_stall == 0)          begin failures++; $display("FAIL no CPU stall"); end
    checks++; if (n_exc_full == 0)       begin failures++; $display("FAIL no queue-full exception"); end
    checks++; if (n_resume == 0)         begin failures++; $display("FAIL no resume"); end
    checks++; if (n_poll_busy == 0)      begin failures++; $display("FAIL never polled while busy"); end
    checks++; if (n_drop_off == 0)       begin failures++; $display("FAIL monitor-off never exercised"); end
    checks++; if (n_drop_unmatched == 0) begin failures++; $display("FAIL no unmatched instruction"); end
    checks++; if (st[15:4] == 0)         begin failures++; $display("FAIL filter never hit"); end
    checks++; if (n_load == 0 || n_store == 0 || n_alu == 0 || n_imm == 0 || n_shift == 0)
                                         begin failures++; $display("FAIL a rule type never ran"); end
    checks++;
    if (int'(st[63:32]) != n_load + n_store + n_alu + n_imm + n_shift) begin
      failures++; $display("FAIL completed %0d, expected %0d", st[63:32], n_load + n_store + n_alu + n_imm + n_shift);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
