// tb_overflow_trace - a stack-overflow trace run through the full-size
// coprocessor, in the style of the buffer-overflow test cases used to
// evaluate multi-tag taint analysis.
//
// The program being traced copies 32 input bytes, one byte at a time
// (LBU / SB / ADDI / ADDI / BNE), into a 24-byte stack buffer. The last 8
// bytes overrun the buffer and land on a saved function pointer. The program
// then loads the pointer (LD) and jumps through it (JALR). Each input byte k
// is labelled as its own taint source (bit k of the 128 source bits), as the
// kernel would label bytes read from a file. After the run the testbench reads
// the pointer's taint register back and checks that byte j of the pointer is
// tainted by source byte 24+j and nothing else. So the analysis names input
// bytes 25..32 (counting from 1) as the ones that control the jump target.
// The memory tags of the whole stack buffer are checked as well.
//
// The coprocessor runs with every parameter at its default. The memory is a
// behavioural model holding the taint page table, which the testbench builds
// the way system software would.
module tb_overflow_trace;
  import mct_pkg::*;
  import mct_tb_pkg::*;

  localparam xword_t PT_ROOT = 64'h0010_0000;
  localparam xword_t IN_BUF  = 64'h0000_2000_0000;   // input data (heap)
  localparam xword_t STACK   = 64'h0000_3fff_ff00;   // 24-byte buffer, then the pointer
  localparam int     NCOPY   = 32;

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

  mem_model #(.LAT(2)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_we(mem_req_we), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata));

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- custom instructions -------------------------------------------------------
  task automatic rocc(input cmd_e c, input xword_t r1, input xword_t r2, output xword_t r);
    @(negedge clk);
    cmd_valid = 1; cmd_funct = 7'(c); cmd_rs1 = r1; cmd_rs2 = r2;
    @(negedge clk);
    cmd_valid = 0;
    if (!resp_valid) begin failures++; $display("FAIL no response to command %0d", c); end
    r = resp_data;
  endtask
  task automatic rocc0(input cmd_e c, input xword_t r1, input xword_t r2);
    xword_t r;
    rocc(c, r1, r2, r);
  endtask

  // ---- taint page table, built by the testbench --------------------------------------
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

  // tag in which byte j carries only source bit first+j
  function automatic tag_t src_tag(input int first);
    tag_t t = '0;
    for (int j = 0; j < BYTES; j++) t[j*SRC_TAGS + first + j] = 1'b1;
    return t;
  endfunction

  xword_t pc = 64'h0001_0000;
  task automatic retire(input logic [31:0] inst, input xword_t maddr);
    @(negedge clk);
    wb_valid = 1; wb_inst = inst; wb_pc = pc; wb_maddr = maddr;
    while (cpu_stall) @(negedge clk);
    @(posedge clk);
    #1 wb_valid = 0;
    pc += 4;
  endtask

  function automatic xword_t mon_cfg(input int idx, input int rule, input bit en);
    return {55'h0, en, 4'(rule), 4'(idx)};
  endfunction

  task automatic read_treg(input int r, output tag_t t);
    xword_t v;
    for (int c = 0; c < 16; c++) begin
      rocc(CMD_READ_TREG, '0, {51'h0, 5'(r), 4'h0, 4'(c)}, v);
      t[64*c +: 64] = v;
    end
  endtask

  initial begin
    prog_t progs [5];
    xword_t st;
    tag_t   t, want;
    int     n_polls = 0;
    progs[0] = load_prog(); progs[1] = store_prog(); progs[2] = alu_reg_prog();
    progs[3] = alu_imm_prog(); progs[4] = shift_reg_prog();

    // input bytes 0..63 are taint sources 0..63
    for (int w = 0; w < 8; w++) write_tag(map_va(IN_BUF + 64'(8*w)), src_tag(8*w));
    for (int w = 0; w < 4; w++) void'(map_va(STACK + 64'(8*w)));   // clean stack tags

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++)
      foreach (progs[r][s]) rocc0(CMD_WRITE_UCODE, {32'h0, progs[r][s]}, {52'h0, 4'(r), 3'h0, 5'(s)});
    rocc0(CMD_CFG_MONITOR, {32'h0000_307F, 32'h0000_1033}, mon_cfg(0, 4, 1));
    rocc0(CMD_CFG_MONITOR, {32'h0000_307F, 32'h0000_103B}, mon_cfg(1, 4, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_LOAD)},    mon_cfg(2, 0, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_STORE)},   mon_cfg(3, 1, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_OP)},      mon_cfg(4, 2, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_OP32)},    mon_cfg(5, 2, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_OPIMM)},   mon_cfg(6, 3, 1));
    rocc0(CMD_CFG_MONITOR, {32'h7F, 32'(OPC_OPIMM32)}, mon_cfg(7, 3, 1));
    rocc0(CMD_SET_PAGETABLE, PT_ROOT, '0);
    rocc0(CMD_MONITOR_START, '0, '0);

    // for (i = 0; i < 32; i++) buf[i] = in[i];   x10 = in, x11 = buf, x12 = end
    retire(enc_i(OPC_OPIMM, 3'b000, 12, 11, 12'd32), '0);              // addi x12, x11, 32
    for (int i = 0; i < NCOPY; i++) begin
      retire(enc_i(OPC_LOAD, 3'b100, 5, 10, 12'd0), IN_BUF + 64'(i)); // lbu  x5, 0(x10)
      retire(enc_s(3'b000, 11, 5, 12'd0), STACK + 64'(i));            // sb   x5, 0(x11)
      retire(enc_i(OPC_OPIMM, 3'b000, 10, 10, 12'd1), '0);             // addi x10, x10, 1
      retire(enc_i(OPC_OPIMM, 3'b000, 11, 11, 12'd1), '0);             // addi x11, x11, 1
      retire({7'h0, 5'd12, 5'd11, 3'b001, 5'b11000, 7'b1100011}, '0);  // bne  x11, x12, loop
    end
    retire(enc_i(OPC_LOAD, 3'b011, 1, 2, 12'd24), STACK + 64'd24);     // ld   x1, 24(x2)
    retire(enc_i(7'b1100111, 3'b000, 0, 1, 12'd0), '0);                // jalr x0, 0(x1)
    @(negedge clk);
    while (cpu_stall) @(negedge clk);
    rocc0(CMD_MONITOR_END, '0, '0);

    do begin
      rocc(CMD_CHECK_STATUS, '0, '0, st);
      n_polls++;
      repeat (4) @(negedge clk);
    end while (!st[0]);
    $display("finished after %0d polls: %0d instructions processed", n_polls, st[63:32]);
    checks++;
    if (int'(st[63:32]) != 1 + 4 * NCOPY + 1) begin
      failures++; $display("FAIL processed %0d instructions", st[63:32]);
    end

    // the jump target: byte j depends on input byte 24+j only
    read_treg(1, t);
    want = src_tag(24);
    checks++;
    if (t !== want) begin failures++; $display("FAIL pointer register tag"); end
    for (int j = 0; j < BYTES; j++) begin
      logic [SRC_TAGS-1:0] b = t[j*SRC_TAGS +: SRC_TAGS];
      for (int s = 0; s < SRC_TAGS; s++)
        if (b[s]) $display("x1 byte %0d <- input byte %0d", j, s + 1);
    end
    // the last copied byte stays in x5 with only its own source
    read_treg(5, t);
    want = '0; want[NCOPY - 1] = 1'b1;
    checks++;
    if (t !== want) begin failures++; $display("FAIL x5 tag"); end
    // the pointer registers x10, x11, x12 stay clean
    for (int r = 10; r <= 12; r++) begin
      read_treg(r, t);
      checks++;
      if (t !== '0) begin failures++; $display("FAIL x%0d tainted", r); end
    end
    // stack memory tags: dword w of the buffer holds input bytes 8w..8w+7
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (read_tag(map_va(STACK + 64'(8*w))) !== src_tag(8*w)) begin
        failures++; $display("FAIL stack tag dword %0d", w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
