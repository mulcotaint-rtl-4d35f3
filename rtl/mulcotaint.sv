// mulcotaint - multi-tag dynamic taint analysis coprocessor with its CPU tap.
//
// The CPU runs the program normally; its write-back stage is tapped by the
// trace unit, and every retired instruction that a monitoring matcher selects
// is queued (instruction word, PC, data address, rule number). The
// coprocessor drains the queue at its own pace: the control unit runs the
// selected rule's microcode sequence, which computes 1024-bit taint tags
// (128 source bits for each of 8 bytes) in the ALU unit, keeps register tags in
// the taint register file, and reads/writes memory tags through a taint page
// table in main memory (walked by the rule's own data microcodes) over a
// 64-bit bus. The CPU controls everything through custom instructions
// (rocc_cmd). When the queue fills up, the CPU is stalled, an exception with
// cause CAUSE_QUEUE_FULL is raised and the coprocessor waits for RESUME.
//
// Ports: the CPU write-back signals and stall, the custom-instruction command
// and response port, the exception output and the 64-bit memory bus (see
// mem_access). Parameters default to the document's build: 9000-entry queue,
// 15 monitoring matchers, 30 microcodes per rule, 5 filter ranges. The rule
// count (15, one per matcher) is this design's choice.
module mulcotaint
  import mct_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 9000,
  parameter int unsigned NUM_MON     = 15,
  parameter int unsigned NUM_RULES   = 15,
  parameter int unsigned SLOTS       = 30,
  parameter int unsigned NUM_FILT    = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU write-back stage
  input  logic        wb_valid,
  input  logic [31:0] wb_inst,
  input  xword_t      wb_pc,
  input  xword_t      wb_maddr,
  output logic        cpu_stall,
  // custom instructions
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic [6:0]  cmd_funct,
  input  xword_t      cmd_rs1,
  input  xword_t      cmd_rs2,
  output logic        resp_valid,
  output xword_t      resp_data,
  // exception to the CPU
  output logic        exc_valid,
  output logic [3:0]  exc_cause,
  // 64-bit memory bus
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_we,
  output xword_t      mem_req_addr,
  output xword_t      mem_req_wdata,
  input  logic        mem_resp_valid,
  input  xword_t      mem_resp_rdata
);

  localparam int unsigned QCW = $clog2(QUEUE_DEPTH + 1);

  // ---- trace unit -> monitoring unit -> queue -------------------------------
  logic    tr_valid, tr_ready;
  trace_t  tr;
  logic    q_push, q_ready, q_pop, q_full, q_empty;
  qentry_t q_wdata, q_head;
  logic [QCW-1:0] q_count;

  trace_unit u_trace (
    .clk, .rst_n,
    .wb_valid, .wb_inst, .wb_pc, .wb_maddr, .cpu_stall,
    .tr_valid, .tr, .tr_ready
  );

  logic              mon_start, mon_end, monitoring;
  logic              mon_cfg_we, mon_cfg_en;
  logic [3:0]        mon_cfg_idx;
  logic [31:0]       mon_cfg_match, mon_cfg_mask;
  logic [RULE_W-1:0] mon_cfg_rule;

  monitor_unit #(.NUM_MON(NUM_MON)) u_mon (
    .clk, .rst_n,
    .mon_start, .mon_end, .monitoring,
    .cfg_we(mon_cfg_we), .cfg_idx(mon_cfg_idx), .cfg_match(mon_cfg_match),
    .cfg_mask(mon_cfg_mask), .cfg_rule(mon_cfg_rule), .cfg_en(mon_cfg_en),
    .tr_valid, .tr, .tr_ready,
    .q_push, .q_entry(q_wdata), .q_ready
  );

  assign q_ready = !q_full;

  trace_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
    .clk, .rst_n,
    .push(q_push), .wdata(q_wdata), .pop(q_pop), .rdata(q_head),
    .full(q_full), .empty(q_empty), .count(q_count)
  );

  // ---- command decoder --------------------------------------------------------
  logic              resume;
  xword_t            pt_root;
  logic              flt_base_we, flt_lim_we, flt_en;
  logic [2:0]        flt_idx;
  xword_t            flt_cfg_addr;
  logic              uc_we;
  logic [RULE_W-1:0] uc_rule;
  logic [4:0]        uc_slot;
  ucode_t            uc_word;
  logic              treg_we;
  logic [4:0]        treg_reg;
  logic [3:0]        treg_chunk;
  xword_t            treg_wdata, treg_rdata;
  logic              cu_busy, cu_suspended;
  logic [31:0]       n_done, n_filtered;

  rocc_cmd u_cmd (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_funct, .cmd_rs1, .cmd_rs2, .resp_valid, .resp_data,
    .mon_start, .mon_end, .resume, .pt_root,
    .mon_cfg_we, .mon_cfg_idx, .mon_cfg_match, .mon_cfg_mask, .mon_cfg_rule, .mon_cfg_en,
    .flt_base_we, .flt_lim_we, .flt_idx, .flt_addr(flt_cfg_addr), .flt_en,
    .uc_we, .uc_rule, .uc_slot, .uc_word,
    .treg_we, .treg_reg, .treg_chunk, .treg_wdata, .treg_rdata,
    .st_monitoring(monitoring), .st_busy(cu_busy), .st_suspended(cu_suspended),
    .st_q_empty(q_empty), .st_q_count(14'(q_count)), .st_n_done(n_done),
    .st_n_filtered(n_filtered)
  );

  // ---- calculation rules --------------------------------------------------------
  logic [RULE_W-1:0] rs_rule;
  logic [4:0]        rs_slot;
  ucode_t            rs_word;

  rule_store #(.NUM_RULES(NUM_RULES), .SLOTS(SLOTS)) u_rules (
    .clk, .rst_n,
    .we(uc_we), .wrule(uc_rule), .wslot(uc_slot), .wdata(uc_word),
    .rrule(rs_rule), .rslot(rs_slot), .rdata(rs_word)
  );

  // ---- taint registers -----------------------------------------------------------
  logic [4:0] tr_ra1, tr_ra2, tr_ra3, tr_wa;
  tag_t       tr_rd1, tr_rd2, tr_rd3, tr_wd;
  logic       tr_we;

  taint_regfile u_treg (
    .clk, .rst_n,
    .ra1(tr_ra1), .ra2(tr_ra2), .ra3(tr_ra3),
    .rd1(tr_rd1), .rd2(tr_rd2), .rd3(tr_rd3),
    .we(tr_we), .wa(tr_wa), .wd(tr_wd),
    .cwe(treg_we), .creg(treg_reg), .cchunk(treg_chunk),
    .cwdata(treg_wdata), .crdata(treg_rdata)
  );

  // ---- ALU unit -------------------------------------------------------------------
  fn_e         alu_fn;
  logic [31:0] alu_inst;
  logic [2:0]  alu_maddr_lo;
  tag_t        alu_tag_a, alu_tag_b, alu_tag_d, alu_tag_y;
  xword_t      alu_data_a, alu_data_b, alu_data_y;
  logic        alu_is_tag, alu_is_data;

  alu_unit u_alu (
    .fn(alu_fn), .inst(alu_inst), .maddr_lo(alu_maddr_lo),
    .tag_a(alu_tag_a), .tag_b(alu_tag_b), .tag_d(alu_tag_d),
    .data_a(alu_data_a), .data_b(alu_data_b),
    .tag_y(alu_tag_y), .data_y(alu_data_y),
    .is_tag_op(alu_is_tag), .is_data_op(alu_is_data)
  );

  // ---- filter unit ----------------------------------------------------------------
  xword_t flt_check_addr;
  logic   flt_hit;

  filter_unit #(.NUM_FILT(NUM_FILT)) u_filter (
    .clk, .rst_n,
    .cfg_base_we(flt_base_we), .cfg_lim_we(flt_lim_we), .cfg_idx(flt_idx),
    .cfg_addr(flt_cfg_addr), .cfg_en(flt_en),
    .addr(flt_check_addr), .hit(flt_hit)
  );

  // ---- memory access --------------------------------------------------------------
  logic   ma_req_valid, ma_req_ready, ma_req_tag, ma_req_we, ma_done;
  xword_t ma_req_addr, ma_req_wdata, ma_rdata;
  tag_t   ma_req_wtag, ma_rtag;

  mem_access u_mem (
    .clk, .rst_n,
    .req_valid(ma_req_valid), .req_ready(ma_req_ready), .req_tag(ma_req_tag),
    .req_we(ma_req_we), .req_addr(ma_req_addr), .req_wdata(ma_req_wdata),
    .req_wtag(ma_req_wtag), .done(ma_done), .rdata(ma_rdata), .rtag(ma_rtag),
    .bus_req_valid(mem_req_valid), .bus_req_ready(mem_req_ready), .bus_we(mem_req_we),
    .bus_addr(mem_req_addr), .bus_wdata(mem_req_wdata),
    .bus_resp_valid(mem_resp_valid), .bus_rdata(mem_resp_rdata)
  );

  // ---- control unit ---------------------------------------------------------------
  control_unit #(.SLOTS(SLOTS)) u_ctrl (
    .clk, .rst_n,
    .q_empty, .q_full, .q_head, .q_pop,
    .resume, .pt_root,
    .rs_rule, .rs_slot, .rs_word,
    .tr_ra1, .tr_ra2, .tr_ra3, .tr_rd1, .tr_rd2, .tr_rd3, .tr_we, .tr_wa, .tr_wd,
    .alu_fn, .alu_inst, .alu_maddr_lo, .alu_tag_a, .alu_tag_b, .alu_tag_d,
    .alu_data_a, .alu_data_b, .alu_tag_y, .alu_data_y, .alu_is_tag, .alu_is_data,
    .flt_addr(flt_check_addr), .flt_hit,
    .mem_req_valid(ma_req_valid), .mem_req_ready(ma_req_ready), .mem_req_tag(ma_req_tag),
    .mem_req_we(ma_req_we), .mem_req_addr(ma_req_addr), .mem_req_wdata(ma_req_wdata),
    .mem_req_wtag(ma_req_wtag), .mem_done(ma_done), .mem_rdata(ma_rdata), .mem_rtag(ma_rtag),
    .exc_valid, .exc_cause,
    .busy(cu_busy), .suspended(cu_suspended), .n_done, .n_filtered
  );

endmodule
