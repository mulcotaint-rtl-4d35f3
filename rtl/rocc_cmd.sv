// rocc_cmd - decoder for the custom (RoCC) instructions sent by the CPU.
//
// Every command is accepted at once (cmd_ready is 1) and answered one cycle
// later with a single-cycle resp_valid; commands that return nothing answer 0.
// Commands (funct7, see mct_pkg::cmd_e), with operands rs1/rs2:
//   MONITOR_START / MONITOR_END   switch instruction monitoring on / off
//   SET_PAGETABLE  rs1 = first address of the root taint page table
//   CHECK_STATUS   answer {n_done[31:0], 2'b0, q_count[13:0],
//                  n_filtered[11:0], busy, monitoring, suspended, finished}; finished means the
//                  queue is empty and no instruction is being processed
//   RESUME         continue after the queue-full interrupt
//   CFG_MONITOR    rs1 = {mask, match}; rs2[3:0] matcher, [7:4] rule, [8] enable
//   CFG_FILT_BASE  rs1 = base;  rs2[2:0] filter
//   CFG_FILT_LIM   rs1 = limit (exclusive); rs2[2:0] filter, rs2[8] enable
//   WRITE_UCODE    rs1[31:0] = microcode word; rs2[4:0] slot, rs2[11:8] rule
//   WRITE_TREG     rs1 = 64 tag bits; rs2[3:0] chunk, rs2[12:8] register
//   READ_TREG      answer 64 tag bits; rs2 as for WRITE_TREG
// Monitor start/end, page-table address distribution, status polling and the
// resume after a full queue are the interfaces the document describes; the
// opcodes and operand layouts are this design's choice.
module rocc_cmd
  import mct_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [6:0]        cmd_funct,
  input  xword_t            cmd_rs1,
  input  xword_t            cmd_rs2,
  output logic              resp_valid,
  output xword_t            resp_data,
  // control
  output logic              mon_start,
  output logic              mon_end,
  output logic              resume,
  output xword_t            pt_root,
  // monitoring unit configuration
  output logic              mon_cfg_we,
  output logic [3:0]        mon_cfg_idx,
  output logic [31:0]       mon_cfg_match,
  output logic [31:0]       mon_cfg_mask,
  output logic [RULE_W-1:0] mon_cfg_rule,
  output logic              mon_cfg_en,
  // filter unit configuration
  output logic              flt_base_we,
  output logic              flt_lim_we,
  output logic [2:0]        flt_idx,
  output xword_t            flt_addr,
  output logic              flt_en,
  // rule store
  output logic              uc_we,
  output logic [RULE_W-1:0] uc_rule,
  output logic [4:0]        uc_slot,
  output ucode_t            uc_word,
  // taint register chunk access
  output logic              treg_we,
  output logic [4:0]        treg_reg,
  output logic [3:0]        treg_chunk,
  output xword_t            treg_wdata,
  input  xword_t            treg_rdata,
  // status
  input  logic              st_monitoring,
  input  logic              st_busy,
  input  logic              st_suspended,
  input  logic              st_q_empty,
  input  logic [13:0]       st_q_count,
  input  logic [31:0]       st_n_done,
  input  logic [31:0]       st_n_filtered
);

  logic go;
  assign cmd_ready = 1'b1;
  assign go        = cmd_valid;

  function automatic logic is(input logic [6:0] f, input cmd_e c);
    return f == 7'(c);
  endfunction

  assign mon_start     = go && is(cmd_funct, CMD_MONITOR_START);
  assign mon_end       = go && is(cmd_funct, CMD_MONITOR_END);
  assign resume        = go && is(cmd_funct, CMD_RESUME);

  assign mon_cfg_we    = go && is(cmd_funct, CMD_CFG_MONITOR);
  assign mon_cfg_idx   = cmd_rs2[3:0];
  assign mon_cfg_rule  = cmd_rs2[7:4];
  assign mon_cfg_en    = cmd_rs2[8];
  assign mon_cfg_match = cmd_rs1[31:0];
  assign mon_cfg_mask  = cmd_rs1[63:32];

  assign flt_base_we   = go && is(cmd_funct, CMD_CFG_FILT_BASE);
  assign flt_lim_we    = go && is(cmd_funct, CMD_CFG_FILT_LIM);
  assign flt_idx       = cmd_rs2[2:0];
  assign flt_addr      = cmd_rs1;
  assign flt_en        = cmd_rs2[8];

  assign uc_we         = go && is(cmd_funct, CMD_WRITE_UCODE);
  assign uc_word       = ucode_t'(cmd_rs1[31:0]);
  assign uc_slot       = cmd_rs2[4:0];
  assign uc_rule       = cmd_rs2[11:8];

  assign treg_we       = go && is(cmd_funct, CMD_WRITE_TREG);
  assign treg_chunk    = cmd_rs2[3:0];
  assign treg_reg      = cmd_rs2[12:8];
  assign treg_wdata    = cmd_rs1;

  xword_t status;
  assign status = {st_n_done, 2'b00, st_q_count, st_n_filtered[11:0],
                   st_busy, st_monitoring, st_suspended, st_q_empty && !st_busy};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pt_root    <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
    end else begin
      resp_valid <= go;
      if (go) begin
        if (is(cmd_funct, CMD_CHECK_STATUS))   resp_data <= status;
        else if (is(cmd_funct, CMD_READ_TREG)) resp_data <= treg_rdata;
        else                                   resp_data <= '0;
      end
      if (go && is(cmd_funct, CMD_SET_PAGETABLE)) pt_root <= cmd_rs1;
    end
  end

endmodule
