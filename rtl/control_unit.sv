// control_unit - microcode sequencer of the taint coprocessor.
//
// Takes one instruction record at a time from the queue and runs the
// microcode sequence of the rule the monitoring unit attached to it. Each
// microcode names its inputs and output with 4-bit selects (see mct_pkg):
// tag operands are the taint registers of the instruction's rs1/rs2/rd
// (TAINT_VEC) or the fixed Taint_Reg0/1, data operands are Local_Reg0-5, the
// traced memory address and PC, the taint page-table root or the microcode
// immediate. Tag and data calculation microcodes are evaluated by the ALU unit
// and retire in one cycle. FN_READ_DATA/WRITE_DATA (64-bit) and
// FN_READ_TAG/WRITE_TAG (1024-bit) go to the memory access unit and retire
// when it reports done; the address is the second input (a local register),
// as in the document's microcode table. FN_FILTER ends the rule when its
// address input lies in a filtered range. A rule ends at FN_END or after its
// last slot. An unknown function code ends the rule and reports
// CAUSE_BAD_UCODE.
//
// Queue full: when the queue becomes full the unit raises an exception with
// CAUSE_QUEUE_FULL and suspends, i.e. finishes the instruction in hand but
// takes no new one until software sends resume. This follows the document;
// the cycle-level sequencing and all encodings are this design's choice.
//
// Timing: 1 cycle to take a record, 1 cycle per calculation microcode, the
// memory latency plus 1 cycle per memory microcode, 1 cycle for FN_END.
module control_unit
  import mct_pkg::*;
#(
  parameter int unsigned SLOTS = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  // queue
  input  logic              q_empty,
  input  logic              q_full,
  input  qentry_t           q_head,
  output logic              q_pop,
  // software control
  input  logic              resume,
  input  xword_t            pt_root,
  // calculation rules
  output logic [RULE_W-1:0] rs_rule,
  output logic [4:0]        rs_slot,
  input  ucode_t            rs_word,
  // taint registers
  output logic [4:0]        tr_ra1,
  output logic [4:0]        tr_ra2,
  output logic [4:0]        tr_ra3,
  input  tag_t              tr_rd1,
  input  tag_t              tr_rd2,
  input  tag_t              tr_rd3,
  output logic              tr_we,
  output logic [4:0]        tr_wa,
  output tag_t              tr_wd,
  // ALU unit
  output fn_e               alu_fn,
  output logic [31:0]       alu_inst,
  output logic [2:0]        alu_maddr_lo,
  output tag_t              alu_tag_a,
  output tag_t              alu_tag_b,
  output tag_t              alu_tag_d,
  output xword_t            alu_data_a,
  output xword_t            alu_data_b,
  input  tag_t              alu_tag_y,
  input  xword_t            alu_data_y,
  input  logic              alu_is_tag,
  input  logic              alu_is_data,
  // filter unit
  output xword_t            flt_addr,
  input  logic              flt_hit,
  // memory access
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_tag,
  output logic              mem_req_we,
  output xword_t            mem_req_addr,
  output xword_t            mem_req_wdata,
  output tag_t              mem_req_wtag,
  input  logic              mem_done,
  input  xword_t            mem_rdata,
  input  tag_t              mem_rtag,
  // exception to the CPU
  output logic              exc_valid,
  output logic [3:0]        exc_cause,
  // status
  output logic              busy,
  output logic              suspended,
  output logic [31:0]       n_done,      // instructions whose rule completed
  output logic [31:0]       n_filtered   // instructions ended by FN_FILTER
);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_MEM} state_e;
  state_e state;

  qentry_t    cur;
  logic [4:0] pc;
  xword_t     lreg [NUM_LREGS];
  tag_t       treg0, treg1;
  logic       full_q;

  ucode_t uc;
  assign rs_rule = cur.rule;
  assign rs_slot = pc;
  assign uc      = rs_word;

  assign tr_ra1 = cur.tr.inst[19:15];
  assign tr_ra2 = cur.tr.inst[24:20];
  assign tr_ra3 = cur.tr.inst[11:7];

  function automatic tag_t tag_sel(input logic [3:0] s, input tag_t r1, input tag_t r2,
                                    input tag_t r3, input tag_t t0, input tag_t t1);
    unique case (s)
      T_RS1:   return r1;
      T_RS2:   return r2;
      T_RD:    return r3;
      T_TR0:   return t0;
      T_TR1:   return t1;
      default: return '0;
    endcase
  endfunction

  xword_t data_opnd [2];
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      logic [3:0] s;
      s = (k == 0) ? uc.a : uc.b;
      if (32'(s) < NUM_LREGS)  data_opnd[k] = lreg[s[2:0]];
      else if (s == D_MADDR)   data_opnd[k] = cur.tr.maddr;
      else if (s == D_PTROOT)  data_opnd[k] = pt_root;
      else if (s == D_IMM)     data_opnd[k] = XLEN'(uc.imm);
      else if (s == D_PC)      data_opnd[k] = cur.tr.pc;
      else                     data_opnd[k] = '0;
    end
  end

  assign alu_fn       = uc.fn;
  assign alu_inst     = cur.tr.inst;
  assign alu_maddr_lo = cur.tr.maddr[2:0];
  assign alu_tag_a    = tag_sel(uc.a, tr_rd1, tr_rd2, tr_rd3, treg0, treg1);
  assign alu_tag_b    = tag_sel(uc.b, tr_rd1, tr_rd2, tr_rd3, treg0, treg1);
  assign alu_tag_d    = tag_sel(uc.d, tr_rd1, tr_rd2, tr_rd3, treg0, treg1);
  assign alu_data_a   = data_opnd[0];
  assign alu_data_b   = data_opnd[1];
  assign flt_addr     = data_opnd[0];

  logic is_mem_op;
  assign is_mem_op = (uc.fn == FN_READ_DATA) || (uc.fn == FN_WRITE_DATA) ||
                     (uc.fn == FN_READ_TAG)  || (uc.fn == FN_WRITE_TAG);

  assign mem_req_valid = (state == S_EXEC) && is_mem_op;
  assign mem_req_tag   = (uc.fn == FN_READ_TAG) || (uc.fn == FN_WRITE_TAG);
  assign mem_req_we    = (uc.fn == FN_WRITE_DATA) || (uc.fn == FN_WRITE_TAG);
  assign mem_req_addr  = data_opnd[1];
  assign mem_req_wdata = data_opnd[0];
  assign mem_req_wtag  = alu_tag_a;

  assign q_pop = (state == S_IDLE) && !q_empty && !suspended;
  assign busy  = (state != S_IDLE);

  // destination of a tag result: a taint register or a fixed temporary
  logic tag_wr;
  tag_t tag_wv;
  always_comb begin
    tag_wr = 1'b0;
    tag_wv = alu_tag_y;
    if (state == S_EXEC && alu_is_tag) tag_wr = 1'b1;
    if (state == S_MEM && mem_done && uc.fn == FN_READ_TAG) begin
      tag_wr = 1'b1;
      tag_wv = mem_rtag;
    end
  end

  always_comb begin
    tr_we = 1'b0;
    tr_wa = '0;
    tr_wd = tag_wv;
    if (tag_wr) begin
      unique case (uc.d)
        T_RS1: begin tr_we = 1'b1; tr_wa = tr_ra1; end
        T_RS2: begin tr_we = 1'b1; tr_wa = tr_ra2; end
        T_RD:  begin tr_we = 1'b1; tr_wa = tr_ra3; end
        default: ;
      endcase
    end
  end

  logic last_slot;
  assign last_slot = (32'(pc) == SLOTS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      pc         <= '0;
      treg0      <= '0;
      treg1      <= '0;
      for (int i = 0; i < NUM_LREGS; i++) lreg[i] <= '0;
      full_q     <= 1'b0;
      suspended  <= 1'b0;
      exc_valid  <= 1'b0;
      exc_cause  <= '0;
      n_done     <= '0;
      n_filtered <= '0;
    end else begin
      exc_valid <= 1'b0;
      full_q    <= q_full;
      if (q_full && !full_q) begin
        suspended <= 1'b1;
        exc_valid <= 1'b1;
        exc_cause <= CAUSE_QUEUE_FULL;
      end else if (resume) begin
        suspended <= 1'b0;
      end

      if (tag_wr) begin
        if (uc.d == T_TR0) treg0 <= tag_wv;
        if (uc.d == T_TR1) treg1 <= tag_wv;
      end

      unique case (state)
        S_IDLE: if (q_pop) begin
          cur   <= q_head;
          pc    <= '0;
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (uc.fn == FN_END) begin
            n_done <= n_done + 1;
            state  <= S_IDLE;
          end else if (uc.fn == FN_FILTER) begin
            if (flt_hit) begin
              n_filtered <= n_filtered + 1;
              n_done     <= n_done + 1;
              state      <= S_IDLE;
            end else if (last_slot) begin
              n_done <= n_done + 1;
              state  <= S_IDLE;
            end else begin
              pc <= pc + 1'b1;
            end
          end else if (is_mem_op) begin
            if (mem_req_ready) state <= S_MEM;
          end else if (alu_is_tag || alu_is_data) begin
            if (alu_is_data && 32'(uc.d) < NUM_LREGS) lreg[uc.d[2:0]] <= alu_data_y;
            if (last_slot) begin
              n_done <= n_done + 1;
              state  <= S_IDLE;
            end else begin
              pc <= pc + 1'b1;
            end
          end else begin
            exc_valid <= 1'b1;
            exc_cause <= CAUSE_BAD_UCODE;
            state     <= S_IDLE;
          end
        end
        S_MEM: if (mem_done) begin
          if (uc.fn == FN_READ_DATA && 32'(uc.d) < NUM_LREGS) lreg[uc.d[2:0]] <= mem_rdata;
          if (last_slot) begin
            n_done <= n_done + 1;
            state  <= S_IDLE;
          end else begin
            pc    <= pc + 1'b1;
            state <= S_EXEC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
