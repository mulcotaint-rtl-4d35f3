// monitor_unit - selects the instructions that need taint analysis.
//
// NUM_MON pattern matchers (15 in the document's build) each compare the
// traced instruction word with a configured (match, mask) pair. While
// monitoring is on, the first enabled matcher that hits sends the record to
// the queue together with the matcher's configured rule number; records that
// match nothing, or arrive while monitoring is off, are dropped. Monitoring is
// switched on by mon_start and off by mon_end (the Monitor_Start/Monitor_End
// control instructions, also used by the OS around process switches).
// Combinational in the data path: tr_ready follows q_ready for a record that
// will be queued and is 1 for a record that is dropped. Configuration is one
// matcher per cfg_we pulse. The matcher count follows the document; the
// match/mask form and the per-matcher rule number are this design's choice.
module monitor_unit
  import mct_pkg::*;
#(
  parameter int unsigned NUM_MON = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mon_start,
  input  logic              mon_end,
  output logic              monitoring,
  // configuration
  input  logic              cfg_we,
  input  logic [3:0]        cfg_idx,
  input  logic [31:0]       cfg_match,
  input  logic [31:0]       cfg_mask,
  input  logic [RULE_W-1:0] cfg_rule,
  input  logic              cfg_en,
  // from the trace unit
  input  logic              tr_valid,
  input  trace_t            tr,
  output logic              tr_ready,
  // to the queue
  output logic              q_push,
  output qentry_t           q_entry,
  input  logic              q_ready
);

  logic [31:0]       m_match [NUM_MON];
  logic [31:0]       m_mask  [NUM_MON];
  logic [RULE_W-1:0] m_rule  [NUM_MON];
  logic [NUM_MON-1:0] m_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      monitoring <= 1'b0;
      m_en       <= '0;
      for (int i = 0; i < NUM_MON; i++) begin
        m_match[i] <= '0;
        m_mask[i]  <= '0;
        m_rule[i]  <= '0;
      end
    end else begin
      if (mon_start)    monitoring <= 1'b1;
      else if (mon_end) monitoring <= 1'b0;
      if (cfg_we && 32'(cfg_idx) < NUM_MON) begin
        m_match[cfg_idx] <= cfg_match;
        m_mask[cfg_idx]  <= cfg_mask;
        m_rule[cfg_idx]  <= cfg_rule;
        m_en[cfg_idx]    <= cfg_en;
      end
    end
  end

  logic              hit;
  logic [RULE_W-1:0] hit_rule;
  always_comb begin
    hit      = 1'b0;
    hit_rule = '0;
    for (int i = NUM_MON - 1; i >= 0; i--) begin
      if (m_en[i] && ((tr.inst & m_mask[i]) == (m_match[i] & m_mask[i]))) begin
        hit      = 1'b1;
        hit_rule = m_rule[i];
      end
    end
  end

  logic sel;
  assign sel      = tr_valid && monitoring && hit;
  assign q_push   = sel && q_ready;
  assign q_entry  = '{rule: hit_rule, tr: tr};
  assign tr_ready = sel ? q_ready : 1'b1;

endmodule
