// tb_monitor_unit - checks instruction selection, rule tagging, priority and
// the Monitor_Start/Monitor_End switch.
module tb_monitor_unit;
  import mct_pkg::*;
  import mct_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic mon_start = 0, mon_end = 0, monitoring;
  logic cfg_we = 0, cfg_en = 0;
  logic [3:0] cfg_idx = 0;
  logic [31:0] cfg_match = 0, cfg_mask = 0;
  logic [RULE_W-1:0] cfg_rule = 0;
  logic tr_valid = 0, tr_ready, q_push, q_ready = 1;
  trace_t tr;
  qentry_t q_entry;

  monitor_unit #(.NUM_MON(15)) dut (.clk, .rst_n, .mon_start, .mon_end, .monitoring,
    .cfg_we, .cfg_idx, .cfg_match, .cfg_mask, .cfg_rule, .cfg_en,
    .tr_valid, .tr, .tr_ready, .q_push, .q_entry, .q_ready);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input int idx, input logic [31:0] m, input logic [31:0] k,
                     input int rule, input bit en);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 4'(idx); cfg_match = m; cfg_mask = k; cfg_rule = RULE_W'(rule); cfg_en = en;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // expected: opcode matchers 0..3; matcher 4 = shifts in OP (funct3 x01) -> rule 4
  function automatic int exp_rule(input logic [31:0] i);
    if (i[6:0] == OPC_OP && i[13:12] == 2'b01) return 4;
    case (i[6:0])
      OPC_LOAD:  return 0;
      OPC_STORE: return 1;
      OPC_OP:    return 2;
      OPC_OPIMM: return 3;
      default:   return -1;
    endcase
  endfunction

  task automatic drive(input logic [31:0] i, input bit on);
    int e;
    @(negedge clk);
    tr_valid = 1; tr.inst = i; tr.pc = {$urandom, $urandom}; tr.maddr = {$urandom, $urandom};
    q_ready = ($urandom_range(3) != 0);
    #1;
    e = on ? exp_rule(i) : -1;
    checks++;
    if (e < 0) begin
      if (q_push || !tr_ready) begin failures++; $display("FAIL %h should be dropped", i); end
    end else begin
      if (q_push !== q_ready || tr_ready !== q_ready || (q_push && (int'(q_entry.rule) != e || q_entry.tr !== tr))) begin
        failures++;
        $display("FAIL %h rule %0d exp %0d push %b", i, q_entry.rule, e, q_push);
      end
    end
  endtask

  initial begin
    automatic logic [6:0] opcs [6] = '{OPC_LOAD, OPC_STORE, OPC_OP, OPC_OPIMM, 7'b1101111, 7'b0110111};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // shift matcher configured at a higher index than the OP matcher: the
    // lower index wins, so put shifts at index 1 ... use explicit order
    cfg(0, 32'h0000_1033, 32'h0000_307F, 4, 1);  // OP with funct3 x01 -> rule 4
    cfg(1, 32'(OPC_LOAD),  32'h7F, 0, 1);
    cfg(2, 32'(OPC_STORE), 32'h7F, 1, 1);
    cfg(3, 32'(OPC_OP),    32'h7F, 2, 1);
    cfg(4, 32'(OPC_OPIMM), 32'h7F, 3, 1);
    cfg(14, 32'h0000_006F, 32'h7F, 9, 0);       // JAL matcher, disabled
    // monitoring off: everything dropped
    for (int n = 0; n < 200; n++) drive({$urandom} & 32'hFFFF_FF80 | 32'(opcs[$urandom_range(5)]), 0);
    @(negedge clk); tr_valid = 0; mon_start = 1; @(negedge clk); mon_start = 0;
    checks++;
    if (!monitoring) begin failures++; $display("FAIL monitoring not on"); end
    for (int n = 0; n < 2000; n++) drive({$urandom} & 32'hFFFF_FF80 | 32'(opcs[$urandom_range(5)]), 1);
    @(negedge clk); tr_valid = 0; mon_end = 1; @(negedge clk); mon_end = 0;
    for (int n = 0; n < 200; n++) drive({$urandom} & 32'hFFFF_FF80 | 32'(opcs[$urandom_range(5)]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
