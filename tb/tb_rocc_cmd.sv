// tb_rocc_cmd - checks decoding of every custom command, the page-table
// root register, the one-cycle response and the status word layout.
module tb_rocc_cmd;
  import mct_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid = 0, cmd_ready, resp_valid;
  logic [6:0] cmd_funct;
  xword_t cmd_rs1, cmd_rs2, resp_data, pt_root;
  logic mon_start, mon_end, resume, mon_cfg_we, mon_cfg_en, flt_base_we, flt_lim_we, flt_en;
  logic uc_we, treg_we;
  logic [3:0] mon_cfg_idx, treg_chunk;
  logic [31:0] mon_cfg_match, mon_cfg_mask;
  logic [RULE_W-1:0] mon_cfg_rule, uc_rule;
  logic [2:0] flt_idx;
  xword_t flt_addr, treg_wdata, treg_rdata;
  logic [4:0] uc_slot, treg_reg;
  ucode_t uc_word;
  logic st_monitoring, st_busy, st_suspended, st_q_empty;
  logic [13:0] st_q_count;
  logic [31:0] st_n_done, st_n_filtered;

  rocc_cmd dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign treg_rdata = {27'h0, treg_reg, 28'h0, treg_chunk} ^ 64'hA5A5_0000_0000_0000;

  task automatic send(input cmd_e c, input xword_t r1, input xword_t r2);
    @(negedge clk);
    cmd_valid = 1; cmd_funct = 7'(c); cmd_rs1 = r1; cmd_rs2 = r2;
    #1;
    checks++;
    if (!cmd_ready ||
        mon_start   !== (c == CMD_MONITOR_START) || mon_end    !== (c == CMD_MONITOR_END) ||
        resume      !== (c == CMD_RESUME)        || mon_cfg_we !== (c == CMD_CFG_MONITOR) ||
        flt_base_we !== (c == CMD_CFG_FILT_BASE) || flt_lim_we !== (c == CMD_CFG_FILT_LIM) ||
        uc_we       !== (c == CMD_WRITE_UCODE)   || treg_we    !== (c == CMD_WRITE_TREG)) begin
      failures++; $display("FAIL strobes for cmd %0d", c);
    end
    checks++;
    case (c)
      CMD_CFG_MONITOR: if (mon_cfg_match !== r1[31:0] || mon_cfg_mask !== r1[63:32] ||
                           mon_cfg_idx !== r2[3:0] || mon_cfg_rule !== r2[7:4] || mon_cfg_en !== r2[8])
                         begin failures++; $display("FAIL monitor fields"); end
      CMD_CFG_FILT_BASE, CMD_CFG_FILT_LIM:
                       if (flt_addr !== r1 || flt_idx !== r2[2:0] || flt_en !== r2[8])
                         begin failures++; $display("FAIL filter fields"); end
      CMD_WRITE_UCODE: if (uc_word !== r1[31:0] || uc_slot !== r2[4:0] || uc_rule !== r2[11:8])
                         begin failures++; $display("FAIL ucode fields"); end
      CMD_WRITE_TREG, CMD_READ_TREG:
                       if (treg_wdata !== r1 || treg_chunk !== r2[3:0] || treg_reg !== r2[12:8])
                         begin failures++; $display("FAIL treg fields"); end
      default: ;
    endcase
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic expect_resp(input xword_t v);
    checks++;
    if (!resp_valid || resp_data !== v) begin
      failures++; $display("FAIL resp %h exp %h valid %b", resp_data, v, resp_valid);
    end
  endtask

  initial begin
    xword_t st;
    cmd_funct = 0; cmd_rs1 = 0; cmd_rs2 = 0;
    st_monitoring = 0; st_busy = 0; st_suspended = 0; st_q_empty = 1;
    st_q_count = 0; st_n_done = 0; st_n_filtered = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      automatic cmd_e c = cmd_e'($urandom_range(10));
      automatic xword_t r1 = {$urandom, $urandom}, r2 = {$urandom, $urandom};
      st_monitoring = $urandom_range(1); st_busy = $urandom_range(1);
      st_suspended = $urandom_range(1); st_q_empty = $urandom_range(1);
      st_q_count = 14'($urandom); st_n_done = $urandom; st_n_filtered = $urandom;
      send(c, r1, r2);
      // response comes the cycle after the command
      st = {st_n_done, 2'b00, st_q_count, st_n_filtered[11:0], st_busy, st_monitoring,
            st_suspended, st_q_empty && !st_busy};
      if (c == CMD_CHECK_STATUS)   expect_resp(st);
      else if (c == CMD_READ_TREG) expect_resp({27'h0, r2[12:8], 28'h0, r2[3:0]} ^ 64'hA5A5_0000_0000_0000);
      else                         expect_resp('0);
      if (c == CMD_SET_PAGETABLE) begin
        checks++;
        if (pt_root !== r1) begin failures++; $display("FAIL pt_root"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
