// tb_rule_store - checks microcode writes and reads over all 15 x 30 slots,
// reset to FN_END, and that out-of-range writes are ignored.
module tb_rule_store;
  import mct_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0;
  logic [RULE_W-1:0] wrule, rrule;
  logic [4:0] wslot, rslot;
  ucode_t wdata, rdata;

  rule_store #(.NUM_RULES(15), .SLOTS(30)) dut (.clk, .rst_n, .we, .wrule, .wslot, .wdata,
                                               .rrule, .rslot, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [15][30];

  initial begin
    for (int r = 0; r < 15; r++) for (int s = 0; s < 30; s++) model[r][s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 15; r++) for (int s = 0; s < 30; s++) begin
      rrule = RULE_W'(r); rslot = 5'(s); #1;
      checks++;
      if (rdata !== '0) begin failures++; if (failures < 5) $display("FAIL reset %0d %0d", r, s); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1; wrule = RULE_W'($urandom); wslot = 5'($urandom); wdata = ucode_t'($urandom);
      @(posedge clk);
      if (wrule < 15 && wslot < 30) model[wrule][wslot] = wdata;
      @(negedge clk);
      we = 0;
      rrule = RULE_W'($urandom_range(14)); rslot = 5'($urandom_range(29)); #1;
      checks++;
      if (rdata !== model[rrule][rslot]) begin failures++; if (failures < 5) $display("FAIL read"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
