// tb_filter_unit - checks range hits of the five filter ranges, the
// exclusive limit, the enable bit and reconfiguration.
module tb_filter_unit;
  import mct_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_base_we = 0, cfg_lim_we = 0, cfg_en = 0, hit;
  logic [2:0] cfg_idx = 0;
  xword_t cfg_addr = 0, addr = 0;

  filter_unit #(.NUM_FILT(5)) dut (.clk, .rst_n, .cfg_base_we, .cfg_lim_we, .cfg_idx,
                                   .cfg_addr, .cfg_en, .addr, .hit);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  xword_t b [5], l [5];
  bit     e [5];

  task automatic set(input int i, input xword_t base, input xword_t lim, input bit en);
    @(negedge clk); cfg_idx = 3'(i); cfg_addr = base; cfg_base_we = 1;
    @(negedge clk); cfg_base_we = 0; cfg_addr = lim; cfg_lim_we = 1; cfg_en = en;
    @(negedge clk); cfg_lim_we = 0;
    b[i] = base; l[i] = lim; e[i] = en;
  endtask

  task automatic probe(input xword_t a);
    bit exp = 0;
    addr = a; #1;
    for (int i = 0; i < 5; i++) if (e[i] && a >= b[i] && a < l[i]) exp = 1;
    checks++;
    if (hit !== exp) begin failures++; if (failures < 5) $display("FAIL addr %h hit %b", a, hit); end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) begin b[i] = 0; l[i] = 0; e[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    probe(64'h1000);                           // nothing configured
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 5; i++) begin
        automatic xword_t base = {32'h0, $urandom} & ~64'hFFF;
        set(i, base, base + 64'($urandom_range(1, 4)) * 64'h1000, $urandom_range(3) != 0);
      end
      for (int i = 0; i < 5; i++) begin
        probe(b[i]); probe(b[i] - 1); probe(l[i]); probe(l[i] - 1);
      end
      for (int n = 0; n < 50; n++) probe({32'h0, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
