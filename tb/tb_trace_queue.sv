// tb_trace_queue - checks FIFO order, full/empty flags and count at the
// document's depth (9000), including filling it completely.
module tb_trace_queue;
  import mct_pkg::*;

  localparam int DEPTH = 9000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push = 0, pop = 0, full, empty;
  qentry_t wdata, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;

  trace_queue #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .full, .empty, .count);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qentry_t model [$];
  int n_full = 0;

  task automatic step(input bit do_push, input bit do_pop);
    qentry_t e;
    @(negedge clk);
    push = do_push; pop = do_pop;
    wdata = qentry_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    #1;
    checks++;
    if (full !== (model.size() == DEPTH) || empty !== (model.size() == 0) || int'(count) != model.size()) begin
      failures++;
      if (failures < 5) $display("FAIL flags size=%0d count=%0d full=%b empty=%b", model.size(), count, full, empty);
    end
    if (!empty && pop) begin
      checks++;
      if (rdata !== model[0]) begin failures++; if (failures < 5) $display("FAIL data"); end
    end
    if (full) n_full++;
    begin
      int sz = model.size();
      @(posedge clk);
      if (pop && sz > 0) e = model.pop_front();
      if (push && sz < DEPTH) model.push_back(wdata);   // no push while full
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) step($urandom_range(1), $urandom_range(1));
    for (int n = 0; n < DEPTH + 10; n++) step(1, 0);          // fill up, push while full
    step(1, 1);                                               // push and pop while full
    for (int n = 0; n < 500; n++) step($urandom_range(1), $urandom_range(1));
    for (int n = 0; n < DEPTH + 10; n++) step(0, 1);          // drain, pop while empty
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
