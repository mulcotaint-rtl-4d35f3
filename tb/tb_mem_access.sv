// tb_mem_access - checks 64-bit data and 1024-bit tag reads and writes over
// the 64-bit bus against a behavioural memory with latency and stalls, the
// 16 bus operations per tag access, the beat order and the cycle count.
module tb_mem_access;
  import mct_pkg::*;
  import mct_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, req_tag, req_we, done;
  xword_t req_addr, req_wdata, rdata;
  tag_t req_wtag, rtag;
  logic bus_req_valid, bus_req_ready, bus_we, bus_resp_valid;
  xword_t bus_addr, bus_wdata, bus_rdata;

  mem_access dut (.clk, .rst_n, .req_valid, .req_ready, .req_tag, .req_we, .req_addr,
                  .req_wdata, .req_wtag, .done, .rdata, .rtag,
                  .bus_req_valid, .bus_req_ready, .bus_we, .bus_addr, .bus_wdata,
                  .bus_resp_valid, .bus_rdata);

  mem_model #(.LAT(2), .STALL_EVERY(5)) mem (.clk, .req_valid(bus_req_valid), .req_ready(bus_req_ready),
    .req_we(bus_we), .req_addr(bus_addr), .req_wdata(bus_wdata),
    .resp_valid(bus_resp_valid), .resp_rdata(bus_rdata));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit tag, input bit we, input xword_t a, input xword_t wd,
                        input tag_t wt, output int cycles, output int beats);
    int b0 = int'(mem.n_beats);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_tag = tag; req_we = we; req_addr = a; req_wdata = wd; req_wtag = wt;
    @(negedge clk);
    req_valid = 0; req_wdata = '0; req_wtag = '0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    beats = int'(mem.n_beats) - b0;
  endtask

  initial begin
    int cyc, beats;
    tag_t t;
    xword_t a, v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      // tag write then read back, compared with the memory words
      a = {32'h0, $urandom} & ~64'h7F;
      t = rand_tag() ^ {16{$urandom, $urandom}};
      access(1, 1, a, '0, t, cyc, beats);
      checks++;
      if (beats != 16) begin failures++; $display("FAIL tag write took %0d beats", beats); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (mem.peek(a + 64'(8*i)) !== t[64*i +: 64]) begin
          failures++; if (failures < 5) $display("FAIL tag write beat %0d", i);
        end
      end
      // overwrite one word behind its back, read the tag
      v = {$urandom, $urandom};
      mem.poke(a + 64'h38, v);
      t[64*7 +: 64] = v;
      access(1, 0, a, '0, '0, cyc, beats);
      checks++;
      if (rtag !== t || beats != 16) begin failures++; $display("FAIL tag read"); end
      // data write/read
      a = {32'h0, $urandom} & ~64'h7;
      v = {$urandom, $urandom};
      access(0, 1, a, v, '0, cyc, beats);
      access(0, 0, a, '0, '0, cyc, beats);
      checks++;
      if (rdata !== v || beats != 1 || mem.peek(a) !== v) begin failures++; $display("FAIL data"); end
    end
    // cycle count with a zero-stall memory: each beat is request + LAT cycles
    // (LAT = 2) plus stall cycles; at least 16 * 3 for a tag
    access(1, 0, 64'h1000, '0, '0, cyc, beats);
    checks++;
    if (cyc < 16 * 3 || cyc > 16 * 6) begin failures++; $display("FAIL tag read took %0d cycles", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
