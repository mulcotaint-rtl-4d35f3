// tb_trace_unit - checks write-back capture, back-pressure and CPU stall.
//
// A CPU model retires random instructions and holds its write-back signals
// while cpu_stall is high; the consumer accepts records at random. Every
// retired instruction must come out once, in order, with its PC and address.
module tb_trace_unit;
  import mct_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wb_valid, cpu_stall, tr_valid, tr_ready;
  logic [31:0] wb_inst;
  xword_t wb_pc, wb_maddr;
  trace_t tr;

  trace_unit dut (.clk, .rst_n, .wb_valid, .wb_inst, .wb_pc, .wb_maddr, .cpu_stall,
                  .tr_valid, .tr, .tr_ready);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  trace_t sent [$];
  int n_sent = 0, n_got = 0, n_stall = 0;

  // CPU model: new instruction only when not stalled
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_valid <= 1'b0; wb_inst <= '0; wb_pc <= '0; wb_maddr <= '0;
    end else begin
      if (cpu_stall) n_stall++;
      if (!cpu_stall) begin
        if (wb_valid) begin
          sent.push_back('{inst: wb_inst, pc: wb_pc, maddr: wb_maddr});
          n_sent++;
        end
        wb_valid <= ($urandom_range(3) != 0) && n_sent < 2000;
        wb_inst  <= $urandom;
        wb_pc    <= {$urandom, $urandom};
        wb_maddr <= {$urandom, $urandom};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) tr_ready <= 1'b0;
    else begin
      tr_ready <= ($urandom_range(2) != 0);
      if (tr_valid && tr_ready) begin
        trace_t e;
        checks++;
        if (sent.size() == 0) begin
          failures++;
          $display("FAIL record with nothing sent");
        end else begin
          e = sent.pop_front();
          if (tr !== e) begin
            failures++;
            if (failures < 5) $display("FAIL record %0d mismatch", n_got);
          end
        end
        n_got++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_sent == 2000);
    repeat (20) @(posedge clk);
    checks++;
    if (n_got != 2000) begin failures++; $display("FAIL got %0d of 2000", n_got); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL the CPU was never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
