// mem_model - behavioural main memory on the 64-bit coprocessor bus.
//
// Sparse, doubleword-addressed (addr[2:0] ignored), reads of unwritten words
// return 0. A request is accepted when req_ready is high; the response
// (read data or write acknowledge) follows LAT cycles later. req_ready is
// low while a request is outstanding, and when STALL_EVERY > 0 it is also
// dropped on every STALL_EVERY-th cycle to exercise the handshake. Testbench
// code can read and write the contents directly with peek/poke. Not
// synthesizable.
module mem_model #(
  parameter int LAT         = 1,
  parameter int STALL_EVERY = 0
) (
  input  logic        clk,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [63:0] req_addr,
  input  logic [63:0] req_wdata,
  output logic        resp_valid,
  output logic [63:0] resp_rdata
);
  logic [63:0] mem [longint unsigned];
  int          busy_cnt = 0;
  int          cyc = 0;
  int unsigned n_beats = 0;

  function automatic logic [63:0] peek(input logic [63:0] a);
    longint unsigned k = a >> 3;
    return mem.exists(k) ? mem[k] : 64'd0;
  endfunction
  function automatic void poke(input logic [63:0] a, input logic [63:0] v);
    mem[a >> 3] = v;
  endfunction

  logic        pend_we;
  logic [63:0] pend_addr;

  initial begin
    resp_valid = 1'b0;
    resp_rdata = '0;
  end

  assign req_ready = (busy_cnt == 0) && !(STALL_EVERY > 0 && (cyc % STALL_EVERY) == 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    resp_valid <= 1'b0;
    if (busy_cnt > 0) begin
      if (busy_cnt == 1) begin
        resp_valid <= 1'b1;
        resp_rdata <= pend_we ? 64'd0 : peek(pend_addr);
      end
      busy_cnt <= busy_cnt - 1;
    end else if (req_valid && req_ready) begin
      n_beats <= n_beats + 1;
      if (req_we) poke(req_addr, req_wdata);
      pend_we   <= req_we;
      pend_addr <= req_addr;
      busy_cnt  <= LAT;
    end
  end
endmodule
