// trace_queue - the instruction queue between monitoring and taint calculation.
//
// A first-in first-out buffer of DEPTH entries (9000 in the document's build)
// that decouples normal execution from taint calculation. push is ignored
// when full, pop when empty; push and pop may happen in the same cycle. The
// head entry is visible on rdata while not empty (read without a cycle of
// latency). full raises the queue-full interrupt in the control unit; count
// is the fill level. Pointers wrap at DEPTH, so DEPTH need not be a power of
// two. Depth follows the document; the rest is this design's choice.
module trace_queue
  import mct_pkg::*;
#(
  parameter int unsigned DEPTH = 9000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  qentry_t wdata,
  input  logic    pop,
  output qentry_t rdata,
  output logic    full,
  output logic    empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  qentry_t         mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;

  logic do_push, do_pop;
  assign full    = (32'(count) == DEPTH);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr];

  function automatic logic [AW-1:0] next(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= next(wptr);
      if (do_pop)  rptr <= next(rptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

`ifndef SYNTHESIS
  assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);
`endif

endmodule
