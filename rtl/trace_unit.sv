// trace_unit - taps the write-back stage of the CPU pipeline.
//
// An instruction that reaches write-back is certain to execute, so this is
// where its instruction word, PC and data-memory address are captured. The
// record is held in an output register until the monitoring side takes it
// (valid/ready). While a held record is not taken the unit raises cpu_stall;
// the CPU is expected to keep its write-back signals stable while stalled, so
// no instruction is lost. One record per cycle when never back-pressured;
// latency one cycle from wb_valid to tr_valid.
// Capture at write-back follows the document; the register and the
// valid/ready handshake with stall are this design's choice.
module trace_unit
  import mct_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU write-back stage
  input  logic        wb_valid,
  input  logic [31:0] wb_inst,
  input  xword_t      wb_pc,
  input  xword_t      wb_maddr,
  output logic        cpu_stall,
  // to the monitoring unit
  output logic        tr_valid,
  output trace_t      tr,
  input  logic        tr_ready
);

  assign cpu_stall = tr_valid && !tr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tr_valid <= 1'b0;
      tr       <= '0;
    end else if (!cpu_stall) begin
      tr_valid <= wb_valid;
      if (wb_valid) tr <= '{inst: wb_inst, pc: wb_pc, maddr: wb_maddr};
    end
  end

`ifndef SYNTHESIS
  // a held record must not change until it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (tr_valid && !tr_ready) |=> (tr_valid && $stable(tr));
  endproperty
  assert property (p_hold);
`endif

endmodule
