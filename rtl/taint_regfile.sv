// taint_regfile - one 1024-bit taint register per RISC-V integer register.
//
// Three combinational read ports addressed by the rs1, rs2 and rd fields of
// the instruction under analysis, one write port for the control unit, and a
// 64-bit chunk port through which software labels registers as taint sources
// and reads them back at sinks (chunk c holds bits [64c +: 64]). Register 0
// always reads as clean and ignores writes, like x0. A control-unit write in
// the same cycle as a chunk write to the same register wins. Writes take
// effect at the next clock edge. Size follows the document; the ports are
// this design's choice.
module taint_regfile
  import mct_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] ra1,
  input  logic [4:0] ra2,
  input  logic [4:0] ra3,
  output tag_t       rd1,
  output tag_t       rd2,
  output tag_t       rd3,
  input  logic       we,
  input  logic [4:0] wa,
  input  tag_t       wd,
  // software chunk access
  input  logic       cwe,
  input  logic [4:0] creg,
  input  logic [3:0] cchunk,
  input  xword_t     cwdata,
  output xword_t     crdata
);

  tag_t regs [1:NUM_XREGS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NUM_XREGS; i++) regs[i] <= '0;
    end else begin
      if (cwe && creg != 5'd0) regs[creg][64*cchunk +: 64] <= cwdata;
      if (we && wa != 5'd0)    regs[wa] <= wd;
    end
  end

  assign rd1    = (ra1 == 5'd0) ? '0 : regs[ra1];
  assign rd2    = (ra2 == 5'd0) ? '0 : regs[ra2];
  assign rd3    = (ra3 == 5'd0) ? '0 : regs[ra3];
  assign crdata = (creg == 5'd0) ? '0 : regs[creg][64*cchunk +: 64];

endmodule
