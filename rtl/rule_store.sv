// rule_store - the configurable calculation rules.
//
// NUM_RULES rules of SLOTS microcode words each (30 slots per rule in the
// document's build; the rule count equals the 15 monitoring units, one rule
// per matcher). Software writes one word per we pulse before analysis; the
// control unit reads the word at (rule, slot) combinationally. The words sit
// in a plain memory without reset; one "written" flag per slot is reset
// instead, and a slot never written reads as FN_END (all zero), so an
// unconfigured rule does nothing. A sequence ends at its first FN_END or
// after slot SLOTS-1.
module rule_store
  import mct_pkg::*;
#(
  parameter int unsigned NUM_RULES = 15,
  parameter int unsigned SLOTS     = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [RULE_W-1:0] wrule,
  input  logic [4:0]        wslot,
  input  ucode_t            wdata,
  input  logic [RULE_W-1:0] rrule,
  input  logic [4:0]        rslot,
  output ucode_t            rdata
);

  localparam int unsigned N  = NUM_RULES * SLOTS;
  localparam int unsigned AW = $clog2(N);

  ucode_t         mem [N];
  logic [N-1:0]   written;
  logic           wok, rok;
  logic [AW-1:0]  wi, ri;

  assign wok = we && 32'(wrule) < NUM_RULES && 32'(wslot) < SLOTS;
  assign rok = 32'(rrule) < NUM_RULES && 32'(rslot) < SLOTS;
  assign wi  = AW'(32'(wrule) * SLOTS + 32'(wslot));
  assign ri  = AW'(32'(rrule) * SLOTS + 32'(rslot));

  always_ff @(posedge clk) begin
    if (wok) mem[wi] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   written     <= '0;
    else if (wok) written[wi] <= 1'b1;
  end

  always_comb begin
    rdata = '0;
    if (rok && written[ri]) rdata = mem[ri];
  end

endmodule
