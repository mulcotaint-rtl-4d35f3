// filter_unit - memory-range filter for taint-independent regions.
//
// NUM_FILT address ranges (five in the document's build), each [base, limit)
// with an enable bit, set by configuration writes. hit is 1 when addr lies in
// any enabled range; the FN_FILTER microcode then ends the current rule so the
// instruction costs no further taint work (read-only code and library
// segments are the intended use). Combinational check, registered
// configuration. Range form and exclusive limit are this design's choice.
module filter_unit
  import mct_pkg::*;
#(
  parameter int unsigned NUM_FILT = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_base_we,
  input  logic       cfg_lim_we,
  input  logic [2:0] cfg_idx,
  input  xword_t     cfg_addr,
  input  logic       cfg_en,     // taken with the limit write
  input  xword_t     addr,
  output logic       hit
);

  xword_t base  [NUM_FILT];
  xword_t limit [NUM_FILT];
  logic [NUM_FILT-1:0] en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= '0;
      for (int i = 0; i < NUM_FILT; i++) begin
        base[i]  <= '0;
        limit[i] <= '0;
      end
    end else if (32'(cfg_idx) < NUM_FILT) begin
      if (cfg_base_we) base[cfg_idx] <= cfg_addr;
      if (cfg_lim_we) begin
        limit[cfg_idx] <= cfg_addr;
        en[cfg_idx]    <= cfg_en;
      end
    end
  end

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < NUM_FILT; i++)
      if (en[i] && addr >= base[i] && addr < limit[i]) hit = 1'b1;
  end

endmodule
