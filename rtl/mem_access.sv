// mem_access - the coprocessor's two memory channels over one 64-bit bus.
//
// Regular data access moves one 64-bit word. Tag access moves a whole
// 1024-bit tag, i.e. 128 consecutive bytes, as BEATS (16) 64-bit bus
// operations at addr, addr+8, ... addr+120: reads are spliced together with
// beat i landing in tag bits [64i +: 64]; writes split the tag the same way.
// Splitting a 1024-bit tag into 16 sequential 64-bit operations is what the
// document describes; the request/response handshake is this design's choice.
//
// Request side: req_valid/req_ready with the operation, address and write
// data; one request at a time. done pulses for one cycle when the last bus
// response has arrived; rdata/rtag are then valid and stay so until the next
// request. Bus side: one outstanding operation; bus_req_valid is held until
// bus_req_ready, then the unit waits for bus_resp_valid (which also
// acknowledges writes). With a zero-wait memory a data access takes 2 cycles
// per beat, so a tag access takes 32 cycles plus the request cycle.
module mem_access
  import mct_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // request from the control unit
  input  logic       req_valid,
  output logic       req_ready,
  input  logic       req_tag,     // 1: 1024-bit tag access, 0: 64-bit data
  input  logic       req_we,
  input  xword_t     req_addr,
  input  xword_t     req_wdata,
  input  tag_t       req_wtag,
  output logic       done,
  output xword_t     rdata,
  output tag_t       rtag,
  // 64-bit memory bus
  output logic       bus_req_valid,
  input  logic       bus_req_ready,
  output logic       bus_we,
  output xword_t     bus_addr,
  output xword_t     bus_wdata,
  input  logic       bus_resp_valid,
  input  xword_t     bus_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RESP} state_e;
  state_e state;

  logic       op_tag, op_we;
  xword_t     op_addr;
  xword_t     op_wdata;
  tag_t       op_wtag;
  logic [3:0] beat;

  assign req_ready     = (state == S_IDLE);
  assign bus_req_valid = (state == S_REQ);
  assign bus_we        = op_we;
  assign bus_addr      = op_addr + XLEN'({beat, 3'b000});
  assign bus_wdata     = op_tag ? op_wtag[64*beat +: 64] : op_wdata;

  logic last_beat;
  assign last_beat = !op_tag || (32'(beat) == BEATS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      op_tag   <= 1'b0;
      op_we    <= 1'b0;
      op_addr  <= '0;
      op_wdata <= '0;
      op_wtag  <= '0;
      beat     <= '0;
      done     <= 1'b0;
      rdata    <= '0;
      rtag     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          op_tag   <= req_tag;
          op_we    <= req_we;
          op_addr  <= req_addr;
          op_wdata <= req_wdata;
          op_wtag  <= req_wtag;
          beat     <= '0;
          state    <= S_REQ;
        end
        S_REQ: if (bus_req_ready) state <= S_RESP;
        S_RESP: if (bus_resp_valid) begin
          if (!op_we) begin
            if (op_tag) rtag[64*beat +: 64] <= bus_rdata;
            else        rdata <= bus_rdata;
          end
          if (last_beat) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            beat  <= beat + 1'b1;
            state <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // the bus request must stay up, unchanged, until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n)
    (bus_req_valid && !bus_req_ready) |=> (bus_req_valid && $stable(bus_addr) && $stable(bus_we)));
`endif

endmodule
