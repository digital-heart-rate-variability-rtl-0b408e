// control_unit: interface between the external microcontroller and the
// two on-chip memories.
//
// How it works: a state machine following the published control-unit
// diagram. In S0 it waits for a read request (control_trigger) and takes the
// address; enable = 1 selects the interval memory (S1), enable = 0 the
// histogram memory (S2). S1 and S2 send a one-cycle read strobe (iv_rd or
// hm_rd) with the address and wait for that memory's data. S4 writes the data
// into the 12-bit output register (histogram counts are zero-extended) and
// strobes dataout_valid, then the unit returns to S0. While control_trigger
// stays high the unit keeps re-reading, so the output follows the address and
// enable inputs, as in the published simulation.
//
// Follows the document: the inputs (address, read request, enable), the
// enable polarity, the states, the 12-bit output and the output register
// being empty under reset. This design's own choices: the request/valid
// handshake towards each memory; the histogram uses the low 4 address bits;
// reset is synchronous and active high (the top distributes the same reset
// to every block).
//
// Timing: the read strobe is set by the edge that sees the request; the edge
// that sees the memory's valid takes the data and the next edge loads the
// output register and sets dataout_valid.
module control_unit #(
  parameter int unsigned ADDR_W  = 5,
  parameter int unsigned DATA_W  = 12,
  parameter int unsigned HADDR_W = 4,
  parameter int unsigned HDATA_W = 8
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               control_trigger,
  input  logic               enable,
  input  logic [ADDR_W-1:0]  address,
  // interval memory
  output logic               iv_rd,
  output logic [ADDR_W-1:0]  iv_addr,
  input  logic [DATA_W-1:0]  iv_rdata,
  input  logic               iv_rvalid,
  // histogram memory
  output logic               hm_rd,
  output logic [HADDR_W-1:0] hm_addr,
  input  logic [HDATA_W-1:0] hm_rdata,
  input  logic               hm_rvalid,
  // to the microcontroller
  output logic [DATA_W-1:0]  dataout,
  output logic               dataout_valid
);

  typedef enum logic [2:0] {S0_ADDR, S1_INTERVAL, S2_HIST, S4_OUTPUT} state_t;

  state_t              state;
  logic [DATA_W-1:0]   data_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      state         <= S0_ADDR;
      iv_rd         <= 1'b0;
      hm_rd         <= 1'b0;
      iv_addr       <= '0;
      hm_addr       <= '0;
      data_q        <= '0;
      dataout       <= '0;
      dataout_valid <= 1'b0;
    end else begin
      iv_rd         <= 1'b0;
      hm_rd         <= 1'b0;
      dataout_valid <= 1'b0;
      unique case (state)
        S0_ADDR: if (control_trigger) begin
          if (enable) begin
            iv_addr <= address;
            iv_rd   <= 1'b1;
            state   <= S1_INTERVAL;
          end else begin
            hm_addr <= address[HADDR_W-1:0];
            hm_rd   <= 1'b1;
            state   <= S2_HIST;
          end
        end
        S1_INTERVAL: if (iv_rvalid) begin
          data_q <= iv_rdata;
          state  <= S4_OUTPUT;
        end
        S2_HIST: if (hm_rvalid) begin
          data_q <= DATA_W'(hm_rdata);
          state  <= S4_OUTPUT;
        end
        S4_OUTPUT: begin
          dataout       <= data_q;
          dataout_valid <= 1'b1;
          state         <= S0_ADDR;
        end
        default: state <= S0_ADDR;
      endcase
    end
  end

  // Read strobes are single pulses and never go to both memories at once.
  assert property (@(posedge clk) disable iff (reset) !(iv_rd && hm_rd));
  assert property (@(posedge clk) disable iff (reset) iv_rd |=> !iv_rd);
  assert property (@(posedge clk) disable iff (reset) hm_rd |=> !hm_rd);

endmodule
