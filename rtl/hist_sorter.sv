// hist_sorter: assigns an R-R interval to one of the 16 histogram bins.
//
// How it works: every bin is a stage with a lower and an upper comparator,
// EDGE_lo < rr <= EDGE_hi, with the edges of hrv_pkg::BIN_EDGE (seconds x
// 2000 at the 2 kHz sample rate). The last bin has no upper edge, so the
// sorter uses 16 x 2 - 1 = 31 comparators. A three-state machine runs it:
// S0 waits for the trigger, S1 registers the 12-bit interval, S2 encodes the
// matching stage into the 4-bit bin index (bin 0 = first range, reported as
// 4'b0000) and strobes index_valid for one cycle, then returns to S0.
//
// The bin edges, the comparator structure, the states and the 0-based index
// follow the published sorter. This design's own choices: an interval of 0,
// which the counter never produces, falls in no stage and is reported as
// bin 0; reset is synchronous and active high.
//
// Interface and timing: rr must be stable in the cycle trigger is high;
// index and index_valid are set by the second rising edge after the one that
// samples the trigger (S0 -> S1 -> S2 -> output).
module hist_sorter
  import hrv_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic trigger,
  input  rr_t  rr,
  output bin_t index,
  output logic index_valid
);

  typedef enum logic [1:0] {S0_WAIT, S1_COMPARE, S2_OUTPUT} state_t;

  state_t           state;
  rr_t              rr_q;
  logic [NBINS-1:0] above_lo;   // rr > lower edge of stage k
  logic [NBINS-1:0] below_hi;   // rr <= upper edge of stage k
  logic [NBINS-1:0] match;
  bin_t             enc;

  always_comb begin
    above_lo[0] = (rr_q > '0);
    for (int k = 1; k < NBINS; k++) above_lo[k] = (rr_q > BIN_EDGE[k-1]);
    for (int k = 0; k < NBINS - 1; k++) below_hi[k] = (rr_q <= BIN_EDGE[k]);
    below_hi[NBINS-1] = 1'b1;   // last stage: no upper comparator
    match = above_lo & below_hi;
    enc = '0;
    for (int k = NBINS - 1; k >= 0; k--)
      if (match[k]) enc = BIN_W'(k);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state       <= S0_WAIT;
      rr_q        <= '0;
      index       <= '0;
      index_valid <= 1'b0;
    end else begin
      index_valid <= 1'b0;
      unique case (state)
        S0_WAIT: if (trigger) begin
          rr_q  <= rr;
          state <= S1_COMPARE;
        end
        S1_COMPARE: state <= S2_OUTPUT;
        S2_OUTPUT: begin
          index       <= enc;
          index_valid <= 1'b1;
          state       <= S0_WAIT;
        end
        default: state <= S0_WAIT;
      endcase
    end
  end

  // The stages cover disjoint ranges: at most one can match.
  assert property (@(posedge clk) disable iff (reset) $onehot0(match));

endmodule
