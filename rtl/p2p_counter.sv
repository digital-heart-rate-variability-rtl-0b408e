// p2p_counter: peak-to-peak (R-R interval) counter.
//
// An internal counter advances once per clock cycle. On each trigger pulse
// from the R-peak detector its value is copied into the interval output
// register and the counter restarts, so the output is the number of cycles
// between two successive triggers (at 2 kHz, one cycle is 0.5 ms and the
// 12-bit register spans 4095 cycles, about 2 s). Counting, loading at the
// trigger and restarting follow the published counter; the rest is this
// design's own choice: the counter saturates at 2^RR_W-1 instead of wrapping
// (an interval that long reads as the maximum); the first trigger after reset
// only starts the count and produces no interval; interval_valid is a
// one-cycle strobe in the cycle after the trigger, when interval is new.
//
// Interface: trigger in; interval and interval_valid out. Synchronous,
// active-high reset.
module p2p_counter #(
  parameter int unsigned RR_W = 12
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            trigger,
  output logic [RR_W-1:0] interval,
  output logic            interval_valid
);

  logic [RR_W-1:0] cnt;
  logic            started;   // a first trigger has been seen

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt            <= '0;
      started        <= 1'b0;
      interval       <= '0;
      interval_valid <= 1'b0;
    end else begin
      interval_valid <= 1'b0;
      if (trigger) begin
        if (started) begin
          interval       <= cnt;
          interval_valid <= 1'b1;
        end
        started <= 1'b1;
        cnt     <= RR_W'(1);
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
