// rpeak_detector: adaptive-threshold R-peak detector for a sampled ECG.
//
// How it works: an eight-state machine (S0..S7).
//   S0  leaves reset and clears the setup statistics.
//   S1  for SETUP_TIME samples tracks the largest and smallest sample.
//   S2  sets the initial threshold Th = 3*max/4 + min/4.
//   S3  waits for a sample above the threshold.
//   S4  follows the rising edge and keeps the running maximum; the first
//       sample below its predecessor moves it to S5.
//   S5  verifies the maximum: if a later sample is larger it goes back to S4;
//       once VERIFY_TIME samples in a row (counting the first falling one)
//       stay at or below the maximum, the peak is accepted. The trigger
//       register is set, the peak is stored, and the threshold moves by the
//       difference between this peak and the previous one:
//       Th = Th + peak_now - peak_prev (held within 0 .. 2^DATA_W-1).
//   S6  clears the trigger, so the pulse is exactly one cycle wide.
//   S7  waits until the signal falls back below the threshold, then S3.
// The states, their conditions, the threshold formulas, the 16-bit threshold
// register and the defaults SETUP_TIME = 2000, VERIFY_TIME = 8 follow the
// published detector. This design's own choices: the first peak's
// "previous peak" is the setup maximum; the threshold is clamped rather than
// wrapped; the reset is synchronous and active high.
//
// Interface and timing: datain is sampled on every rising clock edge (one
// sample per cycle, 2 kHz in the target system). trigger goes high on the edge
// that samples the VERIFY_TIME-th sample after the peak sample and stays high
// for one cycle, so every peak is reported with the same fixed latency.
// threshold and peak show the current threshold and the last accepted peak.
module rpeak_detector #(
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned SETUP_TIME  = 2000,
  parameter int unsigned VERIFY_TIME = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [DATA_W-1:0] datain,
  output logic              trigger,
  output logic [DATA_W-1:0] threshold,
  output logic [DATA_W-1:0] peak
);

  localparam int unsigned SCNT_W = $clog2(SETUP_TIME + 1);
  localparam int unsigned VCNT_W = $clog2(VERIFY_TIME + 1);
  localparam logic [DATA_W+1:0] DMAX = {2'b00, {DATA_W{1'b1}}};

  typedef enum logic [2:0] {
    S0_START, S1_SETUP, S2_INIT_TH, S3_WAIT_ABOVE,
    S4_RISE, S5_VERIFY, S6_TRIG_OFF, S7_WAIT_BELOW
  } state_t;

  state_t              state;
  logic [SCNT_W-1:0]   scnt;       // setup sample counter
  logic [VCNT_W-1:0]   vcnt;       // verified samples after the maximum
  logic [DATA_W-1:0]   smax, smin; // setup statistics
  logic [DATA_W-1:0]   pk;         // running maximum of the current beat
  logic [DATA_W-1:0]   peak_prev;  // previous accepted peak
  logic [DATA_W-1:0]   prev;       // previous sample
  logic [DATA_W-1:0]   th;

  // Initial threshold 3*max/4 + min/4, computed exactly with two guard bits.
  logic [DATA_W+1:0] th_init;
  assign th_init = ({2'b00, smax} + {1'b0, smax, 1'b0} + {2'b00, smin}) >> 2;

  // Updated threshold, held within the register's range.
  logic signed [DATA_W+2:0] th_upd;
  logic        [DATA_W-1:0] th_next;
  always_comb begin
    th_upd = $signed({3'b000, th}) + $signed({3'b000, pk}) - $signed({3'b000, peak_prev});
    if (th_upd < 0)                                 th_next = '0;
    else if (th_upd > $signed({1'b0, DMAX}))        th_next = '1;
    else                                            th_next = th_upd[DATA_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S0_START;
      scnt      <= '0;
      vcnt      <= '0;
      smax      <= '0;
      smin      <= '1;
      pk        <= '0;
      peak_prev <= '0;
      prev      <= '0;
      th        <= '0;
      peak      <= '0;
      trigger   <= 1'b0;
    end else begin
      prev <= datain;
      unique case (state)
        S0_START: begin
          scnt  <= '0;
          smax  <= '0;
          smin  <= '1;
          state <= S1_SETUP;
        end
        S1_SETUP: begin
          if (scnt < SCNT_W'(SETUP_TIME)) begin
            if (datain > smax) smax <= datain;
            if (datain < smin) smin <= datain;
            scnt <= scnt + 1'b1;
          end else begin
            state <= S2_INIT_TH;
          end
        end
        S2_INIT_TH: begin
          th        <= th_init[DATA_W-1:0];
          peak_prev <= smax;
          state     <= S3_WAIT_ABOVE;
        end
        S3_WAIT_ABOVE: begin
          if (datain > th) begin
            pk    <= datain;
            state <= S4_RISE;
          end
        end
        S4_RISE: begin
          if (datain >= prev) begin
            if (datain > pk) pk <= datain;
          end else begin
            vcnt  <= VCNT_W'(1);
            state <= S5_VERIFY;
          end
        end
        S5_VERIFY: begin
          if (datain > pk) begin
            pk    <= datain;
            state <= S4_RISE;
          end else if (vcnt >= VCNT_W'(VERIFY_TIME - 1)) begin
            trigger   <= 1'b1;
            peak      <= pk;
            peak_prev <= pk;
            th        <= th_next;
            state     <= S6_TRIG_OFF;
          end else begin
            vcnt <= vcnt + 1'b1;
          end
        end
        S6_TRIG_OFF: begin
          trigger <= 1'b0;
          state   <= S7_WAIT_BELOW;
        end
        S7_WAIT_BELOW: begin
          if (datain < th) state <= S3_WAIT_ABOVE;
        end
        default: state <= S0_START;
      endcase
    end
  end

  assign threshold = th;

  // The trigger is a single-cycle pulse.
  assert property (@(posedge clk) disable iff (reset) trigger |=> !trigger);

  initial begin
    assert (VERIFY_TIME >= 2) else $error("VERIFY_TIME must be at least 2");
  end

endmodule
