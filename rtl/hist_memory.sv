// hist_memory: histogram register file, NBINS bins of CNT_W-bit beat counts.
//
// How it works: a state machine following the published histogram-memory
// diagram.
//   S0  idle. A read request from the control unit goes to S5; otherwise a
//       pending bin index from the sorter goes to S1.
//   S1  takes the bin address from the sorter.
//   S2  checks the bin: below the limit (2^CNT_W - 1 = 255) goes to S3,
//       at the limit goes to S4.
//   S3  adds one to the bin, back to S0.
//   S4  moves the whole histogram out on the dump port, one bin per cycle
//       (dump_valid, dump_addr, dump_data), then clears every bin, back to S0.
//   S5  takes the read address from the control unit.
//   S6  copies the bin into the dataout register and strobes dataout_valid.
// The bin count and width, the limit check, the dump-then-reset on overflow
// and the read path follow the published memory. This design's own choices:
// the dump is a simple valid/address/data stream to an external memory (the
// external memory itself is outside the chip); the beat that hits the limit
// is not counted again after the clear; one sorter index arriving while busy
// is held pending; reads win over increments in S0; reset is synchronous,
// active high, and clears every bin.
//
// Interface and timing: inc/inc_addr and read/read_addr are one-cycle
// requests. An increment is complete 4 cycles after it is taken; a read
// returns dataout with dataout_valid 3 cycles after it is taken from idle.
// An overflow dump takes NBINS cycles; the bins are cleared with the last one.
module hist_memory #(
  parameter int unsigned NBINS = 16,
  parameter int unsigned CNT_W = 8,
  localparam int unsigned BW   = $clog2(NBINS)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             inc,
  input  logic [BW-1:0]    inc_addr,
  input  logic             read,
  input  logic [BW-1:0]    read_addr,
  output logic [CNT_W-1:0] dataout,
  output logic             dataout_valid,
  output logic             dump_valid,
  output logic [BW-1:0]    dump_addr,
  output logic [CNT_W-1:0] dump_data
);

  typedef enum logic [2:0] {
    S0_IDLE, S1_ADDR, S2_CHECK, S3_INC, S4_DUMP, S5_RADDR, S6_COPY
  } state_t;

  state_t           state;
  logic [CNT_W-1:0] hist [NBINS];
  logic             inc_pend, rd_pend;
  logic [BW-1:0]    inc_addr_q, rd_addr_q;
  logic [BW-1:0]    addr;      // bin being worked on
  logic [BW-1:0]    dump_ptr;

  always_ff @(posedge clk) begin
    if (reset) begin
      state         <= S0_IDLE;
      inc_pend      <= 1'b0;
      rd_pend       <= 1'b0;
      inc_addr_q    <= '0;
      rd_addr_q     <= '0;
      addr          <= '0;
      dump_ptr      <= '0;
      dataout       <= '0;
      dataout_valid <= 1'b0;
      dump_valid    <= 1'b0;
      dump_addr     <= '0;
      dump_data     <= '0;
      for (int i = 0; i < NBINS; i++) hist[i] <= '0;
    end else begin
      dataout_valid <= 1'b0;
      dump_valid    <= 1'b0;
      if (inc)  begin inc_pend <= 1'b1; inc_addr_q <= inc_addr;  end
      if (read) begin rd_pend  <= 1'b1; rd_addr_q  <= read_addr; end
      unique case (state)
        S0_IDLE: begin
          if (rd_pend) begin
            rd_pend <= read;
            state   <= S5_RADDR;
          end else if (inc_pend) begin
            inc_pend <= inc;
            state    <= S1_ADDR;
          end
        end
        S1_ADDR: begin
          addr  <= inc_addr_q;
          state <= S2_CHECK;
        end
        S2_CHECK: begin
          if (hist[addr] < {CNT_W{1'b1}}) begin
            state <= S3_INC;
          end else begin
            dump_ptr <= '0;
            state    <= S4_DUMP;
          end
        end
        S3_INC: begin
          hist[addr] <= hist[addr] + 1'b1;
          state      <= S0_IDLE;
        end
        S4_DUMP: begin
          dump_valid <= 1'b1;
          dump_addr  <= dump_ptr;
          dump_data  <= hist[dump_ptr];
          dump_ptr   <= dump_ptr + 1'b1;
          if (dump_ptr == BW'(NBINS - 1)) begin
            for (int i = 0; i < NBINS; i++) hist[i] <= '0;
            state <= S0_IDLE;
          end
        end
        S5_RADDR: begin
          addr  <= rd_addr_q;
          state <= S6_COPY;
        end
        S6_COPY: begin
          dataout       <= hist[addr];
          dataout_valid <= 1'b1;
          state         <= S0_IDLE;
        end
        default: state <= S0_IDLE;
      endcase
    end
  end

endmodule
