// interval_sram: R-R interval memory, DEPTH words of WIDTH bits (32 x 12).
//
// How it works: a sequencer walks the access states of the published SRAM
// state diagram, one state per clock cycle:
//   write (W): SW1 select write address -> SW2 condition bit lines
//              -> SW3 drive bit lines (store) -> SW4 write address + 1
//   read  (R): SR1 select read address  -> SR2 condition bit lines
//              -> SR3 output bit lines (rdata loaded, rvalid next cycle)
//   clear (C): SC1 write address = 0
// The word lines come from an address decoder (5 to 32 for the default size)
// whose outputs are forced to zero except in the drive/output state, the way
// the NAND/INV buffer keeps every word line low while the bit lines are
// conditioned. The row storage is a register array indexed by the one-hot
// word line. The write address is kept by an internal counter: it steps
// after every write and stops when its carry (Cout, reported as full) is set;
// further intervals are dropped until a clear. Reads take the address from
// the microcontroller side (raddr).
//
// Follows the published memory: the size, the three request types, the
// state sequences, the write counter that stops at its carry, the gated
// decoder. This design's own choices: the transistor-level cell, pre-charge
// and delay-line pulses are replaced by one clock cycle per state; requests
// arriving while busy are held pending (one of each kind) and served with
// clear first, then write, then read; reset is synchronous, active high, and
// empties the counter but not the array.
//
// Interface and timing: wr, rd and clear are one-cycle requests. A write
// finishes 4 cycles after it is taken; rdata is valid with the rvalid strobe
// 4 cycles after a read is taken from idle.
module interval_sram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  input  logic [AW-1:0]    raddr,
  input  logic             clear,
  output logic [WIDTH-1:0] rdata,
  output logic             rvalid,
  output logic             full,
  output logic [AW-1:0]    wr_addr
);

  typedef enum logic [3:0] {
    S0_IDLE, SW1_SEL, SW2_COND, SW3_WRITE, SW4_INC,
    SR1_SEL, SR2_COND, SR3_OUT, SC1_CLEAR
  } state_t;

  state_t            state;
  logic [WIDTH-1:0]  mem [DEPTH];
  logic              wr_pend, rd_pend, clr_pend;
  logic [WIDTH-1:0]  wdata_q;
  logic [AW-1:0]     raddr_q;
  logic [AW-1:0]     sel_addr;   // address presented to the decoder
  logic              wl_on;      // word lines released (not forced to zero)
  logic [DEPTH-1:0]  wl;         // decoded, gated word lines
  logic [WIDTH-1:0]  bitline;    // value read out of the selected row

  // Word-line decoder with the zeroing gate.
  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      wl[i] = wl_on && (sel_addr == AW'(i));
  end

  always_comb begin
    bitline = '0;
    for (int i = 0; i < DEPTH; i++)
      if (wl[i]) bitline = bitline | mem[i];
  end

  assign wl_on = (state == SW3_WRITE) || (state == SR3_OUT);

  // Row storage: the selected row takes the write data in SW3.
  always_ff @(posedge clk) begin
    if (state == SW3_WRITE)
      for (int i = 0; i < DEPTH; i++)
        if (wl[i]) mem[i] <= wdata_q;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= S0_IDLE;
      wr_pend  <= 1'b0;
      rd_pend  <= 1'b0;
      clr_pend <= 1'b0;
      wdata_q  <= '0;
      raddr_q  <= '0;
      sel_addr <= '0;
      wr_addr  <= '0;
      full     <= 1'b0;
      rdata    <= '0;
      rvalid   <= 1'b0;
    end else begin
      rvalid <= 1'b0;
      if (wr)    begin wr_pend  <= 1'b1; wdata_q <= wdata; end
      if (rd)    begin rd_pend  <= 1'b1; raddr_q <= raddr; end
      if (clear) clr_pend <= 1'b1;
      unique case (state)
        S0_IDLE: begin
          if (clr_pend) begin
            clr_pend <= clear;
            state    <= SC1_CLEAR;
          end else if (wr_pend) begin
            wr_pend <= wr;
            // A full counter drops the interval.
            if (!full) state <= SW1_SEL;
          end else if (rd_pend) begin
            rd_pend <= rd;
            state   <= SR1_SEL;
          end
        end
        SW1_SEL:   begin sel_addr <= wr_addr; state <= SW2_COND;  end
        SW2_COND:  state <= SW3_WRITE;
        SW3_WRITE: state <= SW4_INC;
        SW4_INC: begin
          {full, wr_addr} <= {1'b0, wr_addr} + 1'b1;
          state <= S0_IDLE;
        end
        SR1_SEL:   begin sel_addr <= raddr_q; state <= SR2_COND; end
        SR2_COND:  state <= SR3_OUT;
        SR3_OUT: begin
          rdata  <= bitline;
          rvalid <= 1'b1;
          state  <= S0_IDLE;
        end
        SC1_CLEAR: begin
          wr_addr <= '0;
          full    <= 1'b0;
          state   <= S0_IDLE;
        end
        default: state <= S0_IDLE;
      endcase
    end
  end

  // At most one word line is ever open, and only while an access drives or
  // senses the bit lines.
  assert property (@(posedge clk) disable iff (reset) $onehot0(wl));
  assert property (@(posedge clk) disable iff (reset) (wl != '0) |-> wl_on);

endmodule
