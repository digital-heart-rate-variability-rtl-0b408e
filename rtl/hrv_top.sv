// hrv_top: heart-rate-variability monitor ASIC.
//
// Data flow, one ECG sample per clock (2 kHz):
//   datain -> rpeak_detector --trigger--> p2p_counter --interval-->
//     +--> mem_mux --> interval_sram (32 x 12)  or external memory pins
//     +--> hist_sorter --bin index--> hist_memory (16 x 8)
//   control_unit: on control_trigger reads the interval memory (enable = 1)
//   or the histogram (enable = 0) at address and puts the word on dataout.
// The R-peak trigger is also brought out, as on the fabricated chip. The
// histogram's overflow dump and the external-memory side of the memory switch
// are brought out as ports because the memory they feed is off chip.
//
// What follows the document: the blocks, their order and connections, the
// 2 kHz sample clock, the 16-bit ECG, the 12-bit intervals, the 32 x 12
// interval SRAM, the 16 x 8 histogram, the control unit's enable polarity, one
// reset for every block, and the mem_enable switch between the on-chip SRAM
// and an external memory. This design's own choices: the handshakes between
// blocks (the counter's interval_valid strobe starts both the SRAM write and
// the sorter), the clear input for the SRAM write counter, the ports of the
// external memory and of the histogram dump, and mem_enable = 1 meaning the
// on-chip SRAM.
//
// Timing: the trigger follows each R peak by VERIFY_TIME samples; the interval
// is stored and binned within a few cycles of it; a read request gives
// dataout with dataout_valid a few cycles later (about 7 for the SRAM, 6 for
// the histogram).
module hrv_top
  import hrv_pkg::*;
#(
  parameter int unsigned SETUP_TIME  = 2000,
  parameter int unsigned VERIFY_TIME = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  ecg_t              datain,
  input  logic [ADDR_W-1:0] address,
  input  logic              control_trigger,
  input  logic              enable,
  input  logic              mem_enable,
  input  logic              sram_clear,
  output logic [RR_W-1:0]   dataout,
  output logic              dataout_valid,
  output logic              trigger,
  output logic              sram_full,
  // external memory
  output logic              ext_wr,
  output logic [RR_W-1:0]   external_mem_out,
  output logic              ext_rd,
  output logic [ADDR_W-1:0] ext_addr,
  output logic              ext_clear,
  input  logic [RR_W-1:0]   external_mem_in,
  input  logic              ext_rvalid,
  // histogram overflow dump
  output logic              hist_dump_valid,
  output bin_t              hist_dump_addr,
  output hcnt_t             hist_dump_data
);

  // Peak detector and interval counter.
  ecg_t threshold, peak;
  rr_t  interval;
  logic interval_valid;

  rpeak_detector #(
    .DATA_W(ECG_W), .SETUP_TIME(SETUP_TIME), .VERIFY_TIME(VERIFY_TIME)
  ) u_rpeak (
    .clk, .reset, .datain, .trigger, .threshold, .peak
  );

  p2p_counter #(.RR_W(RR_W)) u_p2p (
    .clk, .reset, .trigger, .interval, .interval_valid
  );

  // Interval memory through the SRAM / external-memory switch.
  logic              iv_rd, iv_rvalid;
  logic [ADDR_W-1:0] iv_addr;
  rr_t               iv_rdata;
  logic              sram_wr, sram_rd, sram_clr, sram_rvalid, sram_full_i;
  rr_t               sram_wdata, sram_rdata;
  logic [ADDR_W-1:0] sram_raddr, sram_wr_addr;

  mem_mux #(.ADDR_W(ADDR_W), .WIDTH(RR_W)) u_mux (
    .mem_enable,
    .wr(interval_valid), .wdata(interval), .rd(iv_rd), .raddr(iv_addr), .clear(sram_clear),
    .rdata(iv_rdata), .rvalid(iv_rvalid), .full(sram_full),
    .sram_wr, .sram_wdata, .sram_rd, .sram_raddr, .sram_clear(sram_clr),
    .sram_rdata, .sram_rvalid, .sram_full(sram_full_i),
    .ext_wr, .ext_wdata(external_mem_out), .ext_rd, .ext_addr, .ext_clear,
    .ext_rdata(external_mem_in), .ext_rvalid
  );

  interval_sram #(.DEPTH(2**ADDR_W), .WIDTH(RR_W)) u_sram (
    .clk, .reset,
    .wr(sram_wr), .wdata(sram_wdata), .rd(sram_rd), .raddr(sram_raddr),
    .clear(sram_clr), .rdata(sram_rdata), .rvalid(sram_rvalid), .full(sram_full_i),
    .wr_addr(sram_wr_addr)
  );

  // Histogram.
  bin_t  index, hm_addr;
  logic  index_valid, hm_rd, hm_rvalid;
  hcnt_t hm_rdata;

  hist_sorter u_sorter (
    .clk, .reset, .trigger(interval_valid), .rr(interval), .index, .index_valid
  );

  hist_memory #(.NBINS(NBINS), .CNT_W(HCNT_W)) u_hist (
    .clk, .reset, .inc(index_valid), .inc_addr(index),
    .read(hm_rd), .read_addr(hm_addr), .dataout(hm_rdata), .dataout_valid(hm_rvalid),
    .dump_valid(hist_dump_valid), .dump_addr(hist_dump_addr), .dump_data(hist_dump_data)
  );

  // Microcontroller interface.
  control_unit #(
    .ADDR_W(ADDR_W), .DATA_W(RR_W), .HADDR_W(BIN_W), .HDATA_W(HCNT_W)
  ) u_ctrl (
    .clk, .reset, .control_trigger, .enable, .address,
    .iv_rd, .iv_addr, .iv_rdata, .iv_rvalid,
    .hm_rd, .hm_addr, .hm_rdata, .hm_rvalid,
    .dataout, .dataout_valid
  );

endmodule
