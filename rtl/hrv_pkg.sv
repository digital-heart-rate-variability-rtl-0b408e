// hrv_pkg: widths and constants shared by the heart-rate-variability monitor.
//
// The monitor samples a 16-bit ECG at 2 kHz, so one clock cycle is 0.5 ms and a
// 12-bit R-R interval spans 0 to 4095 cycles (about 2 s). R-R intervals are
// sorted into 16 histogram bins of 8-bit counts. The bin edges below are the
// interval boundaries in seconds multiplied by the 2 kHz sample rate; the
// finer 20 ms bins between 0.7 s and 0.9 s follow the published bin table.
package hrv_pkg;

  localparam int unsigned ECG_W  = 16;  // ECG sample and threshold width
  localparam int unsigned RR_W   = 12;  // R-R interval width in clock cycles
  localparam int unsigned NBINS  = 16;  // histogram bins
  localparam int unsigned BIN_W  = 4;   // bin index width
  localparam int unsigned HCNT_W = 8;   // histogram count width
  localparam int unsigned ADDR_W = 5;   // interval-memory address (32 words)

  typedef logic [ECG_W-1:0]  ecg_t;
  typedef logic [RR_W-1:0]   rr_t;
  typedef logic [BIN_W-1:0]  bin_t;
  typedef logic [HCNT_W-1:0] hcnt_t;

  // Upper edge of bins 0..14 in cycles at 2 kHz (seconds x 2000). Bin k holds
  // EDGE[k-1] < rr <= EDGE[k] (EDGE[-1] = 0); bin 15 holds rr > EDGE[14].
  localparam rr_t BIN_EDGE [NBINS-1] = '{
    12'd800,  12'd1200, 12'd1400,                       // 0.4, 0.6, 0.7 s
    12'd1440, 12'd1480, 12'd1520, 12'd1560, 12'd1600,   // 0.72 .. 0.80 s
    12'd1640, 12'd1680, 12'd1720, 12'd1760, 12'd1800,   // 0.82 .. 0.90 s
    12'd2000, 12'd2400                                  // 1.0, 1.2 s
  };

endpackage
