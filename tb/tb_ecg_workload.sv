// tb_ecg_workload: the monitor on a 50-second ECG in the detector settings
// the original design was tuned with: setup windows of 1000, 2000, 3000 and
// 4000 samples, each with verification windows of 8 and 16 samples. That is
// eight copies of hrv_top fed the same signal.
//
// The ECG is synthetic, 2 kHz, 16-bit: a baseline of 24000 with a 7-second
// wander of +-3000, and beats with a P wave (2000 high, 150 ms before R), a
// Q dip, a 4 ms-wide triangular R wave about 20000 high, an S dip and a T wave
// (5000 high, 250 ms after R). The R-R interval swings between 0.7 and 0.9 s
// with a five-beat period plus jitter, which exercises the fine histogram
// bins. The apex positions are known, so for each copy the test expects:
//   - one trigger per beat after its setup window, VERIFY_TIME samples after
//     the apex, and no other trigger;
//   - intervals equal to the apex spacing; the first 32 of them in the
//     interval SRAM, read back through the control unit;
//   - histogram bins equal to the test's own count of those intervals.
module tb_ecg_workload;
  import hrv_pkg::*;

  localparam int NCFG   = 8;
  localparam int NSAMP  = 100_000;     // 50 s at 2 kHz
  localparam int MARGIN = 40;          // no apex this close to a setup end
  localparam int SETUPS  [NCFG] = '{1000, 1000, 2000, 2000, 3000, 3000, 4000, 4000};
  localparam int VERIFYS [NCFG] = '{8, 16, 8, 16, 8, 16, 8, 16};

  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic [15:0] datain = '0;
  logic [4:0]  address = '0;
  logic        control_trigger = 1'b0;
  logic        enable = 1'b1;
  logic [11:0] dataout [NCFG];
  logic        dataout_valid [NCFG];
  logic        trig [NCFG];

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cur = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (sample %0d)", what, cur); end
  endtask

  // ------------------------------------------------------------ the signal
  int apex[$];
  int rh[$];                     // R height of each beat
  int sig [NSAMP];

  function automatic bit near_setup_end(int a);
    for (int c = 0; c < NCFG; c++)
      if (a > SETUPS[c] - MARGIN && a < SETUPS[c] + MARGIN) return 1;
    return 0;
  endfunction

  function automatic real bump(int d, real h, real w);
    return h * $exp(-(real'(d) * real'(d)) / (2.0 * w * w));
  endfunction

  initial begin
    int a, k;
    real pi;
    pi = 3.14159265358979;
    a = 600; k = 0;
    while (a < NSAMP - 1200) begin
      if (near_setup_end(a)) a += 2 * MARGIN;
      apex.push_back(a);
      rh.push_back(20000 + $urandom_range(1000) - 500);
      a += 1600 + $rtoi(200.0 * $sin(2.0 * pi * k / 5.0)) + $urandom_range(60) - 30;
      k++;
    end
    for (int n = 0; n < NSAMP; n++) begin
      real v;
      v = 24000.0 + 3000.0 * $sin(2.0 * pi * n / 14000.0);
      for (int b = 0; b < apex.size(); b++) begin
        int d;
        d = n - apex[b];
        if (d < -400 || d > 800) continue;
        if (d > -8 && d < 8) v += rh[b] * (1.0 - ((d < 0) ? -d : d) / 8.0);
        if (d >= -11 && d <= -8) v -= 2000.0;
        if (d >= 9 && d <= 13)   v -= 3000.0;
        v += bump(d - 500, 5000.0, 80.0);
        v += bump(d + 300, 2000.0, 40.0);
      end
      if (v < 0.0) v = 0.0;
      if (v > 65535.0) v = 65535.0;
      sig[n] = $rtoi(v);
    end
  end

  // -------------------------------------------------------------- devices
  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic        sram_full, ext_wr, ext_rd, ext_clear, hd_valid;
    logic [11:0] ext_out;
    logic [4:0]  ext_addr;
    logic [3:0]  hd_addr;
    logic [7:0]  hd_data;

    hrv_top #(.SETUP_TIME(SETUPS[c]), .VERIFY_TIME(VERIFYS[c])) dut (
      .clk, .reset, .datain, .address, .control_trigger, .enable,
      .mem_enable(1'b1), .sram_clear(1'b0),
      .dataout(dataout[c]), .dataout_valid(dataout_valid[c]), .trigger(trig[c]),
      .sram_full, .ext_wr, .external_mem_out(ext_out), .ext_rd, .ext_addr, .ext_clear,
      .external_mem_in(12'd0), .ext_rvalid(1'b0),
      .hist_dump_valid(hd_valid), .hist_dump_addr(hd_addr), .hist_dump_data(hd_data)
    );

    // Expected beats of this copy and the intervals they give.
    int q[$];
    int ivs[$];
    int hist [16];
    int ntrig = 0;
    int last = -1;

    initial begin
      #1;
      foreach (hist[i]) hist[i] = 0;
      foreach (apex[i]) if (apex[i] > SETUPS[c] + MARGIN) q.push_back(apex[i]);
    end

    always @(posedge clk) begin
      #2;
      if (!reset && trig[c]) begin
        int p;
        ntrig++;
        if (q.size() == 0) check(0, $sformatf("cfg %0d: trigger without a beat", c));
        else begin
          p = q.pop_front();
          check(cur == p + VERIFYS[c],
                $sformatf("cfg %0d: trigger after sample %0d, apex %0d", c, cur, p));
          if (last >= 0) begin
            ivs.push_back(p - last);
            hist[ref_bin(p - last)]++;
          end
          last = p;
        end
      end
      check_hd: if (hd_valid) check(0, $sformatf("cfg %0d: unexpected histogram dump", c));
    end
  end

  function automatic int ref_bin(int cycles);
    real ub [15] = '{0.4, 0.6, 0.7, 0.72, 0.74, 0.76, 0.78, 0.80,
                     0.82, 0.84, 0.86, 0.88, 0.90, 1.0, 1.2};
    for (int k = 0; k < 15; k++)
      if (cycles <= $rtoi(ub[k] * 2000.0 + 0.5)) return k;
    return 15;
  endfunction

  // ------------------------------------------------------------- sequence
  task automatic read_all(bit en, int a, output int v [NCFG]);
    int t;
    @(negedge clk);
    enable = en; address = 5'(a); control_trigger = 1'b1;
    @(negedge clk);
    control_trigger = 1'b0;
    t = 0;
    while (!dataout_valid[0] && t < 40) begin @(negedge clk); t++; end
    check(t < 40, "read answered");
    for (int c = 0; c < NCFG; c++) v[c] = dataout[c];
  endtask

  initial begin
    int v [NCFG];
    int exp_iv [NCFG][32];
    int exp_n [NCFG];
    int exp_h [NCFG][16];
    repeat (3) @(negedge clk);
    reset = 1'b0;
    datain = 16'(sig[0]);
    for (int n = 1; n < NSAMP; n++) begin
      @(negedge clk);
      cur = n;
      datain = 16'(sig[n]);
    end
    repeat (20) @(negedge clk);
    // Collect each copy's expectations (generate scopes, so unrolled here).
    exp_n[0] = g_cfg[0].ivs.size(); exp_n[1] = g_cfg[1].ivs.size();
    exp_n[2] = g_cfg[2].ivs.size(); exp_n[3] = g_cfg[3].ivs.size();
    exp_n[4] = g_cfg[4].ivs.size(); exp_n[5] = g_cfg[5].ivs.size();
    exp_n[6] = g_cfg[6].ivs.size(); exp_n[7] = g_cfg[7].ivs.size();
    for (int i = 0; i < 32; i++) begin
      exp_iv[0][i] = i < exp_n[0] ? g_cfg[0].ivs[i] : 0;
      exp_iv[1][i] = i < exp_n[1] ? g_cfg[1].ivs[i] : 0;
      exp_iv[2][i] = i < exp_n[2] ? g_cfg[2].ivs[i] : 0;
      exp_iv[3][i] = i < exp_n[3] ? g_cfg[3].ivs[i] : 0;
      exp_iv[4][i] = i < exp_n[4] ? g_cfg[4].ivs[i] : 0;
      exp_iv[5][i] = i < exp_n[5] ? g_cfg[5].ivs[i] : 0;
      exp_iv[6][i] = i < exp_n[6] ? g_cfg[6].ivs[i] : 0;
      exp_iv[7][i] = i < exp_n[7] ? g_cfg[7].ivs[i] : 0;
    end
    exp_h[0] = g_cfg[0].hist; exp_h[1] = g_cfg[1].hist;
    exp_h[2] = g_cfg[2].hist; exp_h[3] = g_cfg[3].hist;
    exp_h[4] = g_cfg[4].hist; exp_h[5] = g_cfg[5].hist;
    exp_h[6] = g_cfg[6].hist; exp_h[7] = g_cfg[7].hist;
    check(g_cfg[0].q.size() == 0 && g_cfg[1].q.size() == 0 && g_cfg[2].q.size() == 0 &&
          g_cfg[3].q.size() == 0 && g_cfg[4].q.size() == 0 && g_cfg[5].q.size() == 0 &&
          g_cfg[6].q.size() == 0 && g_cfg[7].q.size() == 0, "every beat detected in every copy");
    for (int c = 0; c < NCFG; c++)
      check(exp_n[c] >= 32, $sformatf("cfg %0d: at least 32 intervals (%0d)", c, exp_n[c]));
    // Interval SRAM: first 32 intervals of each copy.
    for (int a = 0; a < 32; a++) begin
      read_all(1'b1, a, v);
      for (int c = 0; c < NCFG; c++)
        check(v[c] == exp_iv[c][a], $sformatf("cfg %0d: SRAM word %0d = %0d, expected %0d",
                                              c, a, v[c], exp_iv[c][a]));
    end
    // Histogram of every copy.
    for (int b = 0; b < 16; b++) begin
      read_all(1'b0, b, v);
      for (int c = 0; c < NCFG; c++)
        check(v[c] == exp_h[c][b], $sformatf("cfg %0d: bin %0d = %0d, expected %0d",
                                             c, b, v[c], exp_h[c][b]));
    end
    $display("beats in the record: %0d; intervals per copy: %0d %0d %0d %0d %0d %0d %0d %0d",
             apex.size(), exp_n[0], exp_n[1], exp_n[2], exp_n[3], exp_n[4], exp_n[5], exp_n[6], exp_n[7]);
    $write("histogram (setup 2000, verify 8):");
    for (int b = 0; b < 16; b++) $write(" %0d", exp_h[2][b]);
    $display("");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
