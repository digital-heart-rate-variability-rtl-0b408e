// tb_hrv_top: end-to-end test of the HRV monitor at its default parameters
// (2000-sample setup, 8-sample verification, 32 x 12 interval SRAM, 16 x 8
// histogram).
//
// A generator plays a synthetic ECG, one sample per clock: a baseline around
// 20000 and triangular R waves of 39000..43000 whose peak positions it
// records; one beat has a double hump (a second, higher maximum inside the
// verify window). From those positions alone the test derives what the chip
// must produce: a trigger VERIFY_TIME samples after each peak, R-R intervals
// equal to the peak spacing (4095 when longer), their bins from the bin table
// in seconds, the SRAM contents (first 32 intervals after a clear), the
// words written to the external memory, and the histogram with its overflow
// dump. A small behavioural external memory answers the chip's
// external-memory pins.
//
// Phases: (1) 44 beats with on-chip SRAM, covering every bin, a saturated
// interval and the SRAM filling up; all 32 words and 16 bins read back
// through the control unit. (2) SRAM cleared, external memory selected,
// 10 beats, read back from the external memory through the chip. (3) SRAM
// selected again, 300 beats of 1500 cycles until one bin passes 255 and the
// histogram is dumped and cleared; SRAM and histogram read back again.
// Every mechanism is counted and must occur at least once.
module tb_hrv_top;
  import hrv_pkg::*;

  localparam int VERIFY = 8;
  localparam int SETUP  = 2000;

  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic [15:0] datain = '0;
  logic [4:0]  address = '0;
  logic        control_trigger = 1'b0;
  logic        enable = 1'b0;
  logic        mem_enable = 1'b1;
  logic        sram_clear = 1'b0;
  logic [11:0] dataout;
  logic        dataout_valid;
  logic        trigger;
  logic        sram_full;
  logic        ext_wr, ext_rd, ext_clear, ext_rvalid = 1'b0;
  logic [11:0] external_mem_out, external_mem_in = '0;
  logic [4:0]  ext_addr;
  logic        hist_dump_valid;
  logic [3:0]  hist_dump_addr;
  logic [7:0]  hist_dump_data;

  hrv_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (sample %0d)", what, cur); end
  endtask

  // ---------------------------------------------------------------- counters
  int n_trig = 0, n_hump = 0, n_th_move = 0, n_sat = 0, n_sram_wr = 0, n_drop = 0;
  int n_full = 0, n_clear = 0, n_ext_wr = 0, n_ext_rd = 0, n_iv_rd = 0, n_hm_rd = 0;
  int n_dump = 0;

  // ------------------------------------------------------- ECG generator
  int cur = 0;                 // index of the sample being driven
  int peaks[$];                // peak sample indices still to be triggered
  int hump_peak = -1;
  bit gen_busy = 0;
  typedef struct { int gap; int h; bit hump; } beat_t;
  beat_t beats[$];

  function automatic int base(int n);
    return 20000 + (n % 7) * 100;
  endfunction

  task automatic put(int v);
    @(negedge clk);
    cur++;
    datain = 16'(v);
  endtask

  // One beat of `gap` samples; its peak is the 6th-from-last sample, so
  // consecutive peaks are exactly `gap` samples apart.
  task automatic emit(beat_t b);
    for (int i = 0; i < b.gap - 11; i++) put(base(cur + 1));
    if (!b.hump) begin
      for (int d = -5; d <= 5; d++) begin
        int a, v;
        a = (d < 0) ? -d : d;
        v = base(cur + 1) + (b.h - base(cur + 1)) * (6 - a) / 6;
        put(v);
        if (d == 0 && cur > SETUP + 2) peaks.push_back(cur);
      end
    end else begin
      put(27000); put(33000); put(b.h - 2000); put(b.h - 3500); put(b.h - 2800);
      put(b.h);   // the true maximum, after a first one three samples earlier
      if (cur > SETUP + 2) begin peaks.push_back(cur); hump_peak = cur; end
      for (int k = 1; k <= 5; k++) put(b.h - k * 4000);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    datain = 16'(base(0));
    forever begin
      if (beats.size() > 0) begin
        beat_t b;
        gen_busy = 1;
        b = beats.pop_front();
        emit(b);
      end else begin
        gen_busy = 0;
        put(base(cur + 1));
      end
    end
  end

  task automatic add_beat(int gap, int h = 41000, bit hump = 0);
    beat_t b;
    b.gap = gap; b.h = h; b.hump = hump;
    beats.push_back(b);
  endtask

  task automatic wait_idle();
    while (beats.size() > 0 || gen_busy) @(negedge clk);
    repeat (50) @(negedge clk);
  endtask

  // ---------------------------------------------------- expected behaviour
  int last_peak = -1;
  int sram_model [32];
  int sram_wptr = 0;
  bit sram_mfull = 0;
  int ext_model[$];
  int hist_model [16];
  int dump_expect[$];          // expected dumps, 16 counts each

  function automatic int ref_bin(int cycles);
    real ub [15] = '{0.4, 0.6, 0.7, 0.72, 0.74, 0.76, 0.78, 0.80,
                     0.82, 0.84, 0.86, 0.88, 0.90, 1.0, 1.2};
    for (int k = 0; k < 15; k++)
      if (cycles <= $rtoi(ub[k] * 2000.0 + 0.5)) return k;
    return 15;
  endfunction

  logic [15:0] th_before;
  always @(posedge clk) begin
    #1;
    if (!reset && trigger) begin
      int p, iv, b;
      n_trig++;
      if (peaks.size() == 0) check(0, "trigger without a beat");
      else begin
        p = peaks.pop_front();
        check(cur == p + VERIFY, $sformatf("trigger after sample %0d, peak at %0d", cur, p));
        if (p == hump_peak && cur == p + VERIFY) n_hump++;
        if (last_peak >= 0) begin
          iv = p - last_peak;
          if (iv > 4095) begin iv = 4095; n_sat++; end
          if (mem_enable) begin
            if (!sram_mfull) begin
              sram_model[sram_wptr] = iv;
              n_sram_wr++;
              if (sram_wptr == 31) begin sram_mfull = 1; sram_wptr = 0; end
              else sram_wptr++;
            end else n_drop++;
          end else ext_model.push_back(iv);
          b = ref_bin(iv);
          if (hist_model[b] < 255) hist_model[b]++;
          else begin
            for (int i = 0; i < 16; i++) dump_expect.push_back(hist_model[i]);
            foreach (hist_model[i]) hist_model[i] = 0;
          end
        end
        last_peak = p;
      end
      if (dut.u_rpeak.threshold != th_before) n_th_move++;
    end
    th_before = dut.u_rpeak.threshold;
  end

  // ----------------------------------------------------- external memory
  int ext_mem [32];
  int ext_wp = 0;
  always @(posedge clk) begin
    if (ext_clear) ext_wp <= 0;
    if (ext_wr) begin
      n_ext_wr++;
      check(ext_model.size() > 0 && int'(external_mem_out) == ext_model[ext_model.size()-1],
            "external memory write data");
      ext_mem[ext_wp % 32] = int'(external_mem_out);
      ext_wp <= ext_wp + 1;
    end
  end
  initial forever begin
    @(posedge clk);
    if (ext_rd) begin
      int a;
      a = int'(ext_addr);
      n_ext_rd++;
      @(posedge clk);
      external_mem_in <= 12'(ext_mem[a]); ext_rvalid <= 1'b1;
      @(posedge clk);
      ext_rvalid <= 1'b0;
    end
  end

  // ------------------------------------------------------- histogram dump
  int dump_got [16];
  int dump_beats = 0;
  always @(posedge clk) begin
    #1;
    if (hist_dump_valid) begin
      dump_got[hist_dump_addr] = hist_dump_data;
      dump_beats++;
      if (dump_beats == 16) begin
        dump_beats = 0;
        n_dump++;
        if (dump_expect.size() == 0) check(0, "unexpected histogram dump");
        else begin
          for (int i = 0; i < 16; i++) begin
            int e;
            e = dump_expect.pop_front();
            check(dump_got[i] == e, $sformatf("dumped bin %0d = %0d, expected %0d", i, dump_got[i], e));
          end
        end
      end
    end
  end

  always @(posedge clk) if (sram_full) n_full++;

  // ------------------------------------------------- microcontroller reads
  task automatic mcu_read(bit en, int a, output int v);
    int t;
    @(negedge clk);
    enable = en; address = 5'(a); control_trigger = 1'b1;
    @(negedge clk);
    control_trigger = 1'b0;
    t = 0;
    while (!dataout_valid && t < 40) begin @(negedge clk); t++; end
    check(t < 40, "read answered");
    v = dataout;
    if (en) n_iv_rd++; else n_hm_rd++;
  endtask

  task automatic check_sram();
    int v;
    for (int a = 0; a < 32; a++) begin
      mcu_read(1'b1, a, v);
      check(v == sram_model[a], $sformatf("SRAM word %0d = %0d, expected %0d", a, v, sram_model[a]));
    end
  endtask

  task automatic check_hist();
    int v;
    for (int b = 0; b < 16; b++) begin
      mcu_read(1'b0, b, v);
      check(v == hist_model[b], $sformatf("bin %0d = %0d, expected %0d", b, v, hist_model[b]));
    end
  endtask

  // ------------------------------------------------------------ sequence
  int gaps1 [16] = '{700, 1000, 1300, 1420, 1460, 1500, 1540, 1580,
                     1620, 1660, 1700, 1740, 1780, 1900, 2200, 3000};

  initial begin
    foreach (hist_model[i]) hist_model[i] = 0;
    foreach (sram_model[i]) sram_model[i] = 0;
    // Phase 1: first beats fall in the setup window.
    add_beat(1300, 40000);
    add_beat(1400, 41000);
    for (int i = 0; i < 16; i++) add_beat(gaps1[i], 39000 + 250 * i);
    add_beat(1500, 42000, 1'b1);           // double hump
    add_beat(5000, 40000);                 // longer than 4095 cycles
    for (int i = 0; i < 24; i++) add_beat(600 + $urandom_range(2400), 39000 + $urandom_range(4000));
    wait_idle();
    check(sram_full, "SRAM full after more than 32 intervals");
    check_sram();
    check_hist();

    // Phase 2: clear the SRAM, switch to the external memory.
    @(negedge clk); sram_clear = 1'b1; @(negedge clk); sram_clear = 1'b0;
    repeat (10) @(negedge clk);
    n_clear += (!sram_full && dut.u_sram.wr_addr == '0) ? 1 : 0;
    check(!sram_full, "clear empties the write counter");
    sram_wptr = 0; sram_mfull = 0;
    foreach (sram_model[i]) sram_model[i] = 0;
    mem_enable = 1'b0;
    @(negedge clk); sram_clear = 1'b1; @(negedge clk); sram_clear = 1'b0;   // clears the external pointer
    for (int i = 0; i < 10; i++) add_beat(900 + 150 * i, 41000);
    wait_idle();
    for (int a = 0; a < ext_model.size(); a++) begin
      int v;
      mcu_read(1'b1, a, v);
      check(v == ext_model[a], $sformatf("external word %0d = %0d, expected %0d", a, v, ext_model[a]));
    end
    check_hist();

    // Phase 3: back to the SRAM, overflow the 0.74-0.76 s bin.
    mem_enable = 1'b1;
    for (int i = 0; i < 300; i++) add_beat(1500, 40000 + $urandom_range(2000));
    wait_idle();
    check_sram();
    check_hist();

    check(peaks.size() == 0, "every beat after the setup window triggered");
    check(dump_expect.size() == 0, "every expected dump happened");
    $display("mechanisms: triggers=%0d verify_restart=%0d threshold_moves=%0d saturated=%0d",
             n_trig, n_hump, n_th_move, n_sat);
    $display("            sram_writes=%0d sram_full_cycles=%0d dropped=%0d clears=%0d",
             n_sram_wr, n_full, n_drop, n_clear);
    $display("            ext_writes=%0d ext_reads=%0d interval_reads=%0d hist_reads=%0d dumps=%0d",
             n_ext_wr, n_ext_rd, n_iv_rd, n_hm_rd, n_dump);
    check(n_trig > 0,    "mechanism: R-peak trigger");
    check(n_hump > 0,    "mechanism: verify restart on a higher sample");
    check(n_th_move > 0, "mechanism: threshold update");
    check(n_sat > 0,     "mechanism: interval saturation");
    check(n_sram_wr > 0, "mechanism: SRAM write");
    check(n_full > 0,    "mechanism: SRAM full");
    check(n_drop > 0,    "mechanism: interval dropped while full");
    check(n_clear > 0,   "mechanism: SRAM clear");
    check(n_ext_wr > 0,  "mechanism: external memory write");
    check(n_ext_rd > 0,  "mechanism: external memory read");
    check(n_iv_rd > 0,   "mechanism: interval read");
    check(n_hm_rd > 0,   "mechanism: histogram read");
    check(n_dump > 0,    "mechanism: histogram overflow dump");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
