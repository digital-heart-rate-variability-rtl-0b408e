// tb_rpeak_detector: self-checking test of the R-peak detector.
//
// Builds a synthetic ECG: a slowly varying baseline around 20000 with
// triangular R waves of known height at known positions, one of them inside
// the setup window, and one "double hump" beat whose first maximum is beaten
// by a higher sample inside the verify window. Independently of the design the
// test works out the initial threshold 3*max/4 + min/4 over the setup window
// and the threshold after every peak (Th + peak - previous peak). It checks:
// one trigger per beat, on the edge that samples the VERIFY_TIME-th sample
// after the true peak (fixed latency); a one-cycle trigger; the reported peak;
// the threshold before the first beat and after each beat; that the double
// hump went back to the rising state (its trigger follows the second maximum).
module tb_rpeak_detector;
  localparam int SETUP  = 100;
  localparam int VERIFY = 8;
  localparam int N      = 2400;

  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic [15:0] datain = '0;
  logic        trigger;
  logic [15:0] threshold, peak;

  rpeak_detector #(.DATA_W(16), .SETUP_TIME(SETUP), .VERIFY_TIME(VERIFY)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int s [N];
  int exp_pos[$], exp_h[$];
  int cur = 0;            // index of the sample currently driven
  int ntrig = 0;
  int th_exp, prev_pk, smax, smin;

  function automatic int base(int n);
    return 20000 + (n % 7) * 100;
  endfunction

  // Triangular R wave with its top (height h) at sample p.
  task automatic spike(int p, int h);
    for (int d = -5; d <= 5; d++) begin
      int a;
      a = (d < 0) ? -d : d;
      s[p+d] = base(p+d) + (h - base(p+d)) * (6 - a) / 6;
    end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (sample %0d)", what, cur);
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) s[n] = base(n);
    spike(50, 40000);                        // inside the setup window
    spike(400, 40000);  exp_pos.push_back(400);  exp_h.push_back(40000);
    spike(700, 44000);  exp_pos.push_back(700);  exp_h.push_back(44000);
    spike(1000, 42000); exp_pos.push_back(1000); exp_h.push_back(42000);
    // double hump: 41000 at 1300, three lower samples, then 45000 at 1304
    spike(1300, 41000);
    s[1301] = 40000; s[1302] = 39000; s[1303] = 39500; s[1304] = 45000;
    for (int d = 1; d <= 5; d++) s[1304+d] = 45000 - d * 4000;
    exp_pos.push_back(1304); exp_h.push_back(45000);
    spike(1700, 43000); exp_pos.push_back(1700); exp_h.push_back(43000);
    spike(2000, 39000); exp_pos.push_back(2000); exp_h.push_back(39000);

    // Setup window: samples 1..SETUP (sample 0 is taken while leaving reset).
    smax = 0; smin = 65535;
    for (int n = 1; n <= SETUP; n++) begin
      if (s[n] > smax) smax = s[n];
      if (s[n] < smin) smin = s[n];
    end
    th_exp  = (3 * smax + smin) / 4;
    prev_pk = smax;
  end

  // Drive one sample per cycle, changed away from the sampling edge.
  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    datain = 16'(s[0]);
    for (int n = 1; n < N; n++) begin
      @(negedge clk);
      cur = n;
      datain = 16'(s[n]);
    end
    @(negedge clk);
    check(ntrig == 6, $sformatf("six beats expected, saw %0d triggers", ntrig));
    check(exp_pos.size() == 0, "every expected beat was reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit trig_q = 0;
  always @(posedge clk) begin
    #1;
    if (!reset) begin
      if (cur == SETUP + 10)
        check(threshold == 16'(th_exp), $sformatf("initial threshold %0d, expected %0d", threshold, th_exp));
      if (trigger) begin
        ntrig++;
        check(!trig_q, "trigger is one cycle wide");
        if (exp_pos.size() > 0) begin
          int p, h;
          p = exp_pos.pop_front();
          h = exp_h.pop_front();
          check(cur == p + VERIFY, $sformatf("trigger after sample %0d, expected %0d", cur, p + VERIFY));
          check(peak == 16'(h), $sformatf("peak %0d, expected %0d", peak, h));
          th_exp = th_exp + h - prev_pk;
          if (th_exp < 0) th_exp = 0;
          if (th_exp > 65535) th_exp = 65535;
          prev_pk = h;
          check(threshold == 16'(th_exp), $sformatf("threshold %0d, expected %0d", threshold, th_exp));
        end else begin
          check(0, "unexpected trigger");
        end
      end
      trig_q = trigger;
    end
  end

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
