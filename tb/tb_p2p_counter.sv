// tb_p2p_counter: self-checking test of the peak-to-peak interval counter.
//
// Sends trigger pulses at chosen cycle numbers and checks that, after each
// trigger but the first, the counter reports the cycle distance to the
// previous trigger with a one-cycle interval_valid strobe in the next cycle.
// Also checks that the first trigger gives no interval, that a gap longer
// than 4095 cycles reads as 4095, and that reset clears the output.
module tb_p2p_counter;
  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic        trigger = 1'b0;
  logic [11:0] interval;
  logic        interval_valid;

  p2p_counter #(.RR_W(12)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int nvalid = 0;
  int exp_q[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // Trigger schedule: distances between consecutive triggers.
  int gaps [7] = '{0, 1600, 1450, 2, 900, 5000, 1212};

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 7; i++) begin
      repeat (gaps[i] > 0 ? gaps[i] - 1 : 0) @(negedge clk);
      trigger = 1'b1;
      if (i > 0) exp_q.push_back(gaps[i] > 4095 ? 4095 : gaps[i]);
      @(negedge clk);
      trigger = 1'b0;
    end
    repeat (5) @(negedge clk);
    check(nvalid == 6, $sformatf("six intervals expected, saw %0d", nvalid));
    check(exp_q.size() == 0, "all intervals reported");
    reset = 1'b1;
    @(negedge clk);
    check(interval == '0 && !interval_valid, "reset clears the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // interval_valid must follow a trigger by exactly one cycle.
  logic trig_q = 1'b0;
  always @(posedge clk) begin
    #1;
    if (interval_valid) begin
      int e;
      nvalid++;
      check(trig_q, "valid one cycle after the trigger");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(interval == 12'(e), $sformatf("interval %0d, expected %0d", interval, e));
      end else check(0, "interval without an expected one");
    end
  end
  always @(posedge clk) trig_q <= trigger;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
