// tb_hist_sorter: self-checking test of the histogram sorter.
//
// Applies the intervals of the published sorter simulation (1000, 1300, 1420,
// 1450, 1500, 1550 and 1580 cycles, expected bins 1 to 7), every bin edge and
// the value one above it, the extremes 1 and 4095, and random intervals. The
// expected bin comes from the bin table in seconds (range bounds x 2000),
// written here independently of the design. Checks the index, a single
// index_valid strobe per trigger and its latency: the index is set by the
// second rising edge after the one that samples the trigger.
module tb_hist_sorter;
  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic        trigger = 1'b0;
  logic [11:0] rr = '0;
  logic [3:0]  index;
  logic        index_valid;

  hist_sorter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Upper bounds of the 16 ranges in seconds; the last is open.
  real ub [15] = '{0.4, 0.6, 0.7, 0.72, 0.74, 0.76, 0.78, 0.80,
                   0.82, 0.84, 0.86, 0.88, 0.90, 1.0, 1.2};

  function automatic int ref_bin(int cycles);
    for (int k = 0; k < 15; k++)
      if (cycles <= $rtoi(ub[k] * 2000.0 + 0.5)) return k;
    return 15;
  endfunction

  task automatic apply(int v);
    int lat;
    @(negedge clk);
    rr = 12'(v);
    trigger = 1'b1;
    @(negedge clk);
    trigger = 1'b0;
    lat = 0;
    while (!index_valid && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("latency for %0d: %0d", v, lat));
    check(index == 4'(ref_bin(v)), $sformatf("rr %0d -> bin %0d, expected %0d", v, index, ref_bin(v)));
    @(negedge clk);
    check(!index_valid, "index_valid is one cycle");
  endtask

  int fig [7] = '{1000, 1300, 1420, 1450, 1500, 1550, 1580};

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 7; i++) begin
      apply(fig[i]);
      check(index == 4'(i + 1), "published example");
    end
    for (int k = 0; k < 15; k++) begin
      int e;
      e = $rtoi(ub[k] * 2000.0 + 0.5);
      apply(e);
      apply(e + 1);
    end
    apply(1);
    apply(4095);
    repeat (200) apply(1 + $urandom_range(4094));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
