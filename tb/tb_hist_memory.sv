// tb_hist_memory: self-checking test of the histogram register file.
//
// Keeps its own array of 16 bin counts. Sends random bin increments and bin
// reads and compares every read with the array, including the read latency
// (dataout_valid on the third edge after the one that samples the request).
// Then fills one bin to the 8-bit limit and sends one more increment: the test
// expects the whole histogram on the dump port, bins 0..15 in order with the
// counts it holds, followed by every bin reading zero. Also sends an
// increment and a read in the same cycle and checks that both are served.
module tb_hist_memory;
  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic       inc = 1'b0;
  logic [3:0] inc_addr = '0;
  logic       read = 1'b0;
  logic [3:0] read_addr = '0;
  logic [7:0] dataout;
  logic       dataout_valid;
  logic       dump_valid;
  logic [3:0] dump_addr;
  logic [7:0] dump_data;

  hist_memory #(.NBINS(16), .CNT_W(8)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [16];
  int ndump = 0;
  int dump_seen [16];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_inc(int b);
    @(negedge clk);
    inc = 1'b1; inc_addr = 4'(b);
    @(negedge clk);
    inc = 1'b0;
    repeat (5) @(negedge clk);
    if (model[b] < 255) model[b]++;
  endtask

  task automatic do_read(int b);
    int lat;
    @(negedge clk);
    read = 1'b1; read_addr = 4'(b);
    @(negedge clk);
    read = 1'b0;
    lat = 1;
    while (!dataout_valid && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 4, $sformatf("read latency %0d", lat));
    check(int'(dataout) == model[b], $sformatf("bin %0d reads %0d, expected %0d", b, dataout, model[b]));
  endtask

  always @(posedge clk) begin
    #1;
    if (dump_valid) begin
      check(int'(dump_addr) == ndump % 16, $sformatf("dump order %0d", dump_addr));
      dump_seen[dump_addr] = dump_data;
      ndump++;
    end
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 16; i++) do_read(i);
    repeat (300) begin
      if ($urandom_range(2) == 0) do_read($urandom_range(15));
      else do_inc($urandom_range(15));
    end
    // Same-cycle increment and read.
    @(negedge clk);
    inc = 1'b1; inc_addr = 4'd3; read = 1'b1; read_addr = 4'd3;
    @(negedge clk);
    inc = 1'b0; read = 1'b0;
    while (!dataout_valid) @(negedge clk);
    check(int'(dataout) == model[3], "read served before the increment");
    repeat (8) @(negedge clk);
    model[3]++;
    do_read(3);
    // Fill bin 9 to the limit, then overflow it.
    while (model[9] < 255) do_inc(9);
    do_read(9);
    check(ndump == 0, "no dump before the limit");
    begin
      int snap [16];
      snap = model;
      do_inc(9);
      repeat (20) @(negedge clk);
      check(ndump == 16, $sformatf("16 dump beats, saw %0d", ndump));
      for (int i = 0; i < 16; i++)
        check(dump_seen[i] == snap[i], $sformatf("dumped bin %0d = %0d, expected %0d", i, dump_seen[i], snap[i]));
    end
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 16; i++) do_read(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
