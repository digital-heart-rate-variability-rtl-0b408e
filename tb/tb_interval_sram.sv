// tb_interval_sram: self-checking test of the 32 x 12 interval memory.
//
// Writes random intervals one after another and checks that the write
// address counter steps once per write, that "full" (the counter's carry)
// rises after the 32nd write and that further writes are dropped. Reads every
// word back and compares it with the test's own copy, checking the read
// latency (rvalid on the fourth edge after the one that samples rd). Then
// sends a clear, checks that the counter restarts at word 0 and that new
// writes overwrite from there while the other words keep their data. A read
// and a write sent in the same cycle are both served, the write first.
module tb_interval_sram;
  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic        wr = 1'b0;
  logic [11:0] wdata = '0;
  logic        rd = 1'b0;
  logic [4:0]  raddr = '0;
  logic        clear = 1'b0;
  logic [11:0] rdata;
  logic        rvalid;
  logic        full;
  logic [4:0]  wr_addr;

  interval_sram #(.DEPTH(32), .WIDTH(12)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [32];
  int wptr = 0;
  bit mfull = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_write(int v);
    @(negedge clk);
    wr = 1'b1; wdata = 12'(v);
    @(negedge clk);
    wr = 1'b0;
    repeat (6) @(negedge clk);
    if (!mfull) begin
      model[wptr] = v;
      if (wptr == 31) begin mfull = 1; wptr = 0; end
      else wptr++;
    end
    check(int'(wr_addr) == wptr, $sformatf("write address %0d, expected %0d", wr_addr, wptr));
    check(full == mfull, $sformatf("full %0d, expected %0d", full, mfull));
  endtask

  task automatic do_read(int a);
    int lat;
    @(negedge clk);
    rd = 1'b1; raddr = 5'(a);
    @(negedge clk);
    rd = 1'b0;
    lat = 1;
    while (!rvalid && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 5, $sformatf("read latency %0d", lat));
    check(int'(rdata) == model[a], $sformatf("word %0d reads %0d, expected %0d", a, rdata, model[a]));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 32; i++) do_write($urandom_range(4095));
    check(full, "full after 32 writes");
    do_write(123);            // dropped
    do_write(456);            // dropped
    for (int i = 0; i < 32; i++) do_read(i);
    // clear
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    repeat (4) @(negedge clk);
    mfull = 0; wptr = 0;
    check(wr_addr == '0 && !full, "clear restarts the write counter");
    for (int i = 0; i < 5; i++) do_write($urandom_range(4095));
    for (int i = 0; i < 32; i++) do_read(i);
    // same-cycle write and read of the word being written
    @(negedge clk);
    wr = 1'b1; wdata = 12'd2047; rd = 1'b1; raddr = 5'(wptr);
    @(negedge clk);
    wr = 1'b0; rd = 1'b0;
    while (!rvalid) @(negedge clk);
    check(rdata == 12'd2047, "write served before the read");
    model[wptr] = 2047; wptr++;
    repeat (3) @(negedge clk);
    check(int'(wr_addr) == wptr, "write address after the combined request");
    for (int i = 0; i < 32; i++) do_read(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
