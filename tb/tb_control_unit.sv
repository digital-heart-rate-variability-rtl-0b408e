// tb_control_unit: self-checking test of the microcontroller interface.
//
// Two small responders stand in for the memories: the interval memory
// answers iv_rd with word (addr*97 + 5) mod 4096 and the histogram answers
// hm_rd with (addr*13 + 1) mod 256, each after a random delay of 1 to 6
// cycles. The test sends read requests with random address and enable and
// checks that enable = 1 reads the interval memory and enable = 0 the
// histogram (zero-extended to 12 bits), that only the selected memory is
// strobed, that dataout_valid comes two cycles after the memory's data, that
// a held request keeps re-reading, and that reset empties the output.
module tb_control_unit;
  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic        control_trigger = 1'b0;
  logic        enable = 1'b0;
  logic [4:0]  address = '0;
  logic        iv_rd;
  logic [4:0]  iv_addr;
  logic [11:0] iv_rdata = '0;
  logic        iv_rvalid = 1'b0;
  logic        hm_rd;
  logic [3:0]  hm_addr;
  logic [7:0]  hm_rdata = '0;
  logic        hm_rvalid = 1'b0;
  logic [11:0] dataout;
  logic        dataout_valid;

  control_unit #(.ADDR_W(5), .DATA_W(12), .HADDR_W(4), .HDATA_W(8)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_iv = 0, n_hm = 0, n_out = 0;
  bit last_valid_cycle = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iv_word(int a); return (a * 97 + 5) % 4096; endfunction
  function automatic int hm_word(int a); return (a * 13 + 1) % 256;  endfunction

  // Memory responders.
  initial forever begin
    @(posedge clk);
    if (iv_rd) begin
      int a;
      a = iv_addr;
      n_iv++;
      repeat ($urandom_range(1, 6) - 1) @(posedge clk);
      iv_rdata <= 12'(iv_word(a)); iv_rvalid <= 1'b1;
      @(posedge clk); iv_rvalid <= 1'b0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (hm_rd) begin
      int a;
      a = hm_addr;
      n_hm++;
      repeat ($urandom_range(1, 6) - 1) @(posedge clk);
      hm_rdata <= 8'(hm_word(a)); hm_rvalid <= 1'b1;
      @(posedge clk); hm_rvalid <= 1'b0;
    end
  end

  // dataout_valid must come two edges after the memory's valid appears:
  // one edge to take the data, one to load the output register.
  logic rv_q1 = 1'b0, rv_q2 = 1'b0;
  always @(posedge clk) begin
    #1;
    if (dataout_valid) begin
      n_out++;
      check(rv_q2, "output two cycles after the memory data");
    end
    rv_q2 = rv_q1;
    rv_q1 = iv_rvalid | hm_rvalid;
  end

  task automatic request(bit en, int a);
    int t;
    @(negedge clk);
    enable = en; address = 5'(a); control_trigger = 1'b1;
    @(negedge clk);
    control_trigger = 1'b0;
    t = 0;
    while (!dataout_valid && t < 30) begin @(negedge clk); t++; end
    check(t < 30, "request answered");
    if (en) check(int'(dataout) == iv_word(a), $sformatf("interval word %0d = %0d", a, dataout));
    else    check(int'(dataout) == hm_word(a % 16), $sformatf("histogram bin %0d = %0d", a % 16, dataout));
  endtask

  initial begin
    int iv0, hm0;
    repeat (3) @(negedge clk);
    check(dataout == '0 && !dataout_valid, "no output under reset");
    reset = 1'b0;
    repeat (100) begin
      bit en;
      en = 1'($urandom_range(1));
      iv0 = n_iv; hm0 = n_hm;
      request(en, $urandom_range(31));
      check(en ? (n_iv == iv0 + 1 && n_hm == hm0) : (n_hm == hm0 + 1 && n_iv == iv0),
            "only the selected memory is read");
    end
    // Held request: several reads while control_trigger stays high.
    iv0 = n_out;
    @(negedge clk); enable = 1'b1; address = 5'd7; control_trigger = 1'b1;
    repeat (60) @(negedge clk);
    control_trigger = 1'b0;
    repeat (10) @(negedge clk);
    check(n_out - iv0 >= 4, $sformatf("held request re-reads (%0d reads)", n_out - iv0));
    check(int'(dataout) == iv_word(7), "held request data");
    reset = 1'b1;
    @(negedge clk);
    check(dataout == '0, "reset empties the output register");
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
