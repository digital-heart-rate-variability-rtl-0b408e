// tb_mem_mux: self-checking test of the SRAM / external-memory switch.
//
// Drives random values on every input of the switch, in both positions of
// mem_enable, and compares each output with the expected routing: with
// mem_enable = 1 the strobes, data and address go to the SRAM side and the
// SRAM's data, valid and full come back; with mem_enable = 0 they go to the
// external side, the SRAM sees no strobe and full reads 0.
module tb_mem_mux;
  logic        mem_enable;
  logic        wr, rd, clear, rvalid, full;
  logic [11:0] wdata, rdata;
  logic [4:0]  raddr;
  logic        sram_wr, sram_rd, sram_clear, sram_rvalid, sram_full;
  logic [11:0] sram_wdata, sram_rdata;
  logic [4:0]  sram_raddr;
  logic        ext_wr, ext_rd, ext_clear, ext_rvalid;
  logic [11:0] ext_wdata, ext_rdata;
  logic [4:0]  ext_addr;

  mem_mux #(.ADDR_W(5), .WIDTH(12)) dut (.*);

  int checks = 0, failures = 0;
  int n_sram = 0, n_ext = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      mem_enable = 1'($urandom_range(1));
      {wr, rd, clear} = 3'($urandom_range(7));
      wdata = 12'($urandom); raddr = 5'($urandom);
      sram_rdata = 12'($urandom); sram_rvalid = 1'($urandom); sram_full = 1'($urandom);
      ext_rdata = 12'($urandom); ext_rvalid = 1'($urandom);
      #1;
      if (mem_enable) begin
        n_sram++;
        check({sram_wr, sram_rd, sram_clear} == {wr, rd, clear}, "strobes to SRAM");
        check({ext_wr, ext_rd, ext_clear} == 3'b000, "no strobe to external memory");
        check(sram_wdata == wdata && sram_raddr == raddr, "data and address to SRAM");
        check(rdata == sram_rdata && rvalid == sram_rvalid && full == sram_full, "SRAM response");
      end else begin
        n_ext++;
        check({ext_wr, ext_rd, ext_clear} == {wr, rd, clear}, "strobes to external memory");
        check({sram_wr, sram_rd, sram_clear} == 3'b000, "no strobe to SRAM");
        check(ext_wdata == wdata && ext_addr == raddr, "data and address to external memory");
        check(rdata == ext_rdata && rvalid == ext_rvalid && !full, "external response");
      end
    end
    check(n_sram > 0 && n_ext > 0, "both positions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
