// mem_mux: multiplexer/demultiplexer between the interval datapath and either
// the on-chip interval SRAM or an external (off-chip, simulated) memory.
//
// How it works: mem_enable = 1 selects the on-chip SRAM, mem_enable = 0 the
// external memory. The demultiplexer steers the write strobe, write data,
// read strobe, read address and clear to the selected memory only, holding
// the other one's strobes low; the multiplexer returns the selected memory's
// read data and valid. The external memory's "full" is not known on chip and
// reads as 0. The switch itself follows the document, which added it so the
// chip could be run with an off-chip memory in place of the SRAM; its pin-level
// handshake (strobes and address beside the data buses), the polarity of
// mem_enable and its purely combinational form are this design's own choices.
//
// Timing: combinational. mem_enable should only change while both memories
// are idle; a read outstanding when it changes returns no valid.
module mem_mux #(
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned WIDTH  = 12
) (
  input  logic              mem_enable,
  // datapath / control-unit side
  input  logic              wr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              rd,
  input  logic [ADDR_W-1:0] raddr,
  input  logic              clear,
  output logic [WIDTH-1:0]  rdata,
  output logic              rvalid,
  output logic              full,
  // on-chip SRAM side
  output logic              sram_wr,
  output logic [WIDTH-1:0]  sram_wdata,
  output logic              sram_rd,
  output logic [ADDR_W-1:0] sram_raddr,
  output logic              sram_clear,
  input  logic [WIDTH-1:0]  sram_rdata,
  input  logic              sram_rvalid,
  input  logic              sram_full,
  // external memory side
  output logic              ext_wr,
  output logic [WIDTH-1:0]  ext_wdata,
  output logic              ext_rd,
  output logic [ADDR_W-1:0] ext_addr,
  output logic              ext_clear,
  input  logic [WIDTH-1:0]  ext_rdata,
  input  logic              ext_rvalid
);

  always_comb begin
    sram_wr    = mem_enable & wr;
    sram_rd    = mem_enable & rd;
    sram_clear = mem_enable & clear;
    ext_wr     = ~mem_enable & wr;
    ext_rd     = ~mem_enable & rd;
    ext_clear  = ~mem_enable & clear;
    // Data and address buses only matter with their strobe; the unselected
    // side sees zero.
    sram_wdata = mem_enable ? wdata : '0;
    sram_raddr = mem_enable ? raddr : '0;
    ext_wdata  = mem_enable ? '0 : wdata;
    ext_addr   = mem_enable ? '0 : raddr;
    if (mem_enable) begin
      rdata  = sram_rdata;
      rvalid = sram_rvalid;
      full   = sram_full;
    end else begin
      rdata  = ext_rdata;
      rvalid = ext_rvalid;
      full   = 1'b0;
    end
  end

endmodule
