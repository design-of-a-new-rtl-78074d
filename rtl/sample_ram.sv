// sample_ram: dual-port sample memory, 2**AW words of W bits (512 x 8 by default).
//
// One write port, written in the sampling-clock domain when the storage pulse is active,
// and one read port for the host. Both ports are synchronous to clk; the read data appears
// one clock after the read address (registered output, read enable always on).
//
// Interface: clk, we (storage pulse), waddr, wdata, raddr, rdata.
// Timing: write at the rising edge where we is high; rdata valid one edge after raddr.
// A read of the address being written in the same edge returns the old word.
//
// From the document: a dual-port RAM inside the FPGA with a 9-bit address, 256 bytes for
// pre-trigger and 256 bytes for post-trigger data. This design's own choices: a single
// clock for both ports and the registered read.
`timescale 1ps/1ps
module sample_ram #(
  parameter int unsigned W  = 8,
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
