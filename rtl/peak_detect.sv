// peak_detect: maximum peak value sampling of the A/D converter output.
//
// The 8-bit sample from the A/D converter is latched by the input register (the first
// octal D flip-flop) on the rising edge of the sampling clock. A magnitude comparator
// compares it (dataa) with the running maximum (datab) and raises agb when the new sample
// is greater. A 2-to-1 byte multiplexer feeds the maximum register (the second octal D
// flip-flop) either with the new sample (SEL = 1) or with its own value (SEL = 0), where
// SEL = trans_load OR agb. trans_load is high for the first sample of every storage
// interval, so that sample is taken as the default maximum; after it, only larger samples
// replace the maximum. The maximum register is clocked on the falling edge of the sampling
// clock (180 degrees from the input register), so a sample latched at one rising edge is
// compared and, if larger, stored half a period later.
//
// Interface: clk (sampling clock), rst_n (active-low asynchronous clear of both registers),
// cha_d (A/D converter data), trans_load (start of a storage interval), sample (input
// register), peak (running maximum), agb (comparator output).
// Timing: peak holds the maximum of the samples latched since the last trans_load from the
// falling edge after each sample's rising edge.
//
// From the document: the two registers and their clocks, the comparator, the multiplexer
// and the OR gate that forms SEL, and which comparator input is which. This design's own
// choices: the width parameter and the clear input (the document's registers have their
// clear pins tied inactive).
`timescale 1ps/1ps
module peak_detect #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] cha_d,
  input  logic         trans_load,
  output logic [W-1:0] sample,
  output logic [W-1:0] peak,
  output logic         agb
);

  logic         sel;
  logic [W-1:0] mux_y;

  // input register: latched with the sampling clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample <= '0;
    else        sample <= cha_d;
  end

  // comparator: dataa = new sample, datab = running maximum
  assign agb   = sample > peak;
  assign sel   = trans_load | agb;
  assign mux_y = sel ? sample : peak;

  // maximum register: clocked 180 degrees from the sampling clock
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) peak <= '0;
    else        peak <= mux_y;
  end

endmodule
