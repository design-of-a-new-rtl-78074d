// sampling_clock_gen: behavioural model of the sampling clock generator.
// Not synthesizable: it is built from two FPGA PLL macros, modelled by pll_model.
//
// The 100 MHz reference samp drives a first PLL with frequency ratio 10/9 (111.11 MHz),
// whose output drives a second PLL with ratio 10/11, giving
// SAMPCLK = 100 MHz * 10/9 * 10/11 = 101.01 MHz (period 9.9 ns). The sampling clock is a
// little faster than the 100 MHz trigger clock, which is what the vernier time measurement
// relies on. Both PLLs have phase 0 and duty cycle 50 %; the first one's reset is tied
// inactive, and the second one runs once its input is stable.
//
// Interface: samp (reference in), sampclk (SAMPCLK out), locked (both PLLs locked).
// Timing: sampclk starts a few reference periods after power-up.
//
// From the document: the two PLLs in series and their ratios, phases and duty cycles.
// This model's own choices: the lock behaviour (see pll_model) and the locked output.
`timescale 1ps/1ps
module sampling_clock_gen #(
  parameter int unsigned MUL0 = 10,
  parameter int unsigned DIV0 = 9,
  parameter int unsigned MUL1 = 10,
  parameter int unsigned DIV1 = 11
) (
  input  logic samp,
  output logic sampclk,
  output logic locked
);

  logic c0_0, locked0, locked1;

  pll_model #(.MUL(MUL0), .DIV(DIV0)) u_altpll0 (
    .inclk0 (samp),
    .areset (1'b0),
    .c0     (c0_0),
    .locked (locked0)
  );

  pll_model #(.MUL(MUL1), .DIV(DIV1)) u_altpll2 (
    .inclk0 (c0_0),
    .areset (!locked0),
    .c0     (sampclk),
    .locked (locked1)
  );

  assign locked = locked0 & locked1;

endmodule
