// phase_monitor: detects phase coincidence of the sampling clock and the trigger clock.
//
// Two flip-flops run on the trigger clock. The first samples the level of the sampling
// clock at every trigger-clock rising edge; the second holds the previous sample. Because
// the sampling clock is slightly faster (9.9 ns against 10 ns), its rising edge walks
// towards the trigger-clock edge by 100 ps per period. The first trigger-clock edge that
// finds the sampling clock high after having found it low is the one that a sampling-clock
// rising edge has just overtaken, less than 100 ps earlier. SAME = q1 AND NOT q2 flags it
// for one trigger-clock period.
//
// Interface: trigclk (trigger clock), trig_n_clr (active-low asynchronous clear, held low
// while the trigger clock is stopped), sampclk (sampling clock, used as data), same (out).
// Timing: same rises just after the trigger-clock edge k at which coincidence is found and
// falls after edge k+1.
//
// From the document: the two D flip-flops on trigclk, the buffer cell between them, the
// inverter and the AND gate that form SAME. This design's own choice: the clear input, which
// sets both flip-flops to 1 as if the sampling clock had been seen high before the
// trigger, so that a high sampling clock at the first trigger-clock edge is not taken for
// a coincidence.
`timescale 1ps/1ps
module phase_monitor (
  input  logic trigclk,
  input  logic trig_n_clr,
  input  logic sampclk,
  output logic same
);

  // power-up values, as FPGA registers have them; the clear sets the same values
  logic q1 = 1'b1;
  logic q2 = 1'b1;

  always_ff @(posedge trigclk or negedge trig_n_clr) begin
    if (!trig_n_clr) begin
      q1 <= 1'b1;
      q2 <= 1'b1;
    end else begin
      q1 <= sampclk;
      q2 <= q1;
    end
  end

  assign same = q1 & ~q2;

endmodule
