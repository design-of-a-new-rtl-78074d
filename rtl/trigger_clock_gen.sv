// trigger_clock_gen: behavioural model of the trigger clock generator, a CDC421A100 clock
// synthesiser (crystal reference, internal 1.75-2.35 GHz LC VCO and divider).
// Not synthesizable: it stands for an external chip.
//
// While CE (driven by TRIG) is low the output is stopped low. When CE rises, the output
// starts with a rising edge START_PS later (the part starts within 35 ps) and then runs at
// 100 MHz (PERIOD_PS = 10000), a 50 % clock on OUTP and its complement on OUTN. When CE
// falls the current period is completed and the output stops low; CE is expected to
// stay low for at least one period before it rises again. The crystal pins XIN1 and
// XIN2 are modelled as ports only: the oscillator itself is not simulated.
//
// Interface: ce, xin1, xin2, outp (TRIGCLK), outn.
// Timing: first rising edge of outp at START_PS after ce rises; times are in ps.
//
// From the document: the part, its CE start-up time below 35 ps, the 100 MHz output and
// the pins used. This model's own choices: the exact start delay, the stopped level and
// the behaviour when CE falls.
`timescale 1ps/1ps
module trigger_clock_gen #(
  parameter int unsigned PERIOD_PS = 10000,
  parameter int unsigned START_PS  = 20
) (
  input  logic ce,
  input  logic xin1,
  input  logic xin2,
  output logic outp,
  output logic outn
);

  initial outp = 1'b0;

  // start: first rising edge START_PS after CE rises
  always @(posedge ce) begin
    #(START_PS);
    if (ce) outp = 1'b1;
  end

  // high phase
  always @(posedge outp) begin
    #(PERIOD_PS / 2);
    outp = 1'b0;
  end

  // low phase; the next period only follows while CE is high
  always @(negedge outp) begin
    #(PERIOD_PS - PERIOD_PS / 2);
    if (ce) outp = 1'b1;
  end

  assign outn = ce & ~outp;

endmodule
