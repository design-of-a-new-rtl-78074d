// pll_model: behavioural model of an FPGA phase-locked loop with one output c0.
// Not synthesizable: it stands for a vendor PLL macro.
//
// It measures the period of inclk0 between rising edges and, after LOCK_EDGES edges,
// raises locked and starts c0 at an inclk0 rising edge with the period
// in_period * DIV / MUL (frequency ratio MUL/DIV) and a 50 % duty cycle. areset (active
// high) drops locked and stops c0. Ports follow the macro: inclk0, areset, c0, locked.
// Timing: times are in ps; the output keeps the period measured at lock and does not follow
// later changes of the input period.
//
// From the document: the ratio, the 0 degree phase and the 50 % duty cycle settings. This
// model's own choices: the lock time and that c0 starts in phase with inclk0 at lock.
`timescale 1ps/1ps
module pll_model #(
  parameter int unsigned MUL        = 10,
  parameter int unsigned DIV        = 9,
  parameter int unsigned LOCK_EDGES = 4
) (
  input  logic inclk0,
  input  logic areset,
  output logic c0,
  output logic locked
);

  realtime     last_edge;
  realtime     in_period;
  realtime     half;
  int unsigned nedges;

  initial begin
    locked    = 1'b0;
    nedges    = 0;
    last_edge = 0.0;
    in_period = 0.0;
    half      = 0.0;
  end

  always @(posedge inclk0 or posedge areset) begin
    if (areset) begin
      nedges = 0;
      locked = 1'b0;
    end else begin
      if (nedges > 0) in_period = $realtime - last_edge;
      last_edge = $realtime;
      if (nedges < LOCK_EDGES) nedges = nedges + 1;
      else if (!locked) begin
        half   = in_period * real'(DIV) / real'(MUL) / 2.0;
        locked = 1'b1;
      end
    end
  end

  initial begin
    c0 = 1'b0;
    forever begin
      wait (locked);
      @(posedge inclk0);
      while (locked) begin
        c0 = 1'b1;
        #(half);
        c0 = 1'b0;
        #(half);
      end
    end
  end

endmodule
