// vernier_measure: the measuring time module of random equivalent sampling.
//
// It measures t, the time from the trigger point to the first sampling-clock pulse after
// it, with the vernier caliper principle. The trigger clock (period T2) starts at the
// trigger; the sampling clock (period T1 < T2) runs all the time. Counting from the trigger
// on the trigger clock and from the first sampling pulse on the sampling clock, the two
// clocks come into phase after n2 trigger periods and n1 sampling periods, and then
//     t = n2 * T2 - n1 * T1.
// With T1 = 9.9 ns and T2 = 10 ns the step is 100 ps and coincidence comes within about
// 100 periods.
//
// Structure:
//  * trigger-clock domain: the phase monitor (SAME) and counter n2. Everything there is
//    cleared asynchronously while trig is low, because the trigger clock is stopped then.
//    The trigger-clock edge that starts the clock is edge 0. SAME is seen one edge after the
//    coincidence edge k, so n2 = (edges counted) - 1 = k.
//  * sampling-clock domain: trig is captured by one flip-flop; the first sampling edge that
//    captures it high is the "first sampling pulse" (edge 0); first_pulse is high for the
//    sampling period that follows it. Counter
//    n1 counts sampling edges from there. SAME rises just after sampling edge k and is
//    captured at sampling edge k+1, where n1 = k is latched. The n2-done flag crosses over
//    through a two-flip-flop synchroniser; n2 is stable by then.
//  * when both counts are in, t_ps = n2*T2_PS - n1*T1_PS is registered and valid is set.
//    valid stays until trig falls. err is set if no coincidence is found within N_MAX + 4
//    sampling periods.
//
// Interface: sampclk / rst_n (system clock, active-low reset), trig (TRIG level, high from
// the trigger until the controller re-arms), trigclk (trigger clock from the clock
// generator), first_pulse, n1, n2, t_ps, valid, err.
// Timing: valid rises three to five sampling periods after the coincidence; the latest
// coincidence is about N_MAX periods (1 us) after the trigger.
//
// From the document: the two counted clocks, the phase monitor and equation (1). This
// design's own choices: the edge numbering, the single-flip-flop capture of trig that
// defines the first sampling pulse, the synchroniser, the error flag and the widths.
`timescale 1ps/1ps
module vernier_measure
  import res_pkg::*;
#(
  parameter int unsigned T1 = T1_PS,   // sampling clock period in ps
  parameter int unsigned T2 = T2_PS,   // trigger clock period in ps
  parameter int unsigned NMAX = N_MAX, // largest expected count
  parameter int unsigned CNT_W = $clog2(NMAX + 8)
) (
  input  logic                sampclk,
  input  logic                rst_n,
  input  logic                trig,
  input  logic                trigclk,
  output logic                first_pulse,
  output logic [CNT_W-1:0]    n1,
  output logic [CNT_W-1:0]    n2,
  output logic signed [31:0]  t_ps,
  output logic                valid,
  output logic                err
);

  localparam logic [CNT_W-1:0] CNT_TOP = CNT_W'(NMAX + 4);

  // ---------------- trigger-clock domain ----------------
  logic             same;
  // power-up values of the trigger-clock domain, as FPGA registers have them: the clear
  // (trig low) only acts when trig falls, and this domain has no running clock before
  logic [CNT_W-1:0] idx2  = '0;
  logic [CNT_W-1:0] n2_q  = '0;
  logic             done2 = 1'b0;

  phase_monitor u_pm (
    .trigclk    (trigclk),
    .trig_n_clr (trig),
    .sampclk    (sampclk),
    .same       (same)
  );

  always_ff @(posedge trigclk or negedge trig) begin
    if (!trig) begin
      idx2  <= '0;
      n2_q  <= '0;
      done2 <= 1'b0;
    end else if (!done2) begin
      if (same) begin
        n2_q  <= idx2 - 1'b1;
        done2 <= 1'b1;
      end else if (idx2 != CNT_TOP) begin
        idx2 <= idx2 + 1'b1;
      end
    end
  end

  assign n2 = n2_q;

  // ---------------- sampling-clock domain ----------------
  logic             trig_q, trig_qq;
  logic [CNT_W-1:0] idx1;
  logic             done1;
  logic [1:0]       done2_sync;

  assign first_pulse = trig_q & ~trig_qq;

  always_ff @(posedge sampclk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q     <= 1'b0;
      trig_qq    <= 1'b0;
      idx1       <= '0;
      n1         <= '0;
      done1      <= 1'b0;
      done2_sync <= '0;
      t_ps       <= '0;
      valid      <= 1'b0;
      err        <= 1'b0;
    end else begin
      trig_q     <= trig;
      trig_qq    <= trig_q;
      done2_sync <= {done2_sync[0], done2};
      if (!trig_q) begin
        idx1  <= '0;
        n1    <= '0;
        done1 <= 1'b0;
        valid <= 1'b0;
        err   <= 1'b0;
        t_ps  <= '0;
      end else begin
        if (!done1) begin
          if (same) begin
            n1    <= idx1;
            done1 <= 1'b1;
          end else if (idx1 != CNT_TOP) begin
            idx1 <= idx1 + 1'b1;
          end else begin
            err <= 1'b1;
          end
        end
        if (done1 && done2_sync[1] && !valid) begin
          t_ps  <= 32'(signed'({1'b0, n2}) * signed'(33'(T2)))
                 - 32'(signed'({1'b0, n1}) * signed'(33'(T1)));
          valid <= 1'b1;
        end
      end
    end
  end

endmodule
