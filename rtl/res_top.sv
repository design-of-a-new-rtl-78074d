// res_top: random equivalent sampling (RES) acquisition system.
//
// A periodic input is digitised by an external 8-bit A/D converter at the sampling clock
// SAMPCLK (101.01 MHz), made from a 100 MHz reference by two PLLs in series. The samples
// pass through the maximum peak value sampler into a 512 x 8 memory: the front 256 entries
// hold pre-trigger data, the back 256 post-trigger data. When the trigger event comes (and
// only once the front half has been filled), TRIG starts the 100 MHz trigger clock, and
// the measuring time module finds, by the vernier principle, the time t from the trigger
// to the first sampling pulse after it, in 100 ps steps. The host reads the memory and t:
// every stored sample's time relative to the trigger follows from t and the sampling
// period, and many acquisitions with random t interleave into a waveform with an
// equivalent rate of 10 GSps.
//
// Blocks: sampling_clock_gen (PLL chain, behavioural), trigger_clock_gen (external clock
// chip, behavioural), vernier_measure (with phase_monitor), data_storage (with peak_detect
// and sample_ram) and acq_controller. The A/D converter, the analog trigger circuit and
// the host are outside: their signals are ports.
//
// Interface: samp (100 MHz reference), rst_n (asynchronous reset, active low), trig_in
// (trigger event), sampclk (to the A/D converter), cha_d (A/D data, latched at sampclk
// rising edges), host side: start, div (samples per stored value), done, state, raddr /
// rdata (memory read, one sampclk cycle latency), t_ps, n1, n2, meas_err, trig_ptr (oldest
// pre-trigger entry), trig_phase (divider phase at the trigger); trig and trigclk for
// observation.
// Timing: the host side is synchronous to sampclk; reset is released two sampclk edges
// after rst_n is high and the PLLs are locked.
//
// From the document: the block structure and the clock, memory and data sizes. This
// design's own choices: the reset synchroniser and the host-side signals.
`timescale 1ps/1ps
module res_top
  import res_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned AW    = ADDR_W,
  parameter int unsigned CNT_W = $clog2(N_MAX + 8)
) (
  input  logic             samp,
  input  logic             rst_n,
  input  logic             trig_in,
  output logic             sampclk,
  input  logic [W-1:0]     cha_d,
  input  logic             start,
  input  logic [7:0]       div,
  output logic             done,
  output acq_state_t       state,
  input  logic [AW-1:0]    raddr,
  output logic [W-1:0]     rdata,
  output logic signed [31:0] t_ps,
  output logic [CNT_W-1:0] n1,
  output logic [CNT_W-1:0] n2,
  output logic             meas_valid,
  output logic             meas_err,
  output logic [AW-2:0]    trig_ptr,
  output logic [7:0]       trig_phase,
  output logic             trig,
  output logic             trigclk
);

  logic          pll_locked;
  logic [1:0]    rst_sync = '0;   // power-up value, as FPGA registers have it
  logic          sys_rst_n;
  logic          trigclk_n;
  logic          first_pulse;
  logic          run, post, stored, trig_allow;
  logic [AW-1:0] waddr;
  logic [W-1:0]  peak;

  sampling_clock_gen u_sampclk (
    .samp    (samp),
    .sampclk (sampclk),
    .locked  (pll_locked)
  );

  trigger_clock_gen u_trigclk (
    .ce   (trig),
    .xin1 (1'b0),
    .xin2 (1'b0),
    .outp (trigclk),
    .outn (trigclk_n)
  );

  // reset: asserted at once, released synchronously to the sampling clock
  always_ff @(posedge sampclk or negedge rst_n) begin
    if (!rst_n) rst_sync <= '0;
    else        rst_sync <= {rst_sync[0], pll_locked};
  end
  assign sys_rst_n = rst_sync[1];

  vernier_measure #(.CNT_W(CNT_W)) u_meas (
    .sampclk     (sampclk),
    .rst_n       (sys_rst_n),
    .trig        (trig),
    .trigclk     (trigclk),
    .first_pulse (first_pulse),
    .n1          (n1),
    .n2          (n2),
    .t_ps        (t_ps),
    .valid       (meas_valid),
    .err         (meas_err)
  );

  data_storage #(.W(W), .AW(AW)) u_store (
    .clk        (sampclk),
    .rst_n      (sys_rst_n),
    .cha_d      (cha_d),
    .div        (div),
    .run        (run),
    .post       (post),
    .stored     (stored),
    .waddr      (waddr),
    .trig_ptr   (trig_ptr),
    .trig_phase (trig_phase),
    .raddr      (raddr),
    .rdata      (rdata),
    .peak       (peak)
  );

  acq_controller #(.AW(AW)) u_ctrl (
    .clk         (sampclk),
    .rst_n       (sys_rst_n),
    .start       (start),
    .trig_in     (trig_in),
    .stored      (stored),
    .first_pulse (first_pulse),
    .meas_valid  (meas_valid),
    .meas_err    (meas_err),
    .run         (run),
    .post        (post),
    .trig        (trig),
    .trig_allow  (trig_allow),
    .done        (done),
    .state       (state)
  );

endmodule
