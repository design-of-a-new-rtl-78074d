// tb_acq_controller: self-checking testbench of the acquisition controller.
//
// The testbench stands in for the data storage (a storage pulse on a random third of the
// cycles while run is high) and for the measuring time module (first_pulse one or two
// cycles after trig rises, then meas_valid or meas_err some cycles later). Each of eight
// acquisitions checks that: a trigger event before the front half has been filled is
// ignored; the trigger is allowed exactly after 256 storage pulses; a trigger event then
// sets trig; post rises after first_pulse; run falls right after the 256th back-half
// pulse; done waits for the measurement; the next start clears trig.
`timescale 1ps/1ps
module tb_acq_controller;
  import res_pkg::*;

  localparam int P = 9900;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, trig_in = 1'b0;
  logic stored = 1'b0, first_pulse = 1'b0, meas_valid = 1'b0, meas_err = 1'b0;
  logic run, post, trig, trig_allow, done;
  acq_state_t state;
  int checks = 0, failures = 0;
  int n_early_ignored = 0, n_err_done = 0;

  acq_controller dut (
    .clk(clk), .rst_n(rst_n), .start(start), .trig_in(trig_in), .stored(stored),
    .first_pulse(first_pulse), .meas_valid(meas_valid), .meas_err(meas_err),
    .run(run), .post(post), .trig(trig), .trig_allow(trig_allow), .done(done),
    .state(state)
  );

  always #(P / 2) clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_trig_in();
    #(1234 + $urandom_range(0, 3000));
    trig_in = 1'b1;
    #(2000);
    trig_in = 1'b0;
  endtask

  initial begin
    int nst, wait_meas;
    bit use_err;
    // a trigger event clears nothing before reset ends; start from a known latch state
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    check(state == ACQ_IDLE && !run && !trig_allow && !done, "idle after reset");
    for (int acq = 0; acq < 8; acq++) begin
      use_err = (acq == 5);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      check(state == ACQ_PREFILL && run && !post, "prefill after start");
      @(posedge clk);
      #1;
      check(!trig, "trig cleared by start");
      // prefill: storage pulses, with an early trigger event in the middle
      nst = 0;
      while (nst < 256) begin
        stored = ($urandom_range(0, 2) == 0);
        if (nst == 100 && stored) fork pulse_trig_in(); join_none
        @(posedge clk);
        #1;
        if (stored) nst++;
        stored = 1'b0;
        if (nst < 256) check(!trig_allow && !trig, $sformatf("trigger allowed after %0d", nst));
      end
      check(trig_allow && state == ACQ_ARMED, "armed after 256 values");
      n_early_ignored++;
      // keep storing while armed, then a trigger event
      repeat ($urandom_range(5, 40)) begin
        stored = ($urandom_range(0, 2) == 0);
        @(posedge clk);
        #1;
      end
      stored = 1'b0;
      check(!trig && !post, "no trigger yet");
      pulse_trig_in();
      check(trig, "trig set by the trigger event");
      @(posedge clk);
      #1;
      @(posedge clk);
      #1;
      first_pulse = 1'b1;
      @(posedge clk);
      #1;
      first_pulse = 1'b0;
      check(post && state == ACQ_POST, "post after first_pulse");
      // back half
      nst = 0;
      wait_meas = $urandom_range(0, 600);
      while (run) begin
        stored = ($urandom_range(0, 2) == 0);
        if (wait_meas == 0) begin
          if (use_err) meas_err = 1'b1;
          else         meas_valid = 1'b1;
        end
        wait_meas--;
        @(posedge clk);
        #1;
        if (stored) nst++;
        stored = 1'b0;
      end
      check(nst == 256, $sformatf("run fell after %0d back-half values", nst));
      while (!meas_valid && !meas_err) begin
        check(!done, "done before the measurement");
        wait_meas--;
        if (wait_meas <= 0) begin
          if (use_err) meas_err = 1'b1;
          else         meas_valid = 1'b1;
        end
        @(posedge clk);
        #1;
      end
      @(posedge clk);
      #1;
      check(done && state == ACQ_DONE && trig, "done with trig held");
      if (use_err) n_err_done++;
      repeat (5) @(posedge clk);
      #1;
      check(done, "done holds until the next start");
      meas_valid = 1'b0;
      meas_err   = 1'b0;
    end
    check(n_err_done == 1 && n_early_ignored == 8, "every case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
