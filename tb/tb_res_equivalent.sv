// tb_res_equivalent: equivalent-time reconstruction of a sine wave through the whole system.
//
// The input is a 10.06 MHz sine (period TSIG = 99.37 ns) converted to 8 bits by an A/D
// converter model on every sampling-clock edge; the trigger event comes at the rising zero
// crossing of every period. Because the signal is not locked to the sampling clock, the
// trigger-to-sample time t differs from acquisition to acquisition. The testbench runs 40
// acquisitions at the default sizes with every sample stored (div = 1), and plays the host:
// it places each post-trigger word at its equivalent time
//     tau = TSTART + t_ps + i * T1   (mod TSIG)
// after the zero crossing (TSTART is the trigger clock start-up delay), using only the
// measured t_ps. Checked: every word against the sine at tau, within two codes (one code of
// rounding plus the 100 ps measurement step on the steepest slope). The 100 ps bins of the
// period hit by the reconstruction are counted: at least 90 % of them must be filled, which
// is the 10 GSps equivalent rate from a 101 MHz sampling clock.
`timescale 1ps/1ps
module tb_res_equivalent;
  import res_pkg::*;

  localparam int  T1     = 9900;
  localparam int  TSIG   = 99370;
  localparam int  TSTART = 20;
  localparam int  T0     = 777;
  localparam int  NBINS  = (TSIG + 99) / 100;
  localparam real PI     = 3.14159265358979;

  logic       samp = 1'b0, rst_n = 1'b0, trig_in = 1'b0, start = 1'b0;
  logic       sampclk, done, meas_valid, meas_err, trig, trigclk;
  logic [7:0] cha_d = '0, rdata, trig_phase, trig_ptr;
  logic [8:0] raddr = '0;
  logic [6:0] n1, n2;
  logic signed [31:0] t_ps;
  acq_state_t state;
  int checks = 0, failures = 0;

  res_top dut (
    .samp(samp), .rst_n(rst_n), .trig_in(trig_in), .sampclk(sampclk), .cha_d(cha_d),
    .start(start), .div(8'd1), .done(done), .state(state), .raddr(raddr), .rdata(rdata),
    .t_ps(t_ps), .n1(n1), .n2(n2), .meas_valid(meas_valid), .meas_err(meas_err),
    .trig_ptr(trig_ptr), .trig_phase(trig_phase), .trig(trig), .trigclk(trigclk)
  );

  always #5000 samp = ~samp;

  function automatic int sine_code(real tau);
    real v;
    v = 127.5 + 127.0 * $sin(2.0 * PI * tau / real'(TSIG));
    return int'($floor(v + 0.5));
  endfunction

  // trigger at the rising zero crossing of every period
  initial begin
    #(T0);
    forever begin
      trig_in = 1'b1;
      #(5000);
      trig_in = 1'b0;
      #(TSIG - 5000);
    end
  end

  // A/D converter model
  always @(posedge sampclk) begin
    longint ph;
    ph = ($time - T0) % TSIG;
    cha_d <= #1000 8'(sine_code(real'(ph)));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bin_hit [NBINS];

  initial begin
    int  nhit, expect_code, diff;
    longint tau;
    #(20000);
    rst_n = 1'b1;
    wait (state == ACQ_IDLE);
    repeat (5) @(posedge sampclk);
    for (int a = 0; a < 40; a++) begin
      repeat ($urandom_range(1, 40)) @(posedge sampclk);
      #1;
      start = 1'b1;
      @(posedge sampclk);
      #1;
      start = 1'b0;
      while (!done) @(posedge sampclk);
      #1;
      check(meas_valid && !meas_err, $sformatf("acq %0d: no measurement", a));
      for (int i = 0; i < 256; i++) begin
        raddr = 9'(256 + i);
        @(posedge sampclk);
        #1;
        tau = (longint'(TSTART) + longint'(t_ps) + longint'(i) * T1) % TSIG;
        expect_code = sine_code(real'(tau));
        diff = int'(rdata) - expect_code;
        check(diff >= -2 && diff <= 2,
              $sformatf("acq %0d word %0d: %0d, sine at %0d ps gives %0d",
                        a, i, rdata, tau, expect_code));
        bin_hit[tau / 100] = 1'b1;
      end
    end
    nhit = 0;
    foreach (bin_hit[b]) if (bin_hit[b]) nhit++;
    $display("100 ps bins of the period filled: %0d of %0d", nhit, NBINS);
    check(nhit * 10 >= NBINS * 9, "equivalent-time grid not filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
