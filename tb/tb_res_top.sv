// tb_res_top: end-to-end testbench of the random equivalent sampling system.
//
// The input signal is a periodic ramp of period 25.6 ns whose 8-bit code is the time since
// the start of its period in 100 ps steps, so every stored code tells when its sample was
// taken. A trigger event comes at the start of every period. The A/D converter is modelled
// here: at each SAMPCLK rising edge it converts the ramp and presents the code shortly
// after, so the code sampled at one edge is latched by the design at the next.
//
// For each of 12 acquisitions at the default sizes the host side starts the system, waits
// for done and reads the 512 memory words, the measured time t_ps and trig_ptr. With E0
// the first sampling edge after TRIG rises, the post-trigger word i holds the sample of
// edge E(i), taken at t + i*T1 after the trigger clock starts, and the pre-trigger ring,
// read from trig_ptr on, holds edges E(-256) .. E(-1). The testbench checks:
//  * t_ps against the true delay from the trigger clock start to E0: within [0, 100) ps
//    (an E0 inside the 20 ps start-up delay of the trigger clock would be one period off,
//    and is excluded; it is counted and reported);
//  * n1 = n2 and t_ps = n2*T2 - n1*T1;
//  * with div = 1 every post word against the code predicted from t_ps alone (the host's
//    reconstruction), within one step, and every pre word against the logged A/D codes;
//  * with div = 5 and div = 2 every post word against the maximum of its group of logged
//    codes, the groups placed by trig_phase.
// Mechanisms counted, each must occur: an early trigger event ignored before the front half
// is full, the front ring wrapped (trig_ptr not 0), a coincidence measured, the peak
// detector keeping a larger earlier sample, and direct storage with div = 1.
`timescale 1ps/1ps
module tb_res_top;
  import res_pkg::*;

  localparam int  T1     = 9900;
  localparam int  T2     = 10000;
  localparam int  TSIG   = 25600;
  localparam int  TSTART = 20;      // trigger clock start-up delay of the clock model
  localparam int  T0     = 1237;    // signal phase

  logic       samp = 1'b0, rst_n = 1'b0, trig_in = 1'b0, start = 1'b0;
  logic       sampclk, done, meas_valid, meas_err, trig, trigclk;
  logic [7:0] cha_d = '0, div = 8'd1, rdata, trig_phase;
  logic [8:0] raddr = '0;
  logic [7:0] trig_ptr;
  logic [6:0] n1, n2;
  logic signed [31:0] t_ps;
  acq_state_t state;
  int checks = 0, failures = 0;

  res_top dut (
    .samp(samp), .rst_n(rst_n), .trig_in(trig_in), .sampclk(sampclk), .cha_d(cha_d),
    .start(start), .div(div), .done(done), .state(state), .raddr(raddr), .rdata(rdata),
    .t_ps(t_ps), .n1(n1), .n2(n2), .meas_valid(meas_valid), .meas_err(meas_err),
    .trig_ptr(trig_ptr), .trig_phase(trig_phase), .trig(trig), .trigclk(trigclk)
  );

  // 100 MHz reference
  always #5000 samp = ~samp;

  // input signal code at an absolute time
  function automatic logic [7:0] ramp_code(longint t);
    longint ph = (t - T0) % TSIG;
    if (ph < 0) ph += TSIG;
    return 8'(ph / 100);
  endfunction

  // trigger events at the start of every signal period
  initial begin
    #(T0);
    forever begin
      trig_in = 1'b1;
      #(3000);
      trig_in = 1'b0;
      #(TSIG - 3000);
    end
  end

  // A/D converter model with a log of every conversion, indexed by sampling edge
  longint     edge_no = 0;
  longint     e0 = -1, trig_start_time = -1;
  bit         e0_pending = 1'b0;
  logic [7:0] adc_log [longint];
  longint     edge_time [longint];
  always @(posedge sampclk) begin
    adc_log[edge_no]   = ramp_code($time);
    edge_time[edge_no] = $time;
    cha_d <= #1000 ramp_code($time);
    if (trig && e0_pending) begin           // the first sampling edge after TRIG rises
      e0         = edge_no;
      e0_pending = 1'b0;
    end
    edge_no++;
  end

  always @(posedge trig) begin
    trig_start_time = $time + TSTART;
    e0_pending      = 1'b1;
  end

  // early trigger events seen while the front half is still filling
  int n_early = 0;
  always @(posedge trig_in) if (state == ACQ_PREFILL) n_early++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(500_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] mem [512];

  initial begin
    int divs [12] = '{1, 1, 5, 1, 1, 2, 1, 1, 5, 1, 1, 1};
    int  n_window = 0, n_wrap = 0, n_meas = 0, n_peak_kept = 0, n_direct = 0;
    int  d, tp, ii;
    longint t_true, e;
    logic [7:0] expect_code, m;
    int  diff;
    #(20000);
    rst_n = 1'b1;
    wait (state == ACQ_IDLE);
    repeat (5) @(posedge sampclk);
    foreach (divs[a]) begin
      d = divs[a];
      repeat ($urandom_range(1, 60)) @(posedge sampclk);
      #1;
      div   = 8'(d);
      e0    = -1;
      start = 1'b1;
      @(posedge sampclk);
      #1;
      start = 1'b0;
      while (!done) @(posedge sampclk);
      #1;
      // read the memory
      for (int i = 0; i < 512; i++) begin
        raddr = 9'(i);
        @(posedge sampclk);
        #1;
        mem[i] = rdata;
      end
      check(meas_valid && !meas_err, $sformatf("acq %0d: no measurement", a));
      check(e0 >= 0, $sformatf("acq %0d: trigger not seen", a));
      t_true = edge_time[e0] - trig_start_time;
      if (t_true < 0) n_window++;
      else check(t_ps >= t_true && t_ps < t_true + 100,
                 $sformatf("acq %0d: t_ps=%0d true %0d", a, t_ps, t_true));
      check(n1 == n2 && t_ps == 32'(int'(n2) * T2 - int'(n1) * T1),
            $sformatf("acq %0d: n1=%0d n2=%0d t_ps=%0d", a, n1, n2, t_ps));
      n_meas++;
      if (trig_ptr != 0) n_wrap++;
      $display("acq %0d: div %0d t_ps %0d n %0d trig_ptr %0d phase %0d e0 %0d", a, d, t_ps, n1, trig_ptr, trig_phase, e0);
      if (d == 1) begin
        n_direct++;
        // post-trigger words: reconstruct each sample time from t_ps alone
        for (int i = 0; i < 256; i++) begin
          expect_code = ramp_code(trig_start_time + longint'(t_ps) + longint'(i) * T1);
          diff = int'(mem[256 + i]) - int'(expect_code);
          if (diff > 128) diff -= 256;
          if (diff < -128) diff += 256;
          check(diff >= -1 && diff <= 1,
                $sformatf("acq %0d: post %0d holds %0d, reconstruction gives %0d",
                          a, i, mem[256 + i], expect_code));
        end
        // pre-trigger ring, oldest first, against the logged conversions
        for (int j = 0; j < 256; j++) begin
          ii = (int'(trig_ptr) + j) % 256;
          e  = e0 - 256 + j;
          check(mem[ii] == adc_log[e],
                $sformatf("acq %0d: pre %0d holds %0d, edge %0d gave %0d",
                          a, j, mem[ii], e, adc_log[e]));
        end
      end else begin
        tp = int'(trig_phase);
        for (int i = 0; i < 256; i++) begin
          e = e0 - tp + longint'(d) * i;
          m = adc_log[e];
          for (int k = 1; k < d; k++) if (adc_log[e + k] > m) m = adc_log[e + k];
          if (m != adc_log[e + d - 1]) n_peak_kept++;
          check(mem[256 + i] == m,
                $sformatf("acq %0d div %0d: post %0d holds %0d, group maximum %0d",
                          a, d, i, mem[256 + i], m));
        end
      end
    end
    $display("trigger edges inside the start-up delay: %0d", n_window);
    $display("mechanisms: early triggers ignored %0d, ring wrapped %0d, measured %0d, peak kept %0d, direct %0d",
             n_early, n_wrap, n_meas, n_peak_kept, n_direct);
    check(n_early > 0, "no early trigger event");
    check(n_wrap > 0, "front ring never wrapped");
    check(n_meas > 0, "no measurement");
    check(n_peak_kept > 0, "peak detector never kept an earlier sample");
    check(n_direct > 0, "no direct storage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
