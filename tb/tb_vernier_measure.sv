// tb_vernier_measure: self-checking testbench of the measuring time module.
//
// The sampling clock (9.9 ns) runs from time 0. For each trial, trig rises at a random
// time tt and the testbench starts the 10 ns trigger clock at the same instant, as the
// clock generator does. The true time t from the trigger to the next sampling-clock rising
// edge follows from the clock arithmetic; the expected coincidence edge k is the first one
// at which a sampling edge has caught up with the trigger-clock edge. Checked: n1 = n2 = k,
// t_ps = n2*10000 - n1*9900, t <= t_ps < t + 100 ps (the vernier resolution), err low,
// first_pulse at the first sampling edge after the trigger, and that valid comes within
// k + 6 sampling periods. A last trial keeps the trigger clock stopped and checks that err
// is raised. Trigger times end in 37 ps so that no edges coincide.
`timescale 1ps/1ps
module tb_vernier_measure;
  import res_pkg::*;

  localparam int T1 = 9900;
  localparam int T2 = 10000;

  logic sampclk = 1'b0;
  logic trigclk = 1'b0;
  logic rst_n   = 1'b0;
  logic trig    = 1'b0;
  logic stall   = 1'b0;
  logic first_pulse, valid, err;
  logic [6:0] n1, n2;
  logic signed [31:0] t_ps;
  int   checks = 0, failures = 0;

  vernier_measure dut (
    .sampclk(sampclk), .rst_n(rst_n), .trig(trig), .trigclk(trigclk),
    .first_pulse(first_pulse), .n1(n1), .n2(n2), .t_ps(t_ps), .valid(valid), .err(err)
  );

  always #(T1 / 2) sampclk = ~sampclk;   // rising edges at T1/2 + m*T1

  // trigger clock: starts with a rising edge when trig rises, stops low when trig falls
  initial forever begin
    @(posedge trig);
    if (!stall) begin
      while (trig) begin
        trigclk = 1'b1;
        #(T2 / 2);
        trigclk = 1'b0;
        #(T2 / 2);
      end
    end
  end

  function automatic bit samp_level(longint tau);
    longint ph = (tau - T1 / 2) % T1;
    if (ph < 0) ph += T1;
    return ph < T1 / 2;
  endfunction

  function automatic int expected_k(longint tt);
    bit prev = 1'b1;
    for (int j = 0; j <= 100; j++) begin
      bit lv = samp_level(tt + longint'(j) * T2);
      if (lv && !prev) return j;
      prev = lv;
    end
    return -1;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first_pulse must come one sampling edge after the first edge following the trigger
  longint first_pulse_time;
  always @(posedge sampclk) if (first_pulse) first_pulse_time = $time;

  initial begin
    longint tt, t_true, ph, t_valid;
    int     k;
    int     periods;
    repeat (3) @(posedge sampclk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 80; trial++) begin
      #(20000 + $urandom_range(0, 30000));
      tt = $time;
      tt = tt + (137 - (tt % 100));
      #(tt - $time);
      ph = (tt - T1 / 2) % T1;
      t_true = T1 - ph;                       // time to the next sampling rising edge
      k = expected_k(tt);
      first_pulse_time = 0;
      trig = 1'b1;
      periods = 0;
      while (!valid && !err && periods < 200) begin
        @(posedge sampclk);
        periods++;
      end
      #1;
      t_valid = $time - tt;
      check(valid && !err, $sformatf("trial %0d: no result", trial));
      check(int'(n1) == k && int'(n2) == k,
            $sformatf("trial %0d: k=%0d n1=%0d n2=%0d", trial, k, n1, n2));
      check(t_ps == 32'(int'(n2) * T2 - int'(n1) * T1),
            $sformatf("trial %0d: t_ps=%0d from n1=%0d n2=%0d", trial, t_ps, n1, n2));
      check(t_ps >= t_true && t_ps < t_true + 100,
            $sformatf("trial %0d: t_true=%0d t_ps=%0d", trial, t_true, t_ps));
      check(first_pulse_time == tt + t_true + T1,
            $sformatf("trial %0d: first_pulse seen at %0d, expected %0d",
                      trial, first_pulse_time, tt + t_true + T1));
      check(t_valid <= longint'(k + 6) * T1 + t_true,
            $sformatf("trial %0d: result after %0d ps, k=%0d", trial, t_valid, k));
      trig = 1'b0;
      repeat (3) @(posedge sampclk);
      check(!valid, "valid not cleared with trig");
    end
    // trigger clock that never starts: the error flag must come
    stall = 1'b1;
    #(12345);
    trig = 1'b1;
    periods = 0;
    while (!err && periods < 200) begin
      @(posedge sampclk);
      periods++;
    end
    check(err && !valid, "no error with a stopped trigger clock");
    check(periods <= N_MAX + 8, $sformatf("error after %0d periods", periods));
    trig = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
