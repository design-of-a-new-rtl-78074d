// tb_phase_monitor: self-checking testbench of the phase monitor.
//
// The sampling clock (9.9 ns) runs from time 0; for each trial the trigger clock (10 ns)
// starts at a random time. The expected coincidence edge k is worked out from the clock
// arithmetic alone: the first trigger-clock edge at which the sampling clock is high after
// being low at the previous edge. The testbench records the edge after which SAME is high
// and checks it, that it is the only SAME pulse in the first 101 edges, and that SAME lasts
// exactly one trigger-clock period. Trigger times end in 37 ps so that no edges coincide.
`timescale 1ps/1ps
module tb_phase_monitor;

  localparam int T1 = 9900;
  localparam int T2 = 10000;

  logic sampclk = 1'b0;
  logic trigclk = 1'b0;
  logic clr_n   = 1'b1;
  logic same;
  int   checks = 0, failures = 0;

  phase_monitor dut (.trigclk(trigclk), .trig_n_clr(clr_n), .sampclk(sampclk), .same(same));

  always #(T1 / 2) sampclk = ~sampclk;   // rising edges at T1/2 + m*T1

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

  initial begin : watchdog
    #(400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint tt;
    int     k_exp, k_got, pulses, width;
    #1;
    for (int trial = 0; trial < 60; trial++) begin
      clr_n = 1'b0;
      #(20000 + $urandom_range(0, 30000));
      tt = $time;
      tt = tt + (137 - (tt % 100));              // trigger time ends in 37 ps
      #(tt - $time);
      k_exp  = expected_k(tt);
      clr_n  = 1'b1;
      pulses = 0;
      k_got  = -1;
      width  = 0;
      for (int j = 0; j <= 101; j++) begin
        // look at SAME just before edge j: high means coincidence at edge j-1
        if (j > 0 && same) begin
          if (width == 0) begin
            pulses++;
            k_got = j - 1;
          end
          width++;
        end else if (width > 0 && !same) begin
          checks++;
          if (width != 1) begin
            failures++;
            $display("trial %0d: SAME lasted %0d periods", trial, width);
          end
          width = -1000;
        end
        trigclk = 1'b1;
        #(T2 / 2);
        trigclk = 1'b0;
        #(T2 / 2);
      end
      checks++;
      if (pulses != 1 || k_got != k_exp) begin
        failures++;
        $display("trial %0d: tt=%0d expected k=%0d got k=%0d pulses=%0d",
                 trial, tt, k_exp, k_got, pulses);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
