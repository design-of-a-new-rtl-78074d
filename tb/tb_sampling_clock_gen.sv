// tb_sampling_clock_gen: self-checking testbench of the sampling clock generator model.
//
// A 100 MHz reference is applied. After lock the testbench measures 200 periods of the
// output: each must be 9900 ps (100 MHz * 10/9 * 10/11 = 101.01 MHz) with 4950 ps high,
// and locked must be set within 20 reference periods.
`timescale 1ps/1ps
module tb_sampling_clock_gen;

  logic samp = 1'b0;
  logic sampclk, locked;
  int checks = 0, failures = 0;

  sampling_clock_gen dut (.samp(samp), .sampclk(sampclk), .locked(locked));

  always #5000 samp = ~samp;

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_rise, t_fall, t_prev;
    #(200_000);
    checks++;
    if (!locked) begin
      failures++;
      $display("FAIL: not locked after 20 reference periods");
    end
    @(posedge sampclk);
    t_prev = $realtime;
    for (int i = 0; i < 200; i++) begin
      @(negedge sampclk);
      t_fall = $realtime;
      @(posedge sampclk);
      t_rise = $realtime;
      checks++;
      if (t_rise - t_prev != 9900.0 || t_fall - t_prev != 4950.0) begin
        failures++;
        $display("FAIL: period %0t high %0t", t_rise - t_prev, t_fall - t_prev);
      end
      t_prev = t_rise;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
