// tb_peak_detect: self-checking testbench of the maximum peak value sampler.
//
// Random 8-bit samples are applied one per 10 ns clock; trans_load marks the first sample
// of each storage interval, with interval lengths drawn at random from 1 to 8. After every
// falling clock edge the running maximum is compared with a reference kept by the
// testbench: the first sample of an interval, then the largest sample seen since. The
// comparator output agb is checked before the falling edge. Reset is checked first.
`timescale 1ps/1ps
module tb_peak_detect;

  localparam int P = 10000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic [7:0] cha_d = '0;
  logic       trans_load = 1'b0;
  logic [7:0] sample, peak;
  logic       agb;
  int checks = 0, failures = 0;

  peak_detect dut (.clk(clk), .rst_n(rst_n), .cha_d(cha_d), .trans_load(trans_load),
                   .sample(sample), .peak(peak), .agb(agb));

  always #(P / 2) clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   left, loads;
    logic [7:0] s, ref_peak, next_d;
    bit   saw_hold, saw_replace;
    #1;
    rst_n = 1'b0;
    #(P / 4);
    check(peak == 8'd0 && sample == 8'd0, "reset value");
    rst_n    = 1'b1;
    left     = 0;
    loads    = 0;
    ref_peak = '0;
    saw_hold = 0;
    saw_replace = 0;
    next_d   = 8'($urandom);
    cha_d    = next_d;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      s = next_d;                                // latched at this edge
      #1;
      if (left == 0) begin
        left = $urandom_range(1, 8);
        trans_load = 1'b1;
      end else begin
        trans_load = 1'b0;
      end
      left--;
      #1;
      check(agb == (s > ref_peak), $sformatf("agb=%0b sample=%0d max=%0d", agb, s, ref_peak));
      #(P / 2);                                  // past the falling edge
      if (trans_load) begin
        ref_peak = s;
        loads++;
      end else if (s > ref_peak) begin
        ref_peak = s;
        saw_replace = 1;
      end else begin
        saw_hold = 1;
      end
      check(sample == s, $sformatf("sample=%0d expected %0d", sample, s));
      check(peak == ref_peak, $sformatf("peak=%0d expected %0d", peak, ref_peak));
      next_d = 8'($urandom);
      cha_d  = next_d;
    end
    check(loads > 100 && saw_hold && saw_replace, "not every case was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
