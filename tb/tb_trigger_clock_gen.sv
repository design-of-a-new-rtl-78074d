// tb_trigger_clock_gen: self-checking testbench of the trigger clock generator model.
//
// CE is raised at random times. The testbench checks that the output is still while CE is
// low, that the first rising edge comes 20 ps after CE (below the 35 ps start-up limit),
// that the following periods are 10000 ps with 5000 ps high, that OUTN is the complement
// while running, and that the clock stops low when CE falls.
`timescale 1ps/1ps
module tb_trigger_clock_gen;

  logic ce = 1'b0;
  logic outp, outn;
  int checks = 0, failures = 0;
  int edges_while_off = 0;
  bit off_window = 1'b0;

  trigger_clock_gen dut (.ce(ce), .xin1(1'b0), .xin2(1'b0), .outp(outp), .outn(outn));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  always @(posedge outp) if (off_window) edges_while_off++;

  initial begin : watchdog
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_ce, t_prev, t_now;
    for (int trial = 0; trial < 20; trial++) begin
      off_window = 1'b1;
      #(30000 + $urandom_range(0, 20000));
      off_window = 1'b0;
      ce = 1'b1;
      t_ce = $realtime;
      @(posedge outp);
      check($realtime - t_ce == 20.0, $sformatf("start after %0t", $realtime - t_ce));
      t_prev = $realtime;
      for (int i = 0; i < 20; i++) begin
        #2500;
        check(outp && !outn, "high phase");
        #5000;
        check(!outp && outn, "low phase");
        @(posedge outp);
        t_now = $realtime;
        check(t_now - t_prev == 10000.0, $sformatf("period %0t", t_now - t_prev));
        t_prev = t_now;
      end
      #1000;
      ce = 1'b0;
      #10000;
      check(!outp && !outn, "stopped low after CE fell");
    end
    check(edges_while_off == 0, "edges while CE was low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
