// tb_data_storage: self-checking testbench of the data storage module.
//
// For storage dividers 1, 5 and 3 the testbench runs one acquisition as the controller
// would: run rises, the front half is written for a random number of values beyond 256,
// post rises at a random cycle and run falls right after the 256th back-half value. The
// reference is computed from the sample stream alone: with cycle 0 the first cycle of run,
// a value is stored at the end of every cycle c with c mod div = div - 1, starting with
// c = 2*div - 1, and it is the maximum of the samples latched in cycles c-div+1 .. c. Front
// half values go to a 256-entry ring, back half values to 256 + n. Checked: the number and
// cycles of the storage pulses, trig_ptr, trig_phase and every word of the memory read
// back through the read port.
`timescale 1ps/1ps
module tb_data_storage;

  localparam int P    = 10000;
  localparam int HALF = 256;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] cha_d = '0;
  logic [7:0] div = 8'd1;
  logic       run = 1'b0, post = 1'b0;
  logic       stored;
  logic [8:0] waddr, raddr = '0;
  logic [7:0] trig_ptr, trig_phase, rdata, peak;
  int checks = 0, failures = 0;

  data_storage dut (
    .clk(clk), .rst_n(rst_n), .cha_d(cha_d), .div(div), .run(run), .post(post),
    .stored(stored), .waddr(waddr), .trig_ptr(trig_ptr), .trig_phase(trig_phase),
    .raddr(raddr), .rdata(rdata), .peak(peak)
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] samp [8192];
  logic [7:0] ref_mem [512];

  initial begin
    int divs [3] = '{1, 5, 3};
    int d, c, npre, npost, pre_target, p_cycle, n_stored_seen;
    bit is_store;
    logic [7:0] m;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (divs[k]) begin
      d = divs[k];
      foreach (samp[i]) samp[i] = 8'($urandom);
      div = 8'(d);
      pre_target = HALF + $urandom_range(0, 300);
      npre = 0;
      npost = 0;
      p_cycle = -1;
      n_stored_seen = 0;
      c = 0;
      @(posedge clk);
      #1;
      cha_d = samp[1];
      run   = 1'b1;
      forever begin
        // decide post for this cycle
        if (!post && npre >= pre_target && $urandom_range(0, 3) == 0) begin
          post    = 1'b1;
          p_cycle = c;
        end
        is_store = (c % d == d - 1) && (c >= 2 * d - 1);
        #1;
        check(stored == is_store, $sformatf("div %0d cycle %0d: stored=%0b expected %0b",
                                            d, c, stored, is_store));
        if (stored) n_stored_seen++;
        if (is_store) begin
          m = samp[c - d + 1];
          for (int i = c - d + 2; i <= c; i++) if (samp[i] > m) m = samp[i];
          if (post) begin
            ref_mem[HALF + npost] = m;
            npost++;
          end else begin
            ref_mem[npre % HALF] = m;
            npre++;
          end
        end
        @(posedge clk);
        #1;
        c++;
        cha_d = samp[c + 1];
        if (npost == HALF) begin
          run  = 1'b0;
          post = 1'b0;
          break;
        end
      end
      check(n_stored_seen == npre + npost, "storage pulse count");
      check(int'(trig_ptr) == npre % HALF,
            $sformatf("div %0d: trig_ptr=%0d expected %0d", d, trig_ptr, npre % HALF));
      check(int'(trig_phase) == p_cycle % d,
            $sformatf("div %0d: trig_phase=%0d expected %0d", d, trig_phase, p_cycle % d));
      // read back
      for (int a = 0; a < 2 * HALF; a++) begin
        raddr = 9'(a);
        @(posedge clk);
        #1;
        check(rdata == ref_mem[a], $sformatf("div %0d: addr %0d read %0d expected %0d",
                                             d, a, rdata, ref_mem[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
