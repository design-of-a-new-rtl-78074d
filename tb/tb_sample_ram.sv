// tb_sample_ram: self-checking testbench of the 512 x 8 dual-port sample memory.
//
// Every word is written with a random value while the read port reads other addresses;
// the testbench keeps its own copy of the memory and checks each read one clock after its
// address was applied. Reads of the address being written must return the old word.
`timescale 1ps/1ps
module tb_sample_ram;

  localparam int P  = 10000;
  localparam int AW = 9;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [7:0]    wdata = '0, rdata;
  logic [7:0]    model [2**AW];
  logic          model_ok [2**AW];
  int checks = 0, failures = 0;

  sample_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr),
                  .rdata(rdata));

  always #(P / 2) clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_q;
    bit         expect_valid;
    foreach (model_ok[i]) model_ok[i] = 1'b0;
    expect_valid = 1'b0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < 2**AW; i++) begin
        @(negedge clk);
        // check the read issued at the previous edge
        if (expect_valid) begin
          checks++;
          if (rdata !== expect_q) begin
            failures++;
            $display("FAIL: raddr read %0h expected %0h", rdata, expect_q);
          end
        end
        we    = ($urandom_range(0, 3) != 0);
        waddr = AW'(i);
        wdata = 8'($urandom);
        raddr = (pass == 3) ? AW'(i) : AW'($urandom);   // last pass: read while writing
        expect_valid = model_ok[raddr];
        expect_q     = model[raddr];                     // old word
        @(posedge clk);
        #1;
        if (we) begin
          model[waddr]    = wdata;
          model_ok[waddr] = 1'b1;
        end
      end
    end
    // read back everything
    we = 1'b0;
    for (int i = 0; i <= 2**AW; i++) begin
      @(negedge clk);
      if (i > 0 && model_ok[i-1]) begin
        checks++;
        if (rdata !== model[i-1]) begin
          failures++;
          $display("FAIL: addr %0d read %0h expected %0h", i - 1, rdata, model[i-1]);
        end
      end
      if (i < 2**AW) raddr = AW'(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
