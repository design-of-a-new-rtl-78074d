// data_storage: storage-pulse generator, maximum peak value sampling and sample memory.
//
// Every sampling-clock cycle a new A/D converter sample enters the peak detector. A divider
// counts samples in groups of div (div = 5 gives the 20 MHz storage rate of a 100 MHz
// sampling clock; div = 1 stores every sample). At the end of each group the storage pulse
// (we, the RAM write enable standing in for TRANS_LATCH) writes the group's maximum into
// the RAM, and in the next cycle trans_load (the same pulse one cycle later) makes the
// first sample of the new group the default maximum. The write address comes from a
// counter that advances once per stored value.
//
// The memory is split in two halves. While post is low the front half is written as a
// ring (the pointer wraps at 2**(AW-1)), so it always holds the latest pre-trigger data.
// When post rises, the pointer is captured as trig_ptr (the oldest pre-trigger entry,
// since it is the next one that would have been overwritten) together with the divider
// phase trig_phase, the pointer restarts at 0 and the back half is written.
//
// Interface: clk (sampling clock), rst_n, cha_d (A/D data), div (samples per stored value,
// 0 is taken as 1), run (storage active), post (write the back half), stored (a value is
// written at the coming clock edge), waddr, trig_ptr, trig_phase, raddr/rdata (host read
// port, one-cycle latency), peak (running maximum, for observation).
// Timing: with div = 1 the value written at edge i is the sample latched at edge i-1.
// The first storage pulse after run rises is skipped, as no full group lies behind it.
//
// From the document: the peak detector, the storage pulse with the divided rate and the
// load of the first sample of each interval, the address counter, the 9-bit address and
// the two 256-byte halves. This design's own choices: the write enable in place of a
// separate storage clock, the ring behaviour of the front half, trig_ptr and trig_phase,
// and the runtime divider.
`timescale 1ps/1ps
module data_storage
  import res_pkg::*;
#(
  parameter int unsigned W  = DATA_W,
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  cha_d,
  input  logic [7:0]    div,
  input  logic          run,
  input  logic          post,
  output logic          stored,
  output logic [AW-1:0] waddr,
  output logic [AW-2:0] trig_ptr,
  output logic [7:0]    trig_phase,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  output logic [W-1:0]  peak
);

  logic [7:0]    cnt;
  logic [7:0]    div_m1;
  logic          trans_latch, trans_load, primed, post_d;
  logic [AW-2:0] ptr;
  logic [W-1:0]  sample;
  logic          agb;

  assign div_m1      = (div == 8'd0) ? 8'd0 : div - 8'd1;
  assign trans_latch = run && (cnt >= div_m1);
  assign stored      = trans_latch && primed;
  // on the first cycle of post the pointer is already taken as 0
  assign waddr       = {post, (post && !post_d) ? '0 : ptr};

  // storage pulse divider and pointer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      trans_load <= 1'b0;
      primed     <= 1'b0;
      post_d     <= 1'b0;
      ptr        <= '0;
      trig_ptr   <= '0;
      trig_phase <= '0;
    end else begin
      post_d     <= post;
      trans_load <= trans_latch;
      if (!run) begin
        cnt    <= '0;
        primed <= 1'b0;
        ptr    <= '0;
      end else begin
        cnt <= trans_latch ? 8'd0 : cnt + 8'd1;
        if (trans_latch) primed <= 1'b1;
        if (post && !post_d) begin
          trig_ptr   <= ptr;
          trig_phase <= cnt;
          ptr        <= stored ? (AW-1)'(1) : '0;
        end else if (stored) begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

  peak_detect #(.W(W)) u_peak (
    .clk        (clk),
    .rst_n      (rst_n),
    .cha_d      (cha_d),
    .trans_load (trans_load),
    .sample     (sample),
    .peak       (peak),
    .agb        (agb)
  );

  sample_ram #(.W(W), .AW(AW)) u_ram (
    .clk   (clk),
    .we    (stored),
    .waddr (waddr),
    .wdata (peak),
    .raddr (raddr),
    .rdata (rdata)
  );

endmodule
