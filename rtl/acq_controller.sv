// acq_controller: sequences one random-equivalent-sampling acquisition.
//
// After a start command the storage runs and fills the front (pre-trigger) half of the
// memory. Only when that half has been filled once is the trigger allowed: from then on a
// rising edge of the trigger event trig_in sets the trigger latch, whose output trig is the
// TRIG signal that enables the trigger clock generator and starts the vernier time
// measurement. Meanwhile the front half keeps being overwritten as a ring. At the first
// sampling pulse after the trigger (first_pulse) the storage switches to the back
// (post-trigger) half; when that half is full and the time measurement has finished
// (meas_valid, or meas_err), storage stops and done is raised for the host, which then
// reads the memory and the measured time. trig stays high until the next start, which
// keeps the measurement result in place; a new start clears it and begins the next
// acquisition.
//
// Interface: clk (sampling clock), rst_n, start (host command, one cycle), trig_in
// (trigger event from the trigger circuit, asynchronous), stored (a value was written),
// first_pulse / meas_valid / meas_err (from the measuring time module), run and post (to
// the data storage), trig (TRIG, to the trigger clock generator), trig_allow, done, state.
// Timing: the trigger is allowed 2**(AW-1) stored values after start; done follows
// 2**(AW-1) stored values after first_pulse, or the measurement if that is later.
//
// From the document: the 256-byte pre-trigger fill before the trigger is allowed, the
// measurement at the trigger, the 256-byte post-trigger fill and the read-out when the
// memory is full. This design's own choices: the ring behaviour of the front half while
// waiting, the trigger latch, the state encoding and the start/done handshake.
`timescale 1ps/1ps
module acq_controller
  import res_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       trig_in,
  input  logic       stored,
  input  logic       first_pulse,
  input  logic       meas_valid,
  input  logic       meas_err,
  output logic       run,
  output logic       post,
  output logic       trig,
  output logic       trig_allow,
  output logic       done,
  output acq_state_t state
);

  localparam logic [AW-1:0] HALF_N = AW'(2**(AW-1));

  logic [AW-1:0] nstore;
  logic          trig_q = 1'b0;   // power-up value, as FPGA registers have it

  // trigger latch: set by the trigger event once allowed, cleared when not allowed
  always_ff @(posedge trig_in or negedge trig_allow) begin
    if (!trig_allow) trig_q <= 1'b0;
    else             trig_q <= 1'b1;
  end
  assign trig = trig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ACQ_IDLE;
      nstore     <= '0;
      run        <= 1'b0;
      post       <= 1'b0;
      trig_allow <= 1'b0;
    end else begin
      case (state)
        ACQ_IDLE, ACQ_DONE: begin
          if (start) begin
            state      <= ACQ_PREFILL;
            nstore     <= '0;
            run        <= 1'b1;
            post       <= 1'b0;
            trig_allow <= 1'b0;
          end
        end
        ACQ_PREFILL: begin
          if (stored) begin
            if (nstore == HALF_N - 1'b1) begin
              state      <= ACQ_ARMED;
              trig_allow <= 1'b1;
            end
            nstore <= nstore + 1'b1;
          end
        end
        ACQ_ARMED: begin
          if (first_pulse) begin
            state  <= ACQ_POST;
            post   <= 1'b1;
            nstore <= '0;
          end
        end
        ACQ_POST: begin
          if (nstore != HALF_N && stored) begin
            nstore <= nstore + 1'b1;
            if (nstore == HALF_N - 1'b1) run <= 1'b0;   // last value of the back half
          end
          if ((nstore == HALF_N) && (meas_valid || meas_err)) state <= ACQ_DONE;
        end
        default: state <= ACQ_IDLE;
      endcase
    end
  end

  assign done = (state == ACQ_DONE);

  // TRIG is only ever high while the trigger is allowed
  a_trig_allowed: assert property (@(posedge clk) disable iff (!rst_n) trig |-> trig_allow);
  // the back half is never written past its end
  a_post_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == ACQ_POST && nstore == HALF_N) |-> !run);

endmodule
