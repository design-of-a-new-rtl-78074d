// res_pkg: constants and types shared by the random equivalent sampling (RES) design.
//
// The vernier time measurement works on two clocks whose periods differ by a small step:
// the sampling clock (T1 = 9.9 ns, 101.01 MHz, made by two PLLs x10/9 and x10/11 from a
// 100 MHz reference) and the trigger clock (T2 = 10 ns, 100 MHz, started by the trigger).
// The step T2 - T1 = 100 ps is the time resolution, i.e. an equivalent rate of 10 GSps.
// Periods are kept as integers in picoseconds so that the measured time can be computed
// exactly in hardware. The sample memory is 512 x 8 (9-bit address RAM_A[8..0]) split into
// a 256-byte pre-trigger half and a 256-byte post-trigger half. These numbers follow the
// document; the controller state encoding is this design's own.
`timescale 1ps/1ps
package res_pkg;

  // Clock periods in picoseconds
  localparam int unsigned T1_PS = 9900;    // sampling clock period (101.01 MHz)
  localparam int unsigned T2_PS = 10000;   // trigger clock period (100 MHz)

  // Largest number of trigger-clock periods until coincidence ("after 0 to 100 clocks")
  localparam int unsigned N_MAX = 100;

  // Sample data and memory geometry
  localparam int unsigned DATA_W  = 8;     // CHA_D[7..0]
  localparam int unsigned ADDR_W  = 9;     // RAM_A[8..0]
  localparam int unsigned HALF    = 256;   // pre-trigger and post-trigger halves

  // Acquisition controller states
  typedef enum logic [2:0] {
    ACQ_IDLE    = 3'd0,   // waiting for a start command
    ACQ_PREFILL = 3'd1,   // filling the front half, trigger not yet allowed
    ACQ_ARMED   = 3'd2,   // front half full, trigger allowed, front half keeps circulating
    ACQ_POST    = 3'd3,   // trigger seen, filling the back half
    ACQ_DONE    = 3'd4    // memory full, waiting for the host to read
  } acq_state_t;

endpackage
