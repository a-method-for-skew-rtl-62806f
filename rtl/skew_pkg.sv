// Shared constants and types of the skew-compensation logic.
//
// A delay code selects one tap of a variable delay line; the two lines of a
// matched pair always receive the same code. The width of the code (6 bits,
// 64 taps) is this design's choice. The scan register carries a command word
// into the compensation logic and a status word out of it; both are packed
// structs of the same width so that one shift register serves both.
`timescale 1ps/1ps
package skew_pkg;

  localparam int unsigned CODE_W = 6;

  typedef logic [CODE_W-1:0] code_t;

  // Command written through the scan chain (update).
  typedef struct packed {
    logic  start;      // begin a calibration run
    logic  manual;     // apply 'code' directly instead of the calibrated one
    code_t code;       // start code of a run, or the manual setting
  } scan_cmd_t;

  // Status read through the scan chain (capture).
  typedef struct packed {
    logic  at_limit;   // the code hit an end of its range
    logic  locked;     // the last run found the phase reversal
    code_t code;       // code in use: the amount of compensation applied
  } scan_status_t;

  localparam int unsigned SCAN_W = $bits(scan_cmd_t);

  // States of the calibration controller.
  typedef enum logic [1:0] {
    CTRL_IDLE  = 2'd0,
    CTRL_TRACK = 2'd1,
    CTRL_DONE  = 2'd2
  } ctrl_state_e;

endpackage
