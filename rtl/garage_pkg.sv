// garage_pkg - types and constants shared by the garage door opener.
//
// door_state_t is the door controller's state encoding (one state per door
// condition: closed, opening, paused on the way up, open, closing, paused on
// the way down, plus an init state after reset). The state names follow the
// original design; the binary encoding is this design's choice.
//
// STEP_TABLE is the full-step excitation sequence of the 4-wire bipolar
// stepper. Walking it from entry 0 to entry 3 turns the motor clockwise
// (door opening); walking it from 3 down to 0 turns it counter-clockwise
// (door closing). Bit i of an entry drives motor lead i:
//   bit 0 black (terminal 1), bit 1 orange (terminal 3),
//   bit 2 brown (terminal 2), bit 3 yellow (terminal 4).
package garage_pkg;

  typedef enum logic [2:0] {
    ST_INIT        = 3'd0,
    ST_CLOSED      = 3'd1,
    ST_OPENING     = 3'd2,
    ST_UP_PAUSED   = 3'd3,
    ST_OPENED      = 3'd4,
    ST_CLOSING     = 3'd5,
    ST_DOWN_PAUSED = 3'd6
  } door_state_t;

  localparam int unsigned NUM_PHASES = 4;

  typedef logic [3:0] coil_t;

  localparam coil_t STEP_TABLE [NUM_PHASES] = '{
    4'b1001,   // phase 0: black + yellow
    4'b0011,   // phase 1: black + orange
    4'b0110,   // phase 2: orange + brown
    4'b1100    // phase 3: brown + yellow
  };

endpackage
