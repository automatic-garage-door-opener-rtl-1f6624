// garage_door_top - FPGA top level of the RF garage door opener.
//
// A remote control sends one button press over a simplex RF link; the
// receiver's decoder raises A while the remote button is held. The board's own
// push button KEY[1] (active low) does the same job locally, and KEY[0]
// (active low) is the reset. Each press moves the door state machine one step
// through closed -> opening -> paused -> closing -> ... and the stepper
// sequencer turns the door motor one full step per step-clock cycle.
//
// Clocking: the 50 MHz board clock CLOCK_50 goes through the PLL
// (divide by PLL_DIVIDE = 25000) to clk2kHz, and clk_divider divides that by
// STEP_DIVIDE = 42 to clk48Hz (47.6 Hz, about 60 RPM for a 48-step motor).
// Everything else runs on clk48Hz: a full door travel of MAX_STEPS = 400 steps
// takes 400 step-clock cycles, about 8.4 s. A press is seen two step-clock
// edges after it arrives and moves the motor from the cycle after that.
//
// Follows the original: the block structure and wiring, the clock plan and
// the outputs out, clk48Hz, clk2kHz and PB_sync. This design's own choices:
// the RF input A (active high) and KEY[1] (active low) are ORed into one
// request, KEY[0] also resets the button synchroniser and the stepper, and
// the door status flags and position are brought out as extra outputs.
//
// KEY[0] is used as an asynchronous reset by the button synchroniser, the
// state machine and the stepper (their clock is stopped while clk_divider is
// held in reset, so only an asynchronous reset can reach them), and as a
// synchronous reset by clk_divider, which keeps running on clk2kHz. Lint
// tools report this mixed use of one net; it is intended.
//
// Ports: CLOCK_50, KEY[1:0], A in; out[3:0] (coil drive to the half-H
// drivers), clk2kHz, clk48Hz, PB_sync (one-cycle press pulse), at_top,
// at_bottom, paused, door_state, door_position out.
module garage_door_top
  import garage_pkg::*;
#(
  parameter int unsigned PLL_DIVIDE  = 25000,  // CLOCK_50 cycles per clk2kHz cycle
  parameter int unsigned STEP_DIVIDE = 42,     // clk2kHz cycles per clk48Hz cycle
  parameter int unsigned MAX_STEPS   = 400,    // motor steps for a full door travel
  localparam int unsigned PW = $clog2(MAX_STEPS + 1)
) (
  input  logic          CLOCK_50,
  input  logic [1:0]    KEY,
  input  logic          A,
  output logic [3:0]    out,
  output logic          clk2kHz,
  output logic          clk48Hz,
  output logic          PB_sync,
  output logic          at_top,
  output logic          at_bottom,
  output logic          paused,
  output door_state_t   door_state,
  output logic [PW-1:0] door_position
);

  logic rst_n;
  logic press_n;
  logic motor_up, motor_down;

  assign rst_n   = KEY[0];
  assign press_n = KEY[1] & ~A;     // low while either button is pressed

  pll #(.MULTIPLY_BY(1), .DIVIDE_BY(PLL_DIVIDE)) pll0 (
    .inclk0 (CLOCK_50),
    .c0     (clk2kHz)
  );

  clk_divider #(.DIVIDE(STEP_DIVIDE)) clk_divider_0 (
    .inclk   (clk2kHz),
    .rst_n   (rst_n),
    .clk_out (clk48Hz)
  );

  button_sync button_0 (
    .clk      (clk48Hz),
    .rst_n    (rst_n),
    .pb_n     (press_n),
    .pb_pulse (PB_sync)
  );

  garage_door_fsm #(.MAX_STEPS(MAX_STEPS)) garage_door_fsm_0 (
    .clk        (clk48Hz),
    .rst_n      (rst_n),
    .pb         (PB_sync),
    .motor_up   (motor_up),
    .motor_down (motor_down),
    .at_top     (at_top),
    .at_bottom  (at_bottom),
    .paused     (paused),
    .state      (door_state),
    .position   (door_position)
  );

  stepper stepper_0 (
    .clk        (clk48Hz),
    .rst_n      (rst_n),
    .motor_up   (motor_up),
    .motor_down (motor_down),
    .out        (out)
  );

endmodule
