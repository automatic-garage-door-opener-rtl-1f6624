// garage_door_fsm - the door controller state machine.
//
// One button (press pulse pb) drives the door through a cycle:
//   closed  --pb--> opening --pb--> upPaused   --pb--> closing
//   opened  --pb--> closing --pb--> downPaused --pb--> opening
//   opening --(position reaches MAX_STEPS)--> opened
//   closing --(position reaches 0)---------> closed
// After reset the machine sits one cycle in init (motor off) and then enters
// closed: the door is assumed to be down at power-up. So a press while moving
// stops the door, and the next press sends it the other way.
//
// The door position is a step counter, 0 = closed, MAX_STEPS = open. While
// opening, motor_up is high and the counter goes up by one per clk cycle
// (one motor step per cycle); while closing, motor_down is high and it goes
// down by one. The motor is only driven while the counter is still short of
// its end, so each motor step is counted exactly once and a full travel is
// exactly MAX_STEPS steps (a step ordered in the same cycle as a pause press is
// also counted). Pausing keeps the count, so a reversed door returns to its
// exact end point. Outputs are Moore-style except that they also look at the
// counter.
//
// Follows the original: the seven states and their transitions, a press taking
// priority over the end-of-travel test, the position counter and its 400-step
// travel, the atTop/atBottom flags. This design's own choices: the counter is
// reset and sized to MAX_STEPS, the motor is gated by the counter as described
// above, and a `paused` flag is driven in the two paused states.
//
// Ports: clk (step clock, ~48 Hz), rst_n (asynchronous active-low reset),
//        pb (one-cycle press pulse), motor_up / motor_down (step requests to
//        the stepper sequencer, never both), at_top, at_bottom, paused (status),
//        state (current state), position (door position in steps).
module garage_door_fsm
  import garage_pkg::*;
#(
  parameter int unsigned MAX_STEPS = 400,          // steps from closed to fully open
  localparam int unsigned PW = $clog2(MAX_STEPS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pb,
  output logic          motor_up,
  output logic          motor_down,
  output logic          at_top,
  output logic          at_bottom,
  output logic          paused,
  output door_state_t   state,
  output logic [PW-1:0] position
);

  localparam logic [PW-1:0] TOP = PW'(MAX_STEPS);

  door_state_t   state_next;
  logic [PW-1:0] position_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_INIT;
      position <= '0;
    end else begin
      state    <= state_next;
      position <= position_next;
    end
  end

  always_comb begin
    state_next    = state;
    position_next = position;
    motor_up      = 1'b0;
    motor_down    = 1'b0;
    at_top        = 1'b0;
    at_bottom     = 1'b0;
    paused        = 1'b0;

    unique case (state)
      ST_INIT: begin
        position_next = '0;
        state_next    = ST_CLOSED;
      end

      ST_CLOSED: begin
        at_bottom = 1'b1;
        if (pb) state_next = ST_OPENING;
      end

      ST_OPENING: begin
        if (position != TOP) begin
          motor_up      = 1'b1;
          position_next = position + 1'b1;
        end
        if (pb)                 state_next = ST_UP_PAUSED;
        else if (position == TOP) state_next = ST_OPENED;
      end

      ST_UP_PAUSED: begin
        paused = 1'b1;
        if (pb) state_next = ST_CLOSING;
      end

      ST_OPENED: begin
        at_top = 1'b1;
        if (pb) state_next = ST_CLOSING;
      end

      ST_CLOSING: begin
        if (position != '0) begin
          motor_down    = 1'b1;
          position_next = position - 1'b1;
        end
        if (pb)                 state_next = ST_DOWN_PAUSED;
        else if (position == '0) state_next = ST_CLOSED;
      end

      ST_DOWN_PAUSED: begin
        paused = 1'b1;
        if (pb) state_next = ST_OPENING;
      end

      default: begin
        state_next = ST_INIT;
      end
    endcase
  end

  // The motor is never told to turn both ways, and the position never leaves
  // its range.
  assert property (@(posedge clk) disable iff (!rst_n) !(motor_up && motor_down));
  assert property (@(posedge clk) disable iff (!rst_n) position <= TOP);

endmodule
