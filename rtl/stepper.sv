// stepper - full-step sequencer for a 4-wire bipolar stepper motor.
//
// A 2-bit phase index points into the 4-entry excitation table
// (garage_pkg::STEP_TABLE). On each clk edge with motor_up the index
// advances by one (table order 0,1,2,3,0,...: clockwise, door opening); with
// motor_down it goes back by one (3,2,1,0,3,...: counter-clockwise, door
// closing). The coil pattern of the new phase is registered onto out, so a
// step request in cycle n changes out at the end of cycle n: one clk of latency,
// one motor step per clk cycle (48 steps per revolution, 60 RPM at 48 Hz).
// With neither request all coils are switched off (out = 0) and the phase is
// kept, so the next move continues the sequence without a skipped or repeated
// phase.
//
// Follows the original: the table contents and order, the direction rule and
// the registered 4-bit output. This design's own choices: the phase index
// moves to a neighbour phase on a reversal (the original stepped one further
// before reversing), outputs 0 when idle, and has an asynchronous active-low
// reset (out = 0; the phase is set to 3 so that the first step up after
// reset drives table entry 0, as the original did). motor_up wins if both requests are high.
//
// Ports: clk (step clock), rst_n, motor_up, motor_down,
//        out[3:0] (coil drive to the half-H drivers, bit meaning in garage_pkg).
module stepper
  import garage_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  motor_up,
  input  logic  motor_down,
  output coil_t out
);

  logic [1:0] phase, phase_next;

  always_comb begin
    phase_next = phase;
    if (motor_up)        phase_next = phase + 2'd1;
    else if (motor_down) phase_next = phase - 2'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 2'd3;
      out   <= '0;
    end else begin
      phase <= phase_next;
      out   <= (motor_up || motor_down) ? STEP_TABLE[phase_next] : '0;
    end
  end

endmodule
