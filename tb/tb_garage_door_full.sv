// tb_garage_door_full - the garage door opener at its real sizes: 50 MHz
// board clock, PLL divide 25000 (2 kHz), step divider 42 (47.6 Hz), 400-step
// door travel. One complete operation: reset, a remote press held for a
// quarter of a second and a full opening of the door. (The closing direction
// is the mirror image and is covered by the reduced-size end-to-end test; at
// full size each direction costs about four minutes of simulation.)
//
// Checks the step-clock period in real time (21 ms), exactly 400 steps with
// the coil patterns in clockwise order, and the travel time: the top is
// reached 400 step-clock cycles (8.4 s) after the first step.
module tb_garage_door_full;
  import garage_pkg::*;

  localparam logic [3:0] PAT [4] = '{4'h9, 4'h3, 4'h6, 4'hC};
  localparam int unsigned MAX = 400;
  localparam realtime T_STEP = 20ns * 25000 * 42;    // 21 ms

  logic        CLOCK_50 = 1'b0;
  logic [1:0]  KEY;
  logic        A;
  logic [3:0]  out;
  logic        clk2kHz, clk48Hz, PB_sync;
  logic        at_top, at_bottom, paused;
  door_state_t door_state;
  logic [8:0]  door_position;

  int checks = 0;
  int failures = 0;
  int steps_up = 0, steps_down = 0;
  realtime t_first_step = 0;

  garage_door_top dut (
    .CLOCK_50(CLOCK_50), .KEY(KEY), .A(A), .out(out), .clk2kHz(clk2kHz),
    .clk48Hz(clk48Hz), .PB_sync(PB_sync), .at_top(at_top), .at_bottom(at_bottom),
    .paused(paused), .door_state(door_state), .door_position(door_position));

  always #10ns CLOCK_50 = ~CLOCK_50;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s (state=%s pos=%0d out=%b)", $time, what,
               door_state.name(), door_position, out);
    end
  endtask

  // Coil monitor: every change of the door position must come with the next
  // (opening) or previous (closing) coil pattern.
  int phase = 3;
  int last_pos = 0;
  bit mon_on = 0;
  always @(posedge clk48Hz) begin
    #1ns;
    if (mon_on) begin
      if (int'(door_position) == last_pos + 1) begin
        phase = (phase + 1) % 4;
        check(out == PAT[phase], "clockwise pattern");
        if (steps_up == 0) t_first_step = $realtime;
        steps_up++;
      end else if (int'(door_position) == last_pos - 1) begin
        phase = (phase + 3) % 4;
        check(out == PAT[phase], "counter-clockwise pattern");
        steps_down++;
      end else begin
        check(out == 4'b0000, "coils off when not moving");
      end
      last_pos = int'(door_position);
    end
  end

  initial begin
    realtime t0, t1;
    A = 1'b0;
    KEY = 2'b11;
    #5ns KEY[0] = 1'b0;
    #1ms KEY[0] = 1'b1;

    @(posedge clk48Hz) t0 = $realtime;
    @(posedge clk48Hz) t1 = $realtime;
    check(t1 - t0 == T_STEP, "step clock period is 21 ms");
    @(negedge clk48Hz);
    check(door_state == ST_CLOSED, "closed after reset");
    mon_on = 1;

    // Remote press, held 12 step cycles (about 0.25 s).
    A = 1'b1;
    repeat (12) @(negedge clk48Hz);
    A = 1'b0;
    wait (door_state == ST_OPENED);
    t1 = $realtime;
    check(steps_up == MAX, $sformatf("opening took %0d steps", steps_up));
    check(steps_down == 0, "no step backwards");
    check(t1 - (t_first_step - 1ns) == MAX * T_STEP,
          $sformatf("top reached %0t after the first step", t1 - (t_first_step - 1ns)));
    check(at_top && door_position == 9'(MAX), "door at top");
    repeat (3) @(negedge clk48Hz);
    check(door_state == ST_OPENED && out == 4'b0000, "door stays open, coils off");
    $display("opening: %0d steps in %0t", steps_up, t1 - (t_first_step - 1ns));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #15s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
