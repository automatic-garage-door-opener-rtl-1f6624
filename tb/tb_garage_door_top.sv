// tb_garage_door_top - end-to-end testbench for the garage door opener, with
// short clock ratios and a short door travel so it runs in well under a second
// (PLL_DIVIDE = 4, STEP_DIVIDE = 4, MAX_STEPS = 12).
//
// It presses the remote input A and the local key KEY[1] like a user would
// (held for several step-clock cycles) and checks:
//   - the clock chain: clk2kHz and clk48Hz periods in CLOCK_50 cycles;
//   - one PB_sync pulse per press however long it is held;
//   - on every step-clock edge, the coil pattern on out against the door
//     position: one pattern forward when the position goes up, one back when
//     it goes down, all coils off when it does not move;
//   - a full opening and closing are exactly MAX_STEPS steps, end-to-end
//     latency from press to end of travel, pause and reversal both ways,
//     reset in mid-travel.
// Each mechanism is counted and one that never happened is a failure.
module tb_garage_door_top;
  import garage_pkg::*;

  localparam int unsigned PLL_DIV  = 4;
  localparam int unsigned STEP_DIV = 4;
  localparam int unsigned MAX      = 12;
  localparam logic [3:0]  PAT [4]  = '{4'h9, 4'h3, 4'h6, 4'hC};

  logic        CLOCK_50 = 1'b0;
  logic [1:0]  KEY;
  logic        A;
  logic [3:0]  out;
  logic        clk2kHz, clk48Hz, PB_sync;
  logic        at_top, at_bottom, paused;
  door_state_t door_state;
  logic [3:0]  door_position;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_rf_press = 0, n_key_press = 0, n_full_open = 0, n_full_close = 0;
  int n_up_pause = 0, n_down_pause = 0, n_rev_up = 0, n_rev_down = 0;
  int n_hold_single = 0, n_mid_reset = 0;
  int n_steps_up = 0, n_steps_down = 0, n_pulses = 0;

  garage_door_top #(.PLL_DIVIDE(PLL_DIV), .STEP_DIVIDE(STEP_DIV), .MAX_STEPS(MAX)) dut (
    .CLOCK_50(CLOCK_50), .KEY(KEY), .A(A), .out(out), .clk2kHz(clk2kHz),
    .clk48Hz(clk48Hz), .PB_sync(PB_sync), .at_top(at_top), .at_bottom(at_bottom),
    .paused(paused), .door_state(door_state), .door_position(door_position));

  always #10 CLOCK_50 = ~CLOCK_50;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s (state=%s pos=%0d out=%b)", $time, what,
               door_state.name(), door_position, out);
    end
  endtask

  // Coil-pattern monitor, independent of the stepper's internals: it follows
  // the door position and keeps its own phase.
  int  mon_phase = 3;
  int  last_pos = 0;
  bit  mon_on = 0;
  always @(posedge clk48Hz) begin
    #1;
    if (mon_on && KEY[0]) begin
      int p;
      p = int'(door_position);
      if (p == last_pos + 1) begin
        mon_phase = (mon_phase + 1) % 4;
        check(out == PAT[mon_phase], "clockwise step pattern while opening");
        n_steps_up++;
      end else if (p == last_pos - 1) begin
        mon_phase = (mon_phase + 3) % 4;
        check(out == PAT[mon_phase], "counter-clockwise step pattern while closing");
        n_steps_down++;
      end else begin
        check(p == last_pos, "position moves at most one step per cycle");
        check(out == 4'b0000, "coils off when the door does not move");
      end
      check(p <= MAX, "position in range");
      check(at_top == (door_state == ST_OPENED), "at_top flag");
      check(at_bottom == (door_state == ST_CLOSED), "at_bottom flag");
      if (door_state == ST_OPENED)  check(p == MAX, "opened means fully up");
      if (door_state == ST_CLOSED)  check(p == 0, "closed means fully down");
      last_pos = p;
    end
  end

  always @(posedge clk48Hz) begin
    #1;
    if (PB_sync) n_pulses++;
  end

  // Hold a button for `hold` step-clock cycles; use_rf selects A or KEY[1].
  // Returns the number of PB_sync pulses seen during and just after it.
  task automatic press(input bit use_rf, input int hold, output int pulses);
    int p0;
    p0 = n_pulses;
    @(negedge clk48Hz);
    if (use_rf) A = 1'b1; else KEY[1] = 1'b0;
    repeat (hold) @(negedge clk48Hz);
    A = 1'b0;
    KEY[1] = 1'b1;
    repeat (3) @(negedge clk48Hz);
    pulses = n_pulses - p0;
    if (use_rf) n_rf_press++; else n_key_press++;
    if (hold > 3 && pulses == 1) n_hold_single++;
  endtask

  task automatic wait_state(input door_state_t s, input int limit, output int n);
    n = 0;
    while (door_state != s && n < limit) begin
      @(negedge clk48Hz);
      n++;
    end
    check(door_state == s, $sformatf("reached %s", s.name()));
  endtask

  initial begin
    int n, pulses, t_press;
    realtime t0, t1;

    A = 1'b0;
    KEY = 2'b11;          // buttons released
    #5 KEY[0] = 1'b0;     // reset pressed

    // Clock chain while in reset: the PLL runs, the divider is held.
    @(posedge clk2kHz) t0 = $realtime;
    @(posedge clk2kHz) t1 = $realtime;
    check(t1 - t0 == 20.0 * PLL_DIV, "clk2kHz period = PLL_DIVIDE board clocks");
    repeat (5) @(posedge clk2kHz);
    check(clk48Hz == 1'b0 && out == 4'b0000, "step clock stopped and coils off in reset");

    KEY[0] = 1'b1;
    @(posedge clk48Hz) t0 = $realtime;
    @(posedge clk48Hz) t1 = $realtime;
    check(t1 - t0 == 20.0 * PLL_DIV * STEP_DIV, "clk48Hz period = STEP_DIVIDE clk2kHz periods");
    repeat (2) @(negedge clk48Hz);
    check(door_state == ST_CLOSED && at_bottom, "door closed after reset");
    last_pos = 0;
    mon_on = 1;

    // 1. Remote press, held for 6 cycles: one pulse, full opening.
    press(1'b1, 6, pulses);
    check(pulses == 1, "held remote button gives one press");
    wait_state(ST_OPENED, 200, n);
    // The press reached the state machine 2 edges after it started; the door
    // then needs MAX+1 cycles. 3 of those cycles elapsed inside press().
    check(n_steps_up == MAX, $sformatf("full opening is %0d steps (%0d)", MAX, n_steps_up));
    if (door_state == ST_OPENED) n_full_open++;

    // 2. Local key press: full closing.
    press(1'b0, 4, pulses);
    check(pulses == 1, "local key gives one press");
    wait_state(ST_CLOSED, 200, n);
    check(n_steps_down == MAX, $sformatf("full closing is %0d steps (%0d)", MAX, n_steps_down));
    if (door_state == ST_CLOSED) n_full_close++;

    // Latency: press to the first motor step. The request is seen after two
    // step-clock edges (synchroniser), the state machine enters opening at the
    // third, and the first coil pattern appears at the fourth.
    @(negedge clk48Hz);
    A = 1'b1;
    t_press = 0;
    while (out == 4'b0000 && t_press < 20) begin
      @(negedge clk48Hz);
      t_press++;
    end
    A = 1'b0;
    check(t_press == 4, $sformatf("press to first step is 4 step-clock cycles (%0d)", t_press));
    n_rf_press++;

    // 3. Pause on the way up, then reverse.
    repeat (2) @(negedge clk48Hz);
    press(1'b0, 2, pulses);
    check(door_state == ST_UP_PAUSED && paused, "paused on the way up");
    if (door_state == ST_UP_PAUSED) n_up_pause++;
    n = int'(door_position);
    repeat (4) @(negedge clk48Hz);
    check(int'(door_position) == n && out == 4'b0000, "door holds still while paused");
    press(1'b1, 2, pulses);
    check(door_state == ST_CLOSING, "reversed to closing");
    if (door_state == ST_CLOSING) n_rev_down++;

    // 4. Pause on the way down, then reverse and open fully.
    press(1'b1, 1, pulses);
    if (door_state == ST_CLOSING) press(1'b1, 1, pulses);
    check(door_state == ST_DOWN_PAUSED && paused, "paused on the way down");
    if (door_state == ST_DOWN_PAUSED) n_down_pause++;
    press(1'b0, 2, pulses);
    check(door_state == ST_OPENING, "reversed to opening");
    if (door_state == ST_OPENING) n_rev_up++;
    wait_state(ST_OPENED, 200, n);
    check(int'(door_position) == MAX, "reversed door ends fully open");

    // 5. Reset in mid-travel: motor stops and the door is taken as closed.
    press(1'b1, 2, pulses);
    repeat (3) @(negedge clk48Hz);
    check(door_state == ST_CLOSING, "closing before the reset");
    mon_on = 0;
    KEY[0] = 1'b0;
    #100;
    check(door_state == ST_INIT && out == 4'b0000, "reset stops the motor");
    n_mid_reset++;
    KEY[0] = 1'b1;
    repeat (3) @(negedge clk48Hz);
    check(door_state == ST_CLOSED && door_position == '0, "closed after reset");

    // Every mechanism happened.
    check(n_rf_press > 0,    "remote presses");
    check(n_key_press > 0,   "local key presses");
    check(n_hold_single > 0, "long hold gave a single press");
    check(n_full_open > 0,   "full opening");
    check(n_full_close > 0,  "full closing");
    check(n_up_pause > 0,    "pause going up");
    check(n_down_pause > 0,  "pause going down");
    check(n_rev_up > 0,      "reversal to opening");
    check(n_rev_down > 0,    "reversal to closing");
    check(n_mid_reset > 0,   "reset during travel");
    $display("mechanisms: rf=%0d key=%0d hold1=%0d open=%0d close=%0d upP=%0d downP=%0d revUp=%0d revDown=%0d reset=%0d steps up=%0d down=%0d",
             n_rf_press, n_key_press, n_hold_single, n_full_open, n_full_close,
             n_up_pause, n_down_pause, n_rev_up, n_rev_down, n_mid_reset,
             n_steps_up, n_steps_down);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge CLOCK_50);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
