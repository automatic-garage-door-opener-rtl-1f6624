// tb_garage_door_fsm - self-checking testbench for the door state machine,
// with a short door travel (MAX_STEPS = 10) to keep the run short.
//
// A reference model kept in the testbench (door mode, position in steps)
// predicts motor_up, motor_down, the three flags, the state and the position
// every cycle while random press pulses arrive. Directed sequences then check
// the timing of a full opening and a full closing (exactly MAX_STEPS motor
// steps, end state reached MAX_STEPS + 1 cycles after the press was taken),
// a pause and reversal, and that every transition of the state diagram was
// taken at least once.
module tb_garage_door_fsm;
  import garage_pkg::*;

  localparam int unsigned MAX = 10;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        pb;
  logic        motor_up, motor_down, at_top, at_bottom, paused;
  door_state_t state;
  logic [3:0]  position;

  int checks = 0;
  int failures = 0;

  // Reference model.
  door_state_t m_state;
  int          m_pos;
  int          taken [7][7];   // transition counts, [from][to]

  garage_door_fsm #(.MAX_STEPS(MAX)) dut (
    .clk(clk), .rst_n(rst_n), .pb(pb), .motor_up(motor_up),
    .motor_down(motor_down), .at_top(at_top), .at_bottom(at_bottom),
    .paused(paused), .state(state), .position(position));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s (state=%s pos=%0d)", $time, what, state.name(), position);
    end
  endtask

  // Compare outputs against the model, then advance the model by one edge.
  task automatic compare_and_step();
    bit e_up, e_down;
    door_state_t nxt;
    e_up   = (m_state == ST_OPENING) && (m_pos < MAX);
    e_down = (m_state == ST_CLOSING) && (m_pos > 0);
    check(state == m_state, "state");
    check(int'(position) == m_pos, "position");
    check(motor_up == e_up && motor_down == e_down, "motor requests");
    check(at_top == (m_state == ST_OPENED), "at_top");
    check(at_bottom == (m_state == ST_CLOSED), "at_bottom");
    check(paused == (m_state inside {ST_UP_PAUSED, ST_DOWN_PAUSED}), "paused");
    nxt = m_state;
    case (m_state)
      ST_INIT:        nxt = ST_CLOSED;
      ST_CLOSED:      if (pb) nxt = ST_OPENING;
      ST_OPENED:      if (pb) nxt = ST_CLOSING;
      ST_UP_PAUSED:   if (pb) nxt = ST_CLOSING;
      ST_DOWN_PAUSED: if (pb) nxt = ST_OPENING;
      ST_OPENING:     if (pb) nxt = ST_UP_PAUSED;   else if (m_pos == MAX) nxt = ST_OPENED;
      ST_CLOSING:     if (pb) nxt = ST_DOWN_PAUSED; else if (m_pos == 0)   nxt = ST_CLOSED;
      default: ;
    endcase
    if (e_up)   m_pos++;
    if (e_down) m_pos--;
    if (nxt != m_state) taken[m_state][nxt]++;
    m_state = nxt;
  endtask

  // One cycle with press level p: drive at negedge, check and step at posedge.
  task automatic cycle(input bit p);
    pb = p;
    @(posedge clk);
    compare_and_step();
    @(negedge clk);
  endtask

  // Cycles until the state equals s, at most limit.
  task automatic run_until(input door_state_t s, input int limit, output int n, output int steps);
    n = 0;
    steps = 0;
    while (state != s && n < limit) begin
      if (motor_up || motor_down) steps++;
      cycle(1'b0);
      n++;
    end
  endtask

  initial begin
    int n, steps;
    pb = 1'b0;
    rst_n = 1'b0;
    m_state = ST_INIT;
    m_pos = 0;
    foreach (taken[i, j]) taken[i][j] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // init -> closed after one cycle.
    check(state == ST_INIT && !motor_up && !motor_down, "init after reset, motor off");
    cycle(1'b0);
    check(state == ST_CLOSED && at_bottom, "closed after init");

    // Full opening: press, then MAX steps, end state after MAX+1 cycles.
    cycle(1'b1);
    run_until(ST_OPENED, 100, n, steps);
    check(n == MAX + 1, $sformatf("full opening takes MAX+1 cycles (%0d)", n));
    check(steps == MAX, $sformatf("full opening is MAX motor steps (%0d)", steps));
    check(at_top && int'(position) == MAX, "open at top");
    repeat (5) cycle(1'b0);
    check(state == ST_OPENED, "stays open without a press");

    // Full closing.
    cycle(1'b1);
    run_until(ST_CLOSED, 100, n, steps);
    check(n == MAX + 1, $sformatf("full closing takes MAX+1 cycles (%0d)", n));
    check(steps == MAX, $sformatf("full closing is MAX motor steps (%0d)", steps));

    // Pause on the way up and reverse.
    cycle(1'b1);
    repeat (4) cycle(1'b0);
    cycle(1'b1);
    check(state == ST_UP_PAUSED && paused, "paused going up");
    repeat (3) cycle(1'b0);
    check(state == ST_UP_PAUSED && !motor_up && !motor_down, "motor off while paused");
    cycle(1'b1);
    check(state == ST_CLOSING, "reverses to closing");
    repeat (2) cycle(1'b0);
    cycle(1'b1);
    check(state == ST_DOWN_PAUSED, "paused going down");
    cycle(1'b1);
    check(state == ST_OPENING, "reverses to opening");

    // Random presses.
    for (int k = 0; k < 3000; k++) cycle(($urandom % 8) == 0);

    // Asynchronous reset in mid-travel.
    while (state != ST_OPENING) cycle(($urandom % 8) == 0);
    #2 rst_n = 1'b0;
    #1 check(state == ST_INIT && position == '0, "asynchronous reset");
    @(negedge clk) rst_n = 1'b1;

    // Every arc of the state diagram was taken.
    check(taken[ST_CLOSED][ST_OPENING] > 0,      "arc closed->opening");
    check(taken[ST_OPENING][ST_UP_PAUSED] > 0,   "arc opening->upPaused");
    check(taken[ST_OPENING][ST_OPENED] > 0,      "arc opening->opened");
    check(taken[ST_UP_PAUSED][ST_CLOSING] > 0,   "arc upPaused->closing");
    check(taken[ST_OPENED][ST_CLOSING] > 0,      "arc opened->closing");
    check(taken[ST_CLOSING][ST_DOWN_PAUSED] > 0, "arc closing->downPaused");
    check(taken[ST_CLOSING][ST_CLOSED] > 0,      "arc closing->closed");
    check(taken[ST_DOWN_PAUSED][ST_OPENING] > 0, "arc downPaused->opening");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
