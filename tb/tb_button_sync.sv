// tb_button_sync - self-checking testbench for button_sync.
//
// Drives a random active-low button level (runs of 1 to 6 cycles) and checks
// pb_pulse every cycle against a reference built from the history of sampled
// levels: a pulse is due exactly when the button was pressed two edges ago and
// released three edges ago. Also checks that reset clears the chain and that
// a button held for many cycles gives a single pulse.
module tb_button_sync;

  logic clk = 1'b0;
  logic rst_n;
  logic pb_n;
  logic pb_pulse;

  int checks = 0;
  int failures = 0;
  int pulses = 0;

  bit hist [0:3];   // hist[k] = pressed level sampled k edges ago

  button_sync dut (.clk(clk), .rst_n(rst_n), .pb_n(pb_n), .pb_pulse(pb_pulse));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Reference: hist[1] = a's source two edges ago = b, hist[2] = c.
  always @(posedge clk) begin
    if (rst_n) begin
      hist[3] <= hist[2];
      hist[2] <= hist[1];
      hist[1] <= hist[0];
      hist[0] <= ~pb_n;
    end
  end

  initial begin
    pb_n = 1'b1;
    rst_n = 1'b0;
    for (int k = 0; k < 4; k++) hist[k] = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(pb_pulse == 1'b0, "no pulse during reset");
    // Press during reset must not leak out.
    pb_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(pb_pulse == 1'b0, "no pulse while reset held with button down");
    pb_n = 1'b1;
    @(negedge clk) rst_n = 1'b1;

    // Random button activity.
    for (int r = 0; r < 300; r++) begin
      int len;
      len = 1 + ($urandom % 6);
      pb_n = $urandom % 2;
      repeat (len) begin
        @(negedge clk);
        check(pb_pulse == (hist[1] & ~hist[2]), "pulse matches reference");
        if (pb_pulse) pulses++;
      end
    end

    // Long hold: exactly one pulse.
    pb_n = 1'b1;
    repeat (5) @(negedge clk);
    begin
      int n;
      int first;
      n = 0;
      first = -1;
      pb_n = 1'b0;
      for (int c = 0; c < 40; c++) begin
        @(negedge clk);
        if (pb_pulse) begin
          n++;
          if (first < 0) first = c;
        end
      end
      check(n == 1, "long hold gives one pulse");
      // Pressed before edge 0; edges 0 and 1 move it through a and b: pulse
      // is visible after edge 1, i.e. at the second negedge (index 1).
      check(first == 1, "pulse two clock edges after the press");
    end
    check(pulses > 20, "random run produced pulses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
