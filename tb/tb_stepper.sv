// tb_stepper - self-checking testbench for the stepper sequencer.
//
// Drives random runs of up, down and idle requests and checks out after every
// edge against a reference: the four coil patterns written out below (black
// + yellow, black + orange, orange + brown, brown + yellow), a reference phase
// that moves one entry forward on up and one back on down, and all coils off
// when idle. Also checks the first pattern after reset and that four up steps
// return to the same pattern (one electrical cycle).
module tb_stepper;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       motor_up, motor_down;
  logic [3:0] out;

  int checks = 0;
  int failures = 0;
  int ups = 0, downs = 0, idles = 0;

  localparam logic [3:0] PAT [4] = '{4'h9, 4'h3, 4'h6, 4'hC};

  stepper dut (.clk(clk), .rst_n(rst_n), .motor_up(motor_up),
               .motor_down(motor_down), .out(out));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s (out=%b)", $time, what, out);
    end
  endtask

  initial begin
    int ref_phase;
    motor_up = 1'b0;
    motor_down = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(out == 4'b0000, "coils off in reset");
    @(negedge clk) rst_n = 1'b1;

    // First step up after reset uses the first pattern.
    motor_up = 1'b1;
    @(negedge clk);
    check(out == PAT[0], "first up step drives pattern 0");
    ref_phase = 0;
    // Four more steps return to pattern 0 after passing 1, 2, 3.
    for (int k = 1; k <= 4; k++) begin
      @(negedge clk);
      check(out == PAT[k % 4], "clockwise order 0,1,2,3,0");
    end
    ref_phase = 0;

    for (int r = 0; r < 400; r++) begin
      int sel, len;
      sel = $urandom % 3;
      len = 1 + ($urandom % 7);
      motor_up   = (sel == 0);
      motor_down = (sel == 1);
      repeat (len) begin
        @(negedge clk);
        if (sel == 0) begin
          ref_phase = (ref_phase + 1) % 4;
          check(out == PAT[ref_phase], "up step pattern");
          ups++;
        end else if (sel == 1) begin
          ref_phase = (ref_phase + 3) % 4;
          check(out == PAT[ref_phase], "down step pattern");
          downs++;
        end else begin
          check(out == 4'b0000, "coils off when idle");
          idles++;
        end
      end
    end
    check(ups > 0 && downs > 0 && idles > 0, "all request kinds exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
