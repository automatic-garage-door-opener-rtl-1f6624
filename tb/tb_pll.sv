// tb_pll - self-checking testbench for the PLL model at its default ratio
// (50 MHz in, 2 kHz out: 25000 input cycles per output cycle).
//
// Measures, in input cycles and in simulated time, each high and low phase of
// c0 over several output periods.
module tb_pll;

  logic inclk0 = 1'b0;
  logic c0;

  int checks = 0;
  int failures = 0;

  pll dut (.inclk0(inclk0), .c0(c0));

  always #10ns inclk0 = ~inclk0;   // 50 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    int n;
    logic prev;
    realtime t0, t1;
    #1ns;
    check(c0 == 1'b0, "output starts low");
    prev = c0;
    t0 = 0;
    for (int h = 0; h < 8; h++) begin
      n = 0;
      do begin
        @(posedge inclk0);
        n++;
        #1ns;
      end while (c0 == prev && n < 40000);
      t1 = $realtime;
      check(n == 12500, $sformatf("half period %0d is %0d input cycles", h, n));
      if (h > 0)
        check(t1 - t0 > 249.9us && t1 - t0 < 250.1us, "half period lasts 250 us (2 kHz)");
      t0 = t1;
      prev = c0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge inclk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
