// tb_clk_divider - self-checking testbench for clk_divider at its default
// ratio (42: 2 kHz in, 47.6 Hz out).
//
// Checks that the output stays low during reset, that the first rise comes
// 21 input cycles after reset is released, and that every later half period
// is exactly 21 input cycles (50 % duty, period 42).
module tb_clk_divider;

  localparam int unsigned DIVIDE = 42;

  logic inclk = 1'b0;
  logic rst_n;
  logic clk_out;

  int checks = 0;
  int failures = 0;

  clk_divider dut (.inclk(inclk), .rst_n(rst_n), .clk_out(clk_out));

  always #5 inclk = ~inclk;

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
    rst_n = 1'b0;
    repeat (50) begin
      @(negedge inclk);
      check(clk_out == 1'b0, "output low during reset");
    end
    rst_n = 1'b1;
    // Count input edges until each toggle.
    prev = clk_out;
    for (int h = 0; h < 20; h++) begin
      n = 0;
      do begin
        @(posedge inclk);
        n++;
        #1;
      end while (clk_out == prev && n < 200);
      check(n == DIVIDE / 2, $sformatf("half period %0d is %0d input cycles", h, n));
      check(clk_out == ~prev, "output toggled");
      prev = clk_out;
    end
    // Reset in mid-period forces the output low.
    @(negedge inclk) rst_n = 1'b0;
    @(posedge inclk) #1;
    check(clk_out == 1'b0, "reset drives output low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge inclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
