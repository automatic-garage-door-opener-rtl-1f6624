// clk_divider - divides the 2 kHz PLL clock down to the stepper's step clock.
//
// A counter runs from 0 to HALF_PERIOD-1 on every rising edge of inclk; when
// it wraps, clk_out toggles. clk_out therefore has a period of
// 2*HALF_PERIOD inclk cycles and a 50 % duty cycle. The default DIVIDE = 42
// is the nearest even integer to the required ratio 2000 Hz / 48 Hz = 41.66,
// giving 2000/42 = 47.6 Hz, about 60 RPM on a 48-step-per-revolution motor.
// (The original implementation used a half period of 24, which is the 48 of
// the step rate rather than the 41.66 ratio, and comes out at 40 Hz; this
// design follows the ratio.)
//
// The active-low reset rst_n is sampled on inclk (synchronous, as in the
// original); while it is low the counter is cleared and clk_out is held low,
// so the whole step-clock domain stops during reset.
//
// Ports: inclk (input clock), rst_n (active-low reset),
//        clk_out (divided clock, DIVIDE inclk cycles per period).
module clk_divider #(
  parameter int unsigned DIVIDE = 42   // inclk cycles per clk_out period, even, >= 2
) (
  input  logic inclk,
  input  logic rst_n,
  output logic clk_out
);

  localparam int unsigned HALF_PERIOD = DIVIDE / 2;
  localparam int unsigned CW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge inclk) begin
    if (!rst_n) begin
      count   <= '0;
      clk_out <= 1'b0;
    end else if (count == CW'(HALF_PERIOD - 1)) begin
      count   <= '0;
      clk_out <= ~clk_out;
    end else begin
      count   <= count + 1'b1;
    end
  end

  initial begin
    assert (DIVIDE >= 2 && DIVIDE % 2 == 0)
      else $error("clk_divider: DIVIDE must be even and at least 2");
  end

endmodule
