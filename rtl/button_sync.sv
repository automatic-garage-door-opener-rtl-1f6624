// button_sync - push-button synchroniser and rising-edge detector.
//
// The active-low request pb_n is inverted and passed through a two-flop
// synchroniser (a, b); a third flop (c) remembers the previous synchronised
// level. pb_pulse is high for exactly one clk cycle after each press, however
// long the button is held, so a held button moves the door state machine by
// one state only. A press is seen two clk edges after it reaches pb_n
// (pb_pulse rises after the second edge) and must last at least one clk period.
//
// Three flops, inversion of the active-low input and the b & ~c edge detect
// follow the original design. The asynchronous active-low reset rst_n is this
// design's addition: it clears the chain so no false pulse appears after reset.
//
// Ports: clk (step clock), rst_n, pb_n (request, low = pressed),
//        pb_pulse (one-cycle press pulse).
module button_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic pb_n,
  output logic pb_pulse
);

  logic a, b, c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= 1'b0;
      b <= 1'b0;
      c <= 1'b0;
    end else begin
      a <= ~pb_n;
      b <= a;
      c <= b;
    end
  end

  assign pb_pulse = b & ~c;

endmodule
