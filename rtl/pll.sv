// pll - behavioural model of the FPGA's clock PLL (not the PLL circuit itself).
//
// On the board an analog PLL macro of the FPGA makes the 2 kHz system clock
// c0 from the 50 MHz board clock inclk0, configured to multiply by 1 and
// divide by 25000 with a 50 % duty cycle. This model reproduces only that
// output frequency and duty cycle: it counts rising edges of inclk0 and
// toggles c0 every DIVIDE_BY/2 of them, so c0 is phase-aligned to inclk0 and
// has no lock time, jitter or locked output. Only MULTIPLY_BY = 1 is modelled.
// c0 and the edge counter start at zero through declaration initialisers
// (the real PLL has no reset input in this configuration). The model is written as plain logic so that it simulates in
// any tool; it is not meant to be synthesised in place of the PLL.
//
// Ports (as on the PLL): inclk0 (reference clock), c0 (output clock).
module pll #(
  parameter int unsigned MULTIPLY_BY = 1,
  parameter int unsigned DIVIDE_BY   = 25000   // even
) (
  input  logic inclk0,
  output logic c0 = 1'b0
);

  localparam int unsigned HALF = DIVIDE_BY / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] count = '0;

  always_ff @(posedge inclk0) begin
    if (count == CW'(HALF - 1)) begin
      count <= '0;
      c0    <= ~c0;
    end else begin
      count <= count + 1'b1;
    end
  end

  initial begin
    assert (MULTIPLY_BY == 1 && DIVIDE_BY >= 2 && DIVIDE_BY % 2 == 0)
      else $error("pll model: only MULTIPLY_BY = 1 and an even DIVIDE_BY are modelled");
  end

endmodule
