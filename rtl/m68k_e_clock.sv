// m68k_e_clock -- E clock for 6800-style synchronous peripherals.
//
// A free-running divider: E is low for LOW_CLKS clocks and high for
// HIGH_CLKS clocks (6 and 4, one tenth of the CPU clock, as on the 68000).
// `phase` counts 0 .. LOW_CLKS+HIGH_CLKS-1 and E is high for phase >=
// LOW_CLKS.  `e_fall` is a one-clock pulse in the last high clock, i.e. E
// falls at the next edge; `e_low_start` marks phase 0.  The control unit's
// peripheral cycle (entered when VPA is asserted during a bus cycle) uses
// these to place VMA and to finish the transfer on the falling edge of E.
// The document only names the E, VMA and VPA pins; the 6/4 timing is taken
// from the 68000 family and is this design's choice.
module m68k_e_clock #(
  parameter int unsigned LOW_CLKS  = 6,
  parameter int unsigned HIGH_CLKS = 4
) (
  input  logic clk,
  input  logic rst,           // synchronous, active high
  output logic e,
  output logic e_fall,
  output logic e_low_start,
  output logic [$clog2(LOW_CLKS+HIGH_CLKS)-1:0] phase
);

  localparam int unsigned PERIOD = LOW_CLKS + HIGH_CLKS;
  localparam int unsigned PW = $clog2(PERIOD);

  always_ff @(posedge clk) begin
    if (rst || phase == PW'(PERIOD - 1)) phase <= '0;
    else                                 phase <= phase + 1'b1;
  end

  assign e           = (phase >= PW'(LOW_CLKS));
  assign e_fall      = (phase == PW'(PERIOD - 1));
  assign e_low_start = (phase == '0);

endmodule
