// clock_gate: gates the clock of one processing element.
//
// The PE clock is the system clock AND'ed with the clock enable from the PE
// on/off control. The enable passes through a latch that is transparent while
// clk is low, so a change of enable in the high phase cannot clip a clock pulse:
// the gated clock starts or stops at the next rising edge after the enable
// changes. The AND gate follows the design description; the latch in front of
// it is this design's own addition to make the gated clock glitch-free.
// Interface: clk in, en (clock enable, registered in the clk domain), gclk out.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
