// Integrated clock gate for a switchable domain.
//
// gclk follows clk while en is high and stays low while en is low. The enable
// is captured by a latch that is transparent while clk is low, so a change of
// en during the high phase cannot cut a clock pulse short or create a glitch.
// This is the usual latch-and-AND clock-gating cell; the document shows the
// cell only as a box with enable and clock inputs. In this design en is the
// inverse of the PMB's cg output, so the clock of a domain stops while that
// domain is shut off. The latch is intended.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
