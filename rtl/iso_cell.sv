// Isolation cell bank on the outputs of a power-switchable domain.
//
// While iso_enable is high the outputs are clamped to CLAMP, so nothing that
// floats in a switched-off domain reaches the always-on logic; otherwise the
// domain's outputs pass unchanged. Purely combinational. Placing isolation on
// the domain outputs follows the document; the clamp value 0 is this
// design's choice.
module iso_cell #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] CLAMP = '0
) (
  input  logic             iso_enable,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_comb q = iso_enable ? CLAMP : d;

endmodule
