// MULTIPLY unit of the ALU processor, for a power-switchable domain.
//
// On a cycle with start high, the low W bits of the unsigned product a*b are
// registered; done is high in the following cycle. Clock and reset come from
// the domain (gated clock, reset held while the domain is off). The unit
// follows the document; the single-cycle registered form is this design's
// choice.
module alu_multiply #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic         done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p    <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) p <= a * b;
    end
  end

endmodule
