// Operation encoder of the ALU processor.
//
// Turns the 3-bit operation select SEL into the one-hot enable EN that picks
// one unit's result at the output multiplexer (bit i set for operation i of
// lp_pkg::alu_op_e: AND, OR, ADD, SUBTRACT, Shift_L, Shift_R, MULTIPLY,
// DIVIDE). Combinational. The operation codes are this design's choice.
module alu_encoder
  import lp_pkg::*;
(
  input  alu_op_e    sel,
  output logic [7:0] en
);

  always_comb begin
    en = '0;
    en[sel] = 1'b1;
  end

endmodule
