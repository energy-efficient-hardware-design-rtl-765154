// The always-on units of the ALU processor: AND, OR, ADD, SUBTRACT, Shift_L
// and Shift_R, all computed in parallel from A and B. Combinational; results
// are W bits (carries and borrows are dropped). The shifts are logical and
// move A by the low log2(W) bits of B. The set of units follows the
// document; widths and shift semantics are this design's choices.
module alu_basic_ops #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] and_r,
  output logic [W-1:0] or_r,
  output logic [W-1:0] add_r,
  output logic [W-1:0] sub_r,
  output logic [W-1:0] shl_r,
  output logic [W-1:0] shr_r
);

  localparam int unsigned SW = $clog2(W);

  always_comb begin
    and_r = a & b;
    or_r  = a | b;
    add_r = a + b;
    sub_r = a - b;
    shl_r = a << b[SW-1:0];
    shr_r = a >> b[SW-1:0];
  end

endmodule
