// W-bit ripple-carry adder (16 bits by default), one of the two halves of the
// power-aware 32-bit adder.
//
// A chain of W full adders: the carry of bit i is the carry-in of bit i+1, so
// the delay grows linearly with W. {co, s} = a + b + ci. Combinational. The
// 16-bit halves follow the document; the full-adder chain is the standard
// ripple-carry structure.
module rca16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (c[i]),
      .s  (s[i]),
      .co (c[i+1])
    );
  end

  assign co = c[W];

endmodule
