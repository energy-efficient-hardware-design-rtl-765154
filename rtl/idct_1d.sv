// Eight-point one-dimensional inverse DCT, combinational, fixed point.
//
//   y[n] = sum_k c(k)/2 * x[k] * cos((2n+1) k pi / 16),  c(0) = 1/sqrt(2),
//   c(k) = 1 otherwise.
// The products use the weights scaled by 2^12 and rounded; the sum is
// rounded and shifted right by SHIFT and saturated to OW bits. The eight
// distinct weights 0.5*cos(m pi/16)*4096, m = 0..8, are the only constants;
// the matrix is formed from them by the symmetry of the cosine. The
// direct-matrix form and the 12-bit weight precision are this design's
// choices.
module idct_1d #(
  parameter int unsigned IW    = 16,
  parameter int unsigned OW    = 16,
  parameter int unsigned SHIFT = 12
) (
  input  logic signed [IW-1:0] x [8],
  output logic signed [OW-1:0] y [8]
);

  localparam int unsigned PW = IW + 14;   // product width
  localparam int unsigned SW = PW + 3;    // sum of eight products

  // 0.5*cos(m*pi/16) * 4096 for m = 0..8.
  function automatic int half_cos(input int unsigned m);
    case (m)
      0: return 2048;
      1: return 2009;
      2: return 1892;
      3: return 1703;
      4: return 1448;
      5: return 1138;
      6: return 784;
      7: return 400;
      default: return 0;
    endcase
  endfunction

  // Weight of input k in output n, scaled by 4096.
  function automatic int weight(input int unsigned n, input int unsigned k);
    int unsigned a;
    if (k == 0) return 1448;  // 1/(2*sqrt(2))
    a = ((2 * n + 1) * k) % 32;
    if (a <= 8)  return  half_cos(a);
    if (a <= 16) return -half_cos(16 - a);
    if (a <= 24) return -half_cos(a - 16);
    return half_cos(32 - a);
  endfunction

  localparam logic signed [SW-1:0] MAXV = SW'((64'sd1 <<< (OW - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(64'sd1 <<< (OW - 1));

  always_comb begin
    logic signed [SW-1:0] acc;
    logic signed [SW-1:0] shifted;
    for (int n = 0; n < 8; n++) begin
      acc = SW'(1) <<< (SHIFT - 1);
      for (int k = 0; k < 8; k++) begin
        acc += SW'(x[k]) * SW'(weight(n, k));
      end
      shifted = acc >>> SHIFT;
      if (shifted > MAXV)      y[n] = MAXV[OW-1:0];
      else if (shifted < MINV) y[n] = MINV[OW-1:0];
      else                     y[n] = shifted[OW-1:0];
    end
  end

endmodule
