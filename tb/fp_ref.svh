// Reference binary32 arithmetic for the KNN testbenches, built on the
// simulator's double-precision real type: an operation on two binary32
// values is done in double precision (exact for the values used here) and
// rounded once to binary32, to nearest even, with subnormal results flushed
// to zero as the hardware does.
`ifndef FP_REF_SVH
`define FP_REF_SVH

function automatic real f2r(input logic [31:0] f);
  logic [63:0] b;
  if (f[30:23] == 8'd0) return 0.0;
  b = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
  return $bitstoreal(b);
endfunction

function automatic logic [31:0] r2f(input real r);
  logic [63:0] b;
  logic [24:0] m;
  int          e;
  if (r == 0.0) return 32'd0;
  b = $realtobits(r);
  e = int'(b[62:52]) - 1023 + 127;
  m = {2'b01, b[51:29]};
  if (b[28] && ((|b[27:0]) || m[0])) m = m + 25'd1;
  if (m[24]) begin m = m >> 1; e++; end
  if (e <= 0) return {b[63], 31'd0};
  if (e >= 255) return {b[63], 8'hFF, 23'd0};
  return {b[63], 8'(e), m[22:0]};
endfunction

// Squared distance as the kernel computes it, operation by operation.
function automatic logic [31:0] fp_dist(input logic [31:0] x, input logic [31:0] y,
                                        input logic [31:0] qx, input logic [31:0] qy);
  logic [31:0] dx, dy, sx, sy;
  dx = r2f(f2r(x) - f2r(qx));
  dy = r2f(f2r(y) - f2r(qy));
  sx = r2f(f2r(dx) * f2r(dx));
  sy = r2f(f2r(dy) * f2r(dy));
  return r2f(f2r(sx) + f2r(sy));
endfunction

// A random coordinate of the kind the data set holds (degrees of latitude or
// longitude with four decimals), as binary32.
function automatic logic [31:0] rand_coord(input int range_deg);
  return r2f(real'(int'($urandom_range(0, 2 * range_deg * 10000)) - range_deg * 10000) / 10000.0);
endfunction

`endif
