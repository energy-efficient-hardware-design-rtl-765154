// Single-precision (IEEE 754 binary32) arithmetic for the KNN distance kernel.
//
// fp_add and fp_mul are combinational functions on the raw 32-bit patterns,
// rounding to nearest with ties to even. To keep the logic small:
//   * subnormal inputs are read as zero and subnormal results are flushed
//     to (signed) zero;
//   * a result too large for binary32 becomes infinity;
//   * NaN and infinity inputs are not given special treatment (the kernel
//     only sees finite coordinates).
// fp_add aligns the smaller operand in a 50-bit field (a shift beyond that
// keeps only a sticky bit), adds or subtracts, normalises with a leading-one
// search and rounds. fp_mul forms the exact 48-bit product of the
// significands and rounds it. The number format is the standard one; the
// simplifications above are this design's choices.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  // Round a normalised significand with its guard and sticky bits; returns
  // the packed result, handling the carry out of rounding and the exponent
  // range.
  function automatic fp32_t fp_pack(input logic s, input int e, input logic [23:0] m,
                                    input logic guard, input logic sticky);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m};
    er = e;
    if (guard && (sticky || m[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er <= 0)   return {s, 31'd0};
    if (er >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(er), mr[22:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else       return fp_pack(s, e,     p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    logic [49:0] xm, ym;
    logic [50:0] sum;
    logic [50:0] sh;
    int          d, lead;
    // Zero (and subnormal) operands.
    if (a[30:23] == 8'd0 && b[30:23] == 8'd0) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 8'd0) return b;
    if (b[30:23] == 8'd0) return a;
    // x gets the larger magnitude.
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    d  = int'(x[30:23]) - int'(y[30:23]);
    xm = {1'b1, x[22:0], 26'd0};
    if (d > 26) ym = 50'd1;  // only its sticky bit matters
    else        ym = {1'b1, y[22:0], 26'd0} >> d;
    if (x[31] == y[31]) sum = {1'b0, xm} + {1'b0, ym};
    else                sum = {1'b0, xm} - {1'b0, ym};
    if (sum == '0) return 32'd0;
    lead = 0;
    for (int i = 0; i <= 50; i++) if (sum[i]) lead = i;
    sh = sum << (50 - lead);
    return fp_pack(x[31], int'(x[30:23]) + lead - 49, sh[50:27], sh[26], |sh[25:0]);
  endfunction

endpackage
