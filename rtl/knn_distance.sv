// Distance kernel of the KNN accelerator, in single-precision floating point.
//
// For each reference point (x, y) streamed in with its index, computes the
// squared Euclidean distance to the query point (qx, qy):
//   d = (x - qx)^2 + (y - qy)^2
// Coordinates and distance are IEEE 754 binary32 bit patterns; every
// operation rounds to nearest even (see fp32_pkg for the simplifications).
// Three pipeline stages: the two differences, the two squares, the sum. A
// point entering in cycle t leaves with d_valid in cycle t+3; one point per
// cycle. As a distance is never negative, its bit pattern orders like an
// unsigned integer, which the neighbour kernel relies on. The formula and the
// floating-point arithmetic follow the document; the pipeline and the
// subnormal handling are this design's choices.
module knn_distance
  import fp32_pkg::*;
#(
  parameter int unsigned IW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fp32_t         qx,
  input  fp32_t         qy,
  input  logic          pt_valid,
  input  fp32_t         pt_x,
  input  fp32_t         pt_y,
  input  logic [IW-1:0] pt_idx,
  output logic          d_valid,
  output fp32_t         d,
  output logic [IW-1:0] d_idx
);

  logic          s1_valid, s2_valid;
  fp32_t         s1_dx, s1_dy, s2_sx, s2_sy;
  logic [IW-1:0] s1_idx, s2_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_dx    <= '0;
      s1_dy    <= '0;
      s1_idx   <= '0;
      s2_valid <= 1'b0;
      s2_sx    <= '0;
      s2_sy    <= '0;
      s2_idx   <= '0;
      d_valid  <= 1'b0;
      d        <= '0;
      d_idx    <= '0;
    end else begin
      s1_valid <= pt_valid;
      s1_dx    <= fp_add(pt_x, {~qx[31], qx[30:0]});
      s1_dy    <= fp_add(pt_y, {~qy[31], qy[30:0]});
      s1_idx   <= pt_idx;
      s2_valid <= s1_valid;
      s2_sx    <= fp_mul(s1_dx, s1_dx);
      s2_sy    <= fp_mul(s1_dy, s1_dy);
      s2_idx   <= s1_idx;
      d_valid  <= s2_valid;
      d        <= fp_add(s2_sx, s2_sy);
      d_idx    <= s2_idx;
    end
  end

endmodule
