// K-nearest-neighbour accelerator with both kernels on chip.
//
// Finds, among n reference points in the plane, the K points nearest to a
// query point by squared Euclidean distance. Two kernels run as a pipeline
// around an on-chip "dist" buffer:
//   DISTANCE CALCULATION (knn_distance) computes the distance of each
//     streamed reference point and writes it to dist[i];
//   NEIGHBOR ESTIMATION (knn_neighbor) reads each dist[i] back the cycle
//     after it is written and keeps the K smallest with their indices.
// Because the buffer never leaves the chip, the second kernel follows the
// first a few cycles behind instead of waiting for it to finish, and a data
// set of n points takes n + 5 cycles from the first point when points
// arrive every cycle.
//
// Use: pulse start with the query point and the point count n_points
// (1..N); then stream the reference points in order with pt_valid (pt_ready
// is high while points are expected). done rises when the K results in
// nn_idx/nn_dist (ascending distance) are final and stays high until the next
// start. Coordinates and distances are IEEE 754 binary32 bit patterns; a
// distance is never negative, so the neighbour kernel compares the patterns
// as unsigned integers. The two-kernel structure, the on-chip buffer, the
// floating-point distances and K = 5 follow the document; the streaming
// interface, the read-after-write schedule and the flushing of subnormal
// values are this design's choices.
module knn_accel
  import fp32_pkg::*;
#(
  parameter int unsigned N  = 300000,
  parameter int unsigned K  = 5,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  fp32_t                qx,
  input  fp32_t                qy,
  input  logic [IW:0]          n_points,
  input  logic                 pt_valid,
  output logic                 pt_ready,
  input  fp32_t                pt_x,
  input  fp32_t                pt_y,
  output logic                 done,
  output logic [IW-1:0]        nn_idx  [K],
  output logic [DW-1:0]        nn_dist [K],
  output logic [K-1:0]         nn_valid
);

  fp32_t                qx_r, qy_r;
  logic [IW:0]          n_r;
  logic [IW:0]          in_cnt;     // points accepted
  logic [IW:0]          out_cnt;    // distances given to the neighbour kernel
  logic                 accept;

  logic                 d_valid;
  logic [DW-1:0]        d;
  logic [IW-1:0]        d_idx;

  logic                 rd_pending;
  logic [IW-1:0]        rd_idx;
  logic [IW-1:0]        rd_idx_q;
  logic [DW-1:0]        rdata;
  logic                 nb_valid;

  assign pt_ready = !done && (in_cnt < n_r);
  assign accept   = pt_valid && pt_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qx_r    <= '0;
      qy_r    <= '0;
      n_r     <= '0;
      in_cnt  <= '0;
      out_cnt <= '0;
      done    <= 1'b1;
    end else if (start) begin
      qx_r    <= qx;
      qy_r    <= qy;
      n_r     <= n_points;
      in_cnt  <= '0;
      out_cnt <= '0;
      done    <= 1'b0;
    end else begin
      if (accept) in_cnt <= in_cnt + 1'b1;
      if (nb_valid) begin
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt + 1'b1 == n_r) done <= 1'b1;
      end
    end
  end

  knn_distance #(.IW(IW)) u_dist (
    .clk      (clk),
    .rst_n    (rst_n),
    .qx       (qx_r),
    .qy       (qy_r),
    .pt_valid (accept),
    .pt_x     (pt_x),
    .pt_y     (pt_y),
    .pt_idx   (in_cnt[IW-1:0]),
    .d_valid  (d_valid),
    .d        (d),
    .d_idx    (d_idx)
  );

  // Read each distance back the cycle after it was written.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending <= 1'b0;
      rd_idx     <= '0;
      rd_idx_q   <= '0;
      nb_valid   <= 1'b0;
    end else begin
      rd_pending <= d_valid && !start;
      rd_idx     <= d_idx;
      rd_idx_q   <= rd_idx;
      nb_valid   <= rd_pending && !start;
    end
  end

  dist_buffer #(.DEPTH(N), .WIDTH(DW), .AW(IW)) u_buf (
    .clk   (clk),
    .we    (d_valid),
    .waddr (d_idx),
    .wdata (d),
    .re    (rd_pending),
    .raddr (rd_idx),
    .rdata (rdata)
  );

  knn_neighbor #(.K(K), .DW(DW), .IW(IW)) u_nb (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start),
    .d_valid  (nb_valid),
    .d        (rdata),
    .d_idx    (rd_idx_q),
    .nn_dist  (nn_dist),
    .nn_idx   (nn_idx),
    .nn_valid (nn_valid)
  );

endmodule
