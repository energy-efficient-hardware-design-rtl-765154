// Top level: four power- and energy-aware hardware designs side by side.
//
//   jpeg_*  power-aware JPEG decoder back end (inverse zigzag, de-quantiser,
//           IDCT in a switchable power domain with PMB, clock gate, FIFO,
//           isolation and retention);
//   alu_*   power-aware ALU processor (MULTIPLY and DIVIDE in two switchable
//           domains, requested off by alu_mp and alu_dp);
//   rca_*   power-aware 32-bit ripple-carry adder (upper 16 bits in a
//           switchable domain, requested off by rca_p_shutoff);
//   knn_*   K-nearest-neighbour accelerator (distance and neighbour kernels
//           around an on-chip distance buffer).
// The designs share only clock and reset (asynchronous, active low). Each
// power-aware design brings out its power control signals (isolation,
// retention, power switch, clock gate), which would drive the power switch
// cells of the physical implementation. See each module for its timing.
module lp_hls_top
  import lp_pkg::*;
#(
  parameter int unsigned KNN_N  = 300000,
  parameter int unsigned KNN_K  = 5,
  parameter int unsigned KNN_IW = (KNN_N > 1) ? $clog2(KNN_N) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // JPEG IDCT decoder
  input  logic               jpeg_qt_we,
  input  logic [5:0]         jpeg_qt_addr,
  input  logic [7:0]         jpeg_qt_data,
  input  logic               jpeg_coef_valid,
  output logic               jpeg_coef_ready,
  input  logic signed [11:0] jpeg_coef_data,
  output logic               jpeg_pix_valid,
  input  logic               jpeg_pix_ready,
  output logic [7:0]         jpeg_pix_data,
  input  logic               jpeg_pso_req,
  output logic               jpeg_idct_idle,
  output logic               jpeg_fifo_empty,
  output logic [3:0]         jpeg_pwr,          // {cg, pso, ret, iso}
  output logic [15:0]        jpeg_blocks_done,
  // ALU processor
  input  alu_op_e            alu_sel,
  input  logic [31:0]        alu_a,
  input  logic [31:0]        alu_b,
  input  logic               alu_op_valid,
  output logic               alu_op_ready,
  output logic [31:0]        alu_out,
  output logic               alu_out_valid,
  input  logic               alu_mp,
  input  logic               alu_dp,
  output logic               alu_mul_on,
  output logic               alu_div_on,
  output logic [3:0]         alu_mul_pwr,
  output logic [3:0]         alu_div_pwr,
  // 32-bit ripple-carry adder
  input  logic               rca_p_shutoff,
  input  logic [31:0]        rca_a,
  input  logic [31:0]        rca_b,
  input  logic               rca_cin,
  output logic [31:0]        rca_sum,
  output logic               rca_cout,
  output logic               rca_msb_on,
  output logic [3:0]         rca_pwr,
  // KNN accelerator
  input  logic               knn_start,
  input  logic [31:0]        knn_qx,           // binary32
  input  logic [31:0]        knn_qy,           // binary32
  input  logic [KNN_IW:0]    knn_n_points,
  input  logic               knn_pt_valid,
  output logic               knn_pt_ready,
  input  logic [31:0]        knn_pt_x,         // binary32
  input  logic [31:0]        knn_pt_y,         // binary32
  output logic               knn_done,
  output logic [KNN_IW-1:0]  knn_nn_idx  [KNN_K],
  output logic [31:0]        knn_nn_dist [KNN_K], // binary32
  output logic [KNN_K-1:0]   knn_nn_valid
);

  jpeg_idct_decoder #(.CW(12), .FIFO_DEPTH(64)) u_jpeg (
    .clk             (clk),
    .rst_n           (rst_n),
    .qt_we           (jpeg_qt_we),
    .qt_addr         (jpeg_qt_addr),
    .qt_data         (jpeg_qt_data),
    .coef_valid      (jpeg_coef_valid),
    .coef_ready      (jpeg_coef_ready),
    .coef_data       (jpeg_coef_data),
    .pix_valid       (jpeg_pix_valid),
    .pix_ready       (jpeg_pix_ready),
    .pix_data        (jpeg_pix_data),
    .pso_req         (jpeg_pso_req),
    .idct_idle       (jpeg_idct_idle),
    .idct_fifo_empty (jpeg_fifo_empty),
    .iso_enable      (jpeg_pwr[0]),
    .ret_enable      (jpeg_pwr[1]),
    .pso_enable      (jpeg_pwr[2]),
    .cg              (jpeg_pwr[3]),
    .blocks_done     (jpeg_blocks_done)
  );

  pwr_alu #(.W(32)) u_alu (
    .clk       (clk),
    .rst_n     (rst_n),
    .sel       (alu_sel),
    .a         (alu_a),
    .b         (alu_b),
    .op_valid  (alu_op_valid),
    .op_ready  (alu_op_ready),
    .out       (alu_out),
    .out_valid (alu_out_valid),
    .mp        (alu_mp),
    .dp        (alu_dp),
    .mul_on    (alu_mul_on),
    .div_on    (alu_div_on),
    .mul_pwr   (alu_mul_pwr),
    .div_pwr   (alu_div_pwr)
  );

  pwr_rca32 u_rca (
    .clk        (clk),
    .rst_n      (rst_n),
    .p_shutoff  (rca_p_shutoff),
    .a          (rca_a),
    .b          (rca_b),
    .cin        (rca_cin),
    .sum        (rca_sum),
    .cout       (rca_cout),
    .msb_on     (rca_msb_on),
    .iso_enable (rca_pwr[0]),
    .ret_enable (rca_pwr[1]),
    .pso_enable (rca_pwr[2]),
    .cg         (rca_pwr[3])
  );

  knn_accel #(.N(KNN_N), .K(KNN_K), .IW(KNN_IW)) u_knn (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (knn_start),
    .qx       (knn_qx),
    .qy       (knn_qy),
    .n_points (knn_n_points),
    .pt_valid (knn_pt_valid),
    .pt_ready (knn_pt_ready),
    .pt_x     (knn_pt_x),
    .pt_y     (knn_pt_y),
    .done     (knn_done),
    .nn_idx   (knn_nn_idx),
    .nn_dist  (knn_nn_dist),
    .nn_valid (knn_nn_valid)
  );

endmodule
