// Power-aware JPEG decoder back end: inverse zigzag, de-quantisation and the
// power-conscious IDCT block, chained with valid/ready handshakes.
//
// Input: one block's 64 quantised DCT coefficients in zigzag order, signed
// CW bits each, through coef_valid/coef_ready. The quantisation table (64
// 8-bit steps, row-major) is written through qt_we/qt_addr/qt_data before
// use. Output: 64 level-shifted 8-bit samples per block, row-major, through
// pix_valid/pix_ready. pso_req asks for the IDCT domain to be switched off;
// the power control signals are brought out. Latency from the last
// coefficient of a block to its first sample is about 64 (zigzag read-out)
// + 2 + 16 cycles at full rate. The stage order follows the document; the
// stages before (variable-length decoding) and after (colour conversion and
// re-ordering) are not part of this block.
module jpeg_idct_decoder #(
  parameter int unsigned CW         = 12,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 qt_we,
  input  logic [5:0]           qt_addr,
  input  logic [7:0]           qt_data,
  input  logic                 coef_valid,
  output logic                 coef_ready,
  input  logic signed [CW-1:0] coef_data,
  output logic                 pix_valid,
  input  logic                 pix_ready,
  output logic [7:0]           pix_data,
  input  logic                 pso_req,
  output logic                 idct_idle,
  output logic                 idct_fifo_empty,
  output logic                 iso_enable,
  output logic                 ret_enable,
  output logic                 pso_enable,
  output logic                 cg,
  output logic [15:0]          blocks_done
);

  logic                 zz_valid;
  logic                 zz_ready;
  logic signed [CW-1:0] zz_data;
  logic                 dq_valid;
  logic                 dq_ready;
  logic signed [CW-1:0] dq_data;

  zigzag #(.W(CW)) u_zz (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (coef_valid),
    .in_ready  (coef_ready),
    .in_data   (coef_data),
    .out_valid (zz_valid),
    .out_ready (zz_ready),
    .out_data  (zz_data)
  );

  dequant #(.W(CW)) u_dq (
    .clk       (clk),
    .rst_n     (rst_n),
    .qt_we     (qt_we),
    .qt_addr   (qt_addr),
    .qt_data   (qt_data),
    .in_valid  (zz_valid),
    .in_ready  (zz_ready),
    .in_data   (zz_data),
    .out_valid (dq_valid),
    .out_ready (dq_ready),
    .out_data  (dq_data)
  );

  pwr_idct_block #(.CW(CW), .FIFO_DEPTH(FIFO_DEPTH)) u_pidct (
    .clk         (clk),
    .rst_n       (rst_n),
    .pso_req     (pso_req),
    .in_valid    (dq_valid),
    .in_ready    (dq_ready),
    .in_data     (dq_data),
    .out_valid   (pix_valid),
    .out_ready   (pix_ready),
    .out_data    (pix_data),
    .idle        (idct_idle),
    .fifo_empty  (idct_fifo_empty),
    .iso_enable  (iso_enable),
    .ret_enable  (ret_enable),
    .pso_enable  (pso_enable),
    .cg          (cg),
    .blocks_done (blocks_done)
  );

endmodule
