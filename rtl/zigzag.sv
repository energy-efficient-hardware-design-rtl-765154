// Inverse zigzag scan for one 8x8 JPEG block.
//
// Coefficients arrive in zigzag order (in_valid/in_ready); coefficient k is
// written to the row-major position given by lp_pkg::zigzag_pos(k). When all
// 64 are in, the block is read out in row-major order (out_valid/out_ready)
// while the input is stalled; then the next block is accepted. A block
// therefore takes 128 cycles at full rate. The document only names this
// stage; the standard JPEG zigzag order and this single-buffer schedule are
// this design's choices.
module zigzag #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic [W-1:0] buffer [64];
  logic [5:0]   idx;
  logic         reading;
  logic [5:0]   pos_lut [64];

  // Zigzag order, built from the package function at elaboration time.
  for (genvar k = 0; k < 64; k++) begin : g_lut
    assign pos_lut[k] = lp_pkg::zigzag_pos(k);
  end

  assign in_ready  = !reading;
  assign out_valid = reading;
  assign out_data  = buffer[idx];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) buffer[pos_lut[idx]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      reading <= 1'b0;
    end else if (!reading && in_valid) begin
      idx <= idx + 1'b1;
      if (idx == 6'd63) reading <= 1'b1;
    end else if (reading && out_ready) begin
      idx <= idx + 1'b1;
      if (idx == 6'd63) reading <= 1'b0;
    end
  end

endmodule
