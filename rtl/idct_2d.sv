// 8x8 two-dimensional inverse DCT with level shift, for JPEG decoding.
//
// A block is processed in four phases:
//   LOAD  64 dequantised coefficients (CW-bit signed, row-major) are
//         accepted one per cycle through in_valid/in_ready;
//   COL   a 1D IDCT is applied to each column, one column per cycle (8
//         cycles), and written back in place with 3 extra fraction bits;
//   ROW   a 1D IDCT is applied to each row, one row per cycle (8 cycles);
//         the results get +128 and are clamped to 0..255;
//   OUT   the 64 samples leave one per cycle, row-major, through
//         out_valid/out_ready.
// At full rate a block takes 64 + 8 + 8 + 64 = 144 cycles. idle is high in
// LOAD before the first coefficient of a block. Column-then-row order follows
// the document; the phase schedule, the widths and the level shift and
// clamping are this design's choices.
module idct_2d #(
  parameter int unsigned CW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [CW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [7:0]           out_data,
  output logic                 idle,
  output logic                 block_done   // pulses when a block's last sample leaves
);

  localparam int unsigned MW = 18;  // width of the working buffer
  localparam int unsigned FB = 3;   // fraction bits kept between the passes

  typedef enum logic [1:0] {
    PH_LOAD,
    PH_COL,
    PH_ROW,
    PH_OUT
  } phase_e;

  phase_e               phase;
  logic [5:0]           idx;
  logic signed [MW-1:0] blk [64];
  logic signed [MW-1:0] col_in  [8];
  logic signed [MW-1:0] col_out [8];
  logic signed [MW-1:0] row_in  [8];
  logic signed [MW-1:0] row_out [8];

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      col_in[i] = blk[i * 8 + int'(idx[2:0])];
      row_in[i] = blk[int'(idx[2:0]) * 8 + i];
    end
  end

  // Column pass keeps FB fraction bits; the row pass removes them.
  idct_1d #(.IW(MW), .OW(MW), .SHIFT(12 - FB)) u_col (.x(col_in), .y(col_out));
  idct_1d #(.IW(MW), .OW(MW), .SHIFT(12 + FB)) u_row (.x(row_in), .y(row_out));

  function automatic logic signed [MW-1:0] level_shift(input logic signed [MW-1:0] v);
    logic signed [MW-1:0] s;
    s = v + MW'(128);
    if (s < 0)   return '0;
    if (s > 255) return MW'(255);
    return s;
  endfunction

  assign in_ready   = (phase == PH_LOAD);
  assign out_valid  = (phase == PH_OUT);
  assign out_data   = blk[idx][7:0];
  assign idle       = (phase == PH_LOAD) && (idx == '0);
  assign block_done = (phase == PH_OUT) && out_ready && (idx == 6'd63);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_LOAD;
      idx   <= '0;
      for (int i = 0; i < 64; i++) blk[i] <= '0;
    end else begin
      unique case (phase)
        PH_LOAD: if (in_valid) begin
          blk[idx] <= MW'(in_data);
          idx      <= idx + 1'b1;
          if (idx == 6'd63) phase <= PH_COL;
        end
        PH_COL: begin
          for (int i = 0; i < 8; i++) blk[i * 8 + int'(idx[2:0])] <= col_out[i];
          idx <= idx + 1'b1;
          if (idx[2:0] == 3'd7) begin
            idx   <= '0;
            phase <= PH_ROW;
          end
        end
        PH_ROW: begin
          for (int i = 0; i < 8; i++) blk[int'(idx[2:0]) * 8 + i] <= level_shift(row_out[i]);
          idx <= idx + 1'b1;
          if (idx[2:0] == 3'd7) begin
            idx   <= '0;
            phase <= PH_OUT;
          end
        end
        PH_OUT: if (out_ready) begin
          idx <= idx + 1'b1;
          if (idx == 6'd63) phase <= PH_LOAD;
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end

endmodule
