// De-quantisation of one coefficient stream.
//
// Each coefficient (signed, W bits, row-major order within its 8x8 block) is
// multiplied by the matching entry of a 64-entry quantisation table and
// saturated back to W bits. The table holds 8-bit unsigned steps and is
// written through qt_we/qt_addr/qt_data. The stage is a one-deep register
// slice with valid/ready: a product leaves one cycle after its coefficient
// arrives, and a coefficient is accepted whenever the slice is empty or being
// emptied. The document only names this stage and places it after the
// zigzag stage; widths, table format and saturation are this design's
// choices.
module dequant #(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                qt_we,
  input  logic [5:0]          qt_addr,
  input  logic [7:0]          qt_data,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_data
);

  localparam logic signed [W+8:0] MAXV = (W+9)'((1 <<< (W - 1)) - 1);
  localparam logic signed [W+8:0] MINV = -(W+9)'(1 <<< (W - 1));

  logic [7:0]          qtable [64];
  logic [5:0]          idx;
  logic signed [W+8:0] prod;

  assign in_ready = !out_valid || out_ready;
  assign prod     = (W+9)'(in_data) * $signed({1'b0, qtable[idx]});

  always_ff @(posedge clk) begin
    if (qt_we) qtable[qt_addr] <= qt_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        idx       <= idx + 1'b1;
        out_valid <= 1'b1;
        if (prod > MAXV)      out_data <= MAXV[W-1:0];
        else if (prod < MINV) out_data <= MINV[W-1:0];
        else                  out_data <= prod[W-1:0];
      end
    end
  end

endmodule
