// Neighbour-estimation kernel of the KNN accelerator.
//
// Keeps the K smallest distances seen since clear, with their indices, in a
// list sorted in ascending order (entry 0 is the nearest). Each cycle with
// d_valid high, the new distance is inserted: entries larger than it move
// down one place and the last one drops out. Empty entries count as
// infinitely far; on equal distances the earlier index stays ahead. One
// distance per cycle, result visible the next cycle. Returning the K
// nearest follows the document; the insertion list (instead of sorting all
// distances) is this design's choice and gives the same K results.
module knn_neighbor #(
  parameter int unsigned K  = 5,
  parameter int unsigned DW = 32,
  parameter int unsigned IW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          d_valid,
  input  logic [DW-1:0] d,
  input  logic [IW-1:0] d_idx,
  output logic [DW-1:0] nn_dist [K],
  output logic [IW-1:0] nn_idx  [K],
  output logic [K-1:0]  nn_valid
);

  logic [K-1:0]  closer;       // new distance belongs ahead of entry i
  logic [K-1:0]  prev_closer;  // closer[i-1], 0 for entry 0
  logic [DW-1:0] prev_dist [K];
  logic [IW-1:0] prev_idx  [K];
  logic [K-1:0]  prev_valid;

  always_comb begin
    for (int i = 0; i < K; i++) closer[i] = !nn_valid[i] || (d < nn_dist[i]);
    prev_closer[0] = 1'b0;
    prev_dist[0]   = '0;
    prev_idx[0]    = '0;
    prev_valid[0]  = 1'b0;
    for (int i = 1; i < K; i++) begin
      prev_closer[i] = closer[i - 1];
      prev_dist[i]   = nn_dist[i - 1];
      prev_idx[i]    = nn_idx[i - 1];
      prev_valid[i]  = nn_valid[i - 1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nn_valid <= '0;
      for (int i = 0; i < K; i++) begin
        nn_dist[i] <= '0;
        nn_idx[i]  <= '0;
      end
    end else if (clear) begin
      nn_valid <= '0;
    end else if (d_valid) begin
      for (int i = 0; i < K; i++) begin
        if (closer[i]) begin
          if (!prev_closer[i]) begin
            nn_dist[i]  <= d;
            nn_idx[i]   <= d_idx;
            nn_valid[i] <= 1'b1;
          end else begin
            nn_dist[i]  <= prev_dist[i];
            nn_idx[i]   <= prev_idx[i];
            nn_valid[i] <= prev_valid[i];
          end
        end
      end
    end
  end

endmodule
