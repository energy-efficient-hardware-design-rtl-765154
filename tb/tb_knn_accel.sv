// Testbench for knn_accel at a reduced size (N = 4096 points).
//
// Several queries, each with its own random point set and count (full and
// partial sets, clustered points with equal distances, gaps in the input
// stream). The K = 5 results are compared with a brute-force stable sort of
// all distances done here, and the run time is checked: with points offered
// every cycle, done must rise n + 5 cycles after the first point is offered.
// Coordinates are binary32; the reference computes each distance with the
// same rounding steps as the kernel.
`include "fp_ref.svh"
module tb_knn_accel;
  localparam int N = 4096;
  localparam int IW = 12;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] qx = '0, qy = '0, pt_x = '0, pt_y = '0;
  logic [IW:0] n_points = '0;
  logic pt_valid = 1'b0, pt_ready, done;
  logic [IW-1:0] nn_idx[5];
  logic [31:0] nn_dist[5];
  logic [4:0] nn_valid;
  longint dsq[N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  knn_accel #(.N(N), .K(5)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_query(input int n, input bit gaps, input bit cluster);
    int order[$];
    int t0, cyc;
    qx = rand_coord(90); qy = rand_coord(180);
    if (cluster) begin qx = r2f(100.0); qy = r2f(-100.0); end
    @(negedge clk);
    start = 1'b1; n_points = (IW+1)'(n);
    @(negedge clk);
    start = 1'b0;
    t0 = -1; cyc = 0;
    for (int i = 0; i < n; i++) begin
      pt_x = cluster ? r2f(real'(100 + int'($urandom_range(0, 6)) - 3)) : rand_coord(90);
      pt_y = cluster ? r2f(real'(-100 + int'($urandom_range(0, 6)) - 3)) : rand_coord(180);
      dsq[i] = longint'(fp_dist(pt_x, pt_y, qx, qy));
      pt_valid = gaps ? 1'($urandom_range(0, 2) != 0) : 1'b1;
      while (!pt_valid) begin
        @(negedge clk); cyc++;
        pt_valid = 1'($urandom_range(0, 2) != 0);
      end
      if (t0 < 0) t0 = cyc;
      @(negedge clk); cyc++;
    end
    pt_valid = 1'b0;
    while (!done) begin @(negedge clk); cyc++; end
    if (!gaps) begin
      checks++;
      if (cyc - t0 != n + 5) begin
        failures++;
        $display("FAIL run time %0d cycles for %0d points", cyc - t0, n);
      end
    end
    // reference: indices sorted by distance, ties by index
    for (int i = 0; i < n; i++) order.push_back(i);
    order.sort() with (dsq[item] * N + item);
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (!nn_valid[k] || int'(nn_idx[k]) != order[k] || longint'(nn_dist[k]) != dsq[order[k]]) begin
        failures++;
        $display("FAIL n=%0d rank %0d got idx %0d d %0d expected idx %0d d %0d",
                 n, k, nn_idx[k], nn_dist[k], order[k], dsq[order[k]]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_query(N, 1'b0, 1'b0);
    run_query(1000, 1'b1, 1'b0);
    run_query(2000, 1'b0, 1'b1);
    run_query(7, 1'b1, 1'b1);
    run_query(N, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
