// Full-size testbench for lp_hls_top at its default parameters
// (KNN_N = 300000 points, K = 5).
//
// Streams a full 300000-point data set into the KNN accelerator, one point
// per cycle, and checks the five nearest neighbours against a brute-force
// search and the run time (n + 5 cycles). Meanwhile it decodes two JPEG
// blocks (the second sent while the IDCT domain is off, to be buffered),
// runs ALU operations of every kind with the multiplier and divider
// switched off in between, and checks adder results in both widths.
`include "fp_ref.svh"
module tb_lp_hls_top_full;
  import lp_pkg::*;
  localparam int KN = 300000;
  localparam int KIW = $clog2(KN);

  logic clk = 1'b0, rst_n = 1'b0;
  logic jpeg_qt_we = 1'b0;
  logic [5:0] jpeg_qt_addr = '0;
  logic [7:0] jpeg_qt_data = '0;
  logic jpeg_coef_valid = 1'b0, jpeg_coef_ready;
  logic signed [11:0] jpeg_coef_data = '0;
  logic jpeg_pix_valid, jpeg_pix_ready = 1'b1;
  logic [7:0] jpeg_pix_data;
  logic jpeg_pso_req = 1'b0, jpeg_idct_idle, jpeg_fifo_empty;
  logic [3:0] jpeg_pwr;
  logic [15:0] jpeg_blocks_done;
  alu_op_e alu_sel = OP_AND;
  logic [31:0] alu_a = '0, alu_b = '0, alu_out;
  logic alu_op_valid = 1'b0, alu_op_ready, alu_out_valid;
  logic alu_mp = 1'b0, alu_dp = 1'b0, alu_mul_on, alu_div_on;
  logic [3:0] alu_mul_pwr, alu_div_pwr;
  logic rca_p_shutoff = 1'b0, rca_cin = 1'b0, rca_cout, rca_msb_on;
  logic [31:0] rca_a = '0, rca_b = '0, rca_sum;
  logic [3:0] rca_pwr;
  logic knn_start = 1'b0, knn_pt_valid = 1'b0, knn_pt_ready, knn_done;
  logic [31:0] knn_qx = '0, knn_qy = '0, knn_pt_x = '0, knn_pt_y = '0;
  logic [KIW:0] knn_n_points = '0;
  logic [KIW-1:0] knn_nn_idx[5];
  logic [31:0] knn_nn_dist[5];
  logic [4:0] knn_nn_valid;

  int checks = 0, failures = 0;
  int n_pix = 0, n_buffered = 0, n_held = 0;

  always #5 clk = ~clk;

  lp_hls_top dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- JPEG
  // A flat block (DC only) decodes to 64 equal samples: dc * q / 8 + 128.
  int exp_q[$];
  always @(posedge clk) if (rst_n && jpeg_pix_valid && jpeg_pix_ready) begin
    int d;
    d = (exp_q.size() > 0) ? int'(jpeg_pix_data) - exp_q[0] : 999;
    check(d <= 1 && d >= -1, $sformatf("JPEG sample %0d", jpeg_pix_data));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    n_pix++;
  end

  task automatic jpeg_thread();
    for (int i = 0; i < 64; i++) begin
      jpeg_qt_we = 1'b1; jpeg_qt_addr = 6'(i); jpeg_qt_data = 8'd4;
      @(negedge clk);
    end
    jpeg_qt_we = 1'b0;
    for (int b = 0; b < 2; b++) begin
      int dc;
      dc = (b == 0) ? 40 : -60;
      for (int k = 0; k < 64; k++) exp_q.push_back(dc * 4 / 8 + 128);
      if (b == 1) begin
        jpeg_pso_req = 1'b1;
        while (!jpeg_pwr[2]) @(negedge clk);
      end
      for (int k = 0; k < 64; k++) begin
        jpeg_coef_valid = 1'b1;
        jpeg_coef_data  = (k == 0) ? 12'(dc) : 12'd0;
        @(posedge clk);
        while (!jpeg_coef_ready) @(posedge clk);
        @(negedge clk);
      end
      jpeg_coef_valid = 1'b0;
      if (b == 1) begin
        repeat (80) @(negedge clk);
        if (jpeg_pwr[2] && !jpeg_fifo_empty) n_buffered++;
        jpeg_pso_req = 1'b0;
      end
      while (exp_q.size() != 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(jpeg_blocks_done == 16'd2 && n_pix == 128 && n_buffered == 1, "two JPEG blocks, one buffered while off");
  endtask

  // ---------------------------------------------------------------- ALU
  function automatic logic [31:0] alu_model(alu_op_e op, logic [31:0] x, logic [31:0] y);
    case (op)
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_SHL: return x << y[4:0];
      OP_SHR: return x >> y[4:0];
      OP_MUL: return x * y;
      default: return (y == 0) ? 32'hFFFF_FFFF : x / y;
    endcase
  endfunction

  task automatic alu_thread();
    logic [31:0] e;
    int wait_c;
    for (int i = 0; i < 64; i++) begin
      // switch both units off for a while every 16 operations
      alu_mp = (i % 16) >= 12;
      alu_dp = (i % 16) >= 12;
      alu_sel = alu_op_e'(i % 8);
      alu_a = $urandom;
      alu_b = (alu_sel == OP_DIV) ? 32'($urandom_range(1, 70000)) : $urandom;
      e = alu_model(alu_sel, alu_a, alu_b);
      alu_op_valid = 1'b1;
      wait_c = 0;
      #1;
      while (!alu_op_ready) begin
        @(negedge clk);
        wait_c++;
        if (wait_c == 20) begin alu_mp = 1'b0; alu_dp = 1'b0; end
        #1;
      end
      if (wait_c >= 20) n_held++;
      @(negedge clk);
      alu_op_valid = 1'b0;
      while (!alu_out_valid) @(negedge clk);
      check(alu_out == e, $sformatf("ALU %s %h,%h = %h expected %h", alu_sel.name(), alu_a, alu_b, alu_out, e));
    end
    check(n_held > 0, "ALU operation held while its unit was off");
  endtask

  // ---------------------------------------------------------------- RCA
  task automatic rca_thread();
    logic [32:0] full;
    for (int i = 0; i < 200; i++) begin
      rca_p_shutoff = (i >= 100);
      if (i == 100 || i == 0) repeat (6) @(negedge clk);
      rca_a = $urandom; rca_b = $urandom; rca_cin = 1'($urandom_range(0, 1));
      #1;
      full = rca_p_shutoff ? {16'h0, 17'(rca_a[15:0]) + 17'(rca_b[15:0]) + 17'(rca_cin)}
                           : 33'(rca_a) + 33'(rca_b) + 33'(rca_cin);
      if (rca_p_shutoff) full = {full[16], 16'h0000, full[15:0]};
      check({rca_cout, rca_sum} == full, $sformatf("RCA %s mode", rca_p_shutoff ? "16-bit" : "32-bit"));
      @(negedge clk);
    end
  endtask

  // ---------------------------------------------------------------- KNN
  longint dsq[KN];

  task automatic knn_thread();
    int order[$];
    int t0, cyc;
    knn_qx = rand_coord(90); knn_qy = rand_coord(180);
    @(negedge clk);
    knn_start = 1'b1; knn_n_points = (KIW+1)'(KN);
    @(negedge clk);
    knn_start = 1'b0;
    cyc = 0; t0 = 0;
    for (int i = 0; i < KN; i++) begin
      knn_pt_valid = 1'b1;
      knn_pt_x = rand_coord(90); knn_pt_y = rand_coord(180);
      dsq[i] = longint'(fp_dist(knn_pt_x, knn_pt_y, knn_qx, knn_qy));
      @(negedge clk); cyc++;
    end
    knn_pt_valid = 1'b0;
    while (!knn_done) begin @(negedge clk); cyc++; end
    check(cyc - t0 == KN + 5, $sformatf("KNN run time %0d cycles", cyc - t0));
    for (int i = 0; i < KN; i++) order.push_back(i);
    order.sort() with (dsq[item] * KN + item);
    for (int k = 0; k < 5; k++)
      check(knn_nn_valid[k] && int'(knn_nn_idx[k]) == order[k] && longint'(knn_nn_dist[k]) == dsq[order[k]],
            $sformatf("KNN rank %0d: idx %0d expected %0d", k, knn_nn_idx[k], order[k]));
    $display("KNN %0d points in %0d cycles", KN, cyc - t0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    fork
      jpeg_thread();
      alu_thread();
      rca_thread();
      knn_thread();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
