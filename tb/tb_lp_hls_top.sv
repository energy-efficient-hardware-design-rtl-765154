// End-to-end testbench for lp_hls_top (KNN reduced to N = 2048 points).
//
// Four threads drive the four designs at the same time, each with its own
// reference model:
//   JPEG  blocks of random quantised coefficients, half of them sent while
//         the IDCT domain is off; samples compared with a floating-point
//         IDCT (+-1); the finished-block count must survive every shut-off;
//   ALU   random operations of all kinds while MP/DP switch the multiplier
//         and divider on and off; results and latencies checked;
//   RCA   random additions while P_shut-off toggles; 32-bit, 16-bit and
//         isolated results checked;
//   KNN   queries over random point sets; results compared with a brute
//         force search.
// At the end every mechanism must have been seen at least once: power-down
// and power-up of each switchable domain, a block buffered in the FIFO while
// off, a retained count restored, a held ALU operation, isolation of the
// adder's upper half, de-quantiser saturation, output clamping and a
// finished KNN query. A mechanism that never happened counts as a failure.
`include "fp_ref.svh"
module tb_lp_hls_top;
  import lp_pkg::*;
  localparam int KN = 2048;
  localparam int KIW = 11;

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
  // mechanism counters
  int jpeg_down = 0, jpeg_up = 0, jpeg_buffered = 0, jpeg_restored = 0, n_sat = 0, n_clamp = 0;
  int mul_down = 0, mul_up = 0, div_down = 0, div_up = 0, mul_held = 0, div_held = 0;
  int rca_down = 0, rca_up = 0, rca_iso = 0, rca16 = 0, rca32 = 0;
  int knn_runs = 0;

  always #5 clk = ~clk;

  lp_hls_top #(.KNN_N(KN), .KNN_K(5)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] pso_d = '0;
  always @(posedge clk) if (rst_n) begin
    pso_d <= {jpeg_pwr[2], alu_mul_pwr[2], alu_div_pwr[2], rca_pwr[2]};
    if (jpeg_pwr[2] && !pso_d[3]) jpeg_down++;
    if (!jpeg_pwr[2] && pso_d[3]) jpeg_up++;
    if (alu_mul_pwr[2] && !pso_d[2]) mul_down++;
    if (!alu_mul_pwr[2] && pso_d[2]) mul_up++;
    if (alu_div_pwr[2] && !pso_d[1]) div_down++;
    if (!alu_div_pwr[2] && pso_d[1]) div_up++;
    if (rca_pwr[2] && !pso_d[0]) rca_down++;
    if (!rca_pwr[2] && pso_d[0]) rca_up++;
  end

  // ---------------------------------------------------------------- JPEG
  int natural_of_zz[64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};
  int qt[64];
  int zz[64];
  int exp_q[$];
  int n_blk = 0;

  task automatic make_block();
    int c[64];
    real pi, s, cu, cv;
    pi = 3.14159265358979;
    n_blk++;
    for (int k = 0; k < 64; k++) begin
      zz[k] = 0;
      if (k == 0) zz[k] = int'($urandom_range(0, 100)) - 50;
      else if ($urandom_range(0, 99) < ((k < 15) ? 50 : 6)) zz[k] = int'($urandom_range(0, 20)) - 10;
    end
    if (n_blk % 3 == 0) zz[0] = (n_blk % 2 == 0) ? 2000 : -2000;
    for (int k = 0; k < 64; k++) begin
      int p;
      p = zz[k] * qt[natural_of_zz[k]];
      if (p > 2047) begin p = 2047; n_sat++; end
      if (p < -2048) begin p = -2048; n_sat++; end
      c[natural_of_zz[k]] = p;
    end
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        s = 0.0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            s += cu * cv / 4.0 * real'(c[v * 8 + u]) *
                 $cos((2.0 * x + 1.0) * u * pi / 16.0) * $cos((2.0 * y + 1.0) * v * pi / 16.0);
          end
        s += 128.0;
        if (s < 0.0 || s > 255.0) n_clamp++;
        if (s < 0.0) s = 0.0;
        if (s > 255.0) s = 255.0;
        exp_q.push_back(int'(s));
      end
  endtask

  always @(posedge clk) if (rst_n && jpeg_pix_valid && jpeg_pix_ready) begin
    int d;
    d = (exp_q.size() > 0) ? int'(jpeg_pix_data) - exp_q[0] : 999;
    check(d <= 1 && d >= -1, $sformatf("JPEG sample %0d", jpeg_pix_data));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  task automatic jpeg_thread();
    int NBLK = 10;
    int cnt_kept;
    for (int i = 0; i < 64; i++) begin
      qt[i] = 2 + (i / 8 + i % 8) * 3 + int'($urandom_range(0, 3));
      jpeg_qt_we = 1'b1; jpeg_qt_addr = 6'(i); jpeg_qt_data = 8'(qt[i]);
      @(negedge clk);
    end
    jpeg_qt_we = 1'b0;
    for (int b = 0; b < NBLK; b++) begin
      make_block();
      if (b % 2 == 1) begin
        cnt_kept = int'(jpeg_blocks_done);
        jpeg_pso_req = 1'b1;
        while (!jpeg_pwr[2]) @(negedge clk);
      end
      for (int k = 0; k < 64; k++) begin
        jpeg_coef_valid = 1'b1;
        jpeg_coef_data  = 12'(zz[k]);
        @(posedge clk);
        while (!jpeg_coef_ready) @(posedge clk);
        @(negedge clk);
      end
      jpeg_coef_valid = 1'b0;
      if (b % 2 == 1) begin
        repeat (80) @(negedge clk);
        if (jpeg_pwr[2] && !jpeg_fifo_empty) jpeg_buffered++;
        jpeg_pso_req = 1'b0;
        while (jpeg_pwr[2] || jpeg_pwr[0]) @(negedge clk);
        check(int'(jpeg_blocks_done) == cnt_kept, "JPEG finished-block count kept across shut-off");
        if (cnt_kept != 0) jpeg_restored++;
      end
      while (exp_q.size() != 0) @(negedge clk);
      repeat (4) @(negedge clk);
      check(int'(jpeg_blocks_done) == b + 1, $sformatf("JPEG blocks_done %0d", jpeg_blocks_done));
    end
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

  bit alu_busy = 1'b1;
  initial begin
    @(posedge rst_n);
    while (alu_busy) begin
      repeat ($urandom_range(20, 120)) @(negedge clk);
      alu_mp = 1'($urandom_range(0, 1));
      alu_dp = 1'($urandom_range(0, 1));
    end
  end

  task automatic alu_thread();
    logic [31:0] e;
    int lat, wait_c, exp_lat;
    logic was_off;
    for (int i = 0; i < 600; i++) begin
      alu_sel = alu_op_e'($urandom_range(0, 7));
      alu_a = $urandom;
      alu_b = (alu_sel == OP_DIV) ? 32'($urandom_range(0, 70000)) : $urandom;
      e = alu_model(alu_sel, alu_a, alu_b);
      alu_op_valid = 1'b1;
      wait_c = 0;
      #1;
      was_off = (alu_sel == OP_MUL && !alu_mul_on) || (alu_sel == OP_DIV && !alu_div_on);
      while (!alu_op_ready) begin @(negedge clk); wait_c++; #1; end
      if (was_off && wait_c > 0 && alu_sel == OP_MUL) mul_held++;
      if (was_off && wait_c > 0 && alu_sel == OP_DIV) div_held++;
      @(negedge clk);
      alu_op_valid = 1'b0;
      lat = 1;
      while (!alu_out_valid && lat < 100) begin @(negedge clk); lat++; end
      exp_lat = (alu_sel == OP_MUL) ? 2 : (alu_sel == OP_DIV) ? 34 : 1;
      check(alu_out == e, $sformatf("ALU %s %h,%h = %h expected %h", alu_sel.name(), alu_a, alu_b, alu_out, e));
      check(lat == exp_lat, $sformatf("ALU %s latency %0d", alu_sel.name(), lat));
    end
    alu_busy = 1'b0;
  endtask

  // ---------------------------------------------------------------- RCA
  task automatic rca_thread();
    logic [32:0] full;
    logic [16:0] low;
    for (int i = 0; i < 3000; i++) begin
      if (i % 37 == 0) rca_p_shutoff = ~rca_p_shutoff;
      rca_a = $urandom; rca_b = $urandom; rca_cin = 1'($urandom_range(0, 1));
      #1;
      full = 33'(rca_a) + 33'(rca_b) + 33'(rca_cin);
      low  = 17'(rca_a[15:0]) + 17'(rca_b[15:0]) + 17'(rca_cin);
      if (rca_p_shutoff) begin
        check({rca_cout, rca_sum} == {low[16], 16'h0000, low[15:0]} && !rca_msb_on, "RCA 16-bit mode");
        rca16++;
      end else if (rca_pwr[0]) begin
        check(rca_sum == {16'h0000, low[15:0]} && !rca_cout && !rca_msb_on, "RCA upper half isolated");
        rca_iso++;
      end else begin
        check({rca_cout, rca_sum} == full && rca_msb_on, "RCA 32-bit mode");
        rca32++;
      end
      @(negedge clk);
    end
  endtask

  // ---------------------------------------------------------------- KNN
  longint dsq[KN];

  task automatic knn_thread();
    for (int q = 0; q < 4; q++) begin
      int n;
      int order[$];
      n = (q % 2 == 0) ? KN : int'($urandom_range(5, KN));
      knn_qx = rand_coord(90); knn_qy = rand_coord(180);
      @(negedge clk);
      knn_start = 1'b1; knn_n_points = (KIW+1)'(n);
      @(negedge clk);
      knn_start = 1'b0;
      for (int i = 0; i < n; i++) begin
        knn_pt_x = rand_coord(90); knn_pt_y = rand_coord(180);
        dsq[i] = longint'(fp_dist(knn_pt_x, knn_pt_y, knn_qx, knn_qy));
        knn_pt_valid = 1'($urandom_range(0, 5) != 0);
        while (!knn_pt_valid) begin @(negedge clk); knn_pt_valid = 1'($urandom_range(0, 2) != 0); end
        @(negedge clk);
      end
      knn_pt_valid = 1'b0;
      while (!knn_done) @(negedge clk);
      for (int i = 0; i < n; i++) order.push_back(i);
      order.sort() with (dsq[item] * KN + item);
      for (int k = 0; k < 5; k++)
        check(knn_nn_valid[k] && int'(knn_nn_idx[k]) == order[k] && longint'(knn_nn_dist[k]) == dsq[order[k]],
              $sformatf("KNN query %0d rank %0d", q, k));
      knn_runs++;
    end
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
    repeat (4) @(negedge clk);
    check(jpeg_down > 0 && jpeg_up > 0, "JPEG IDCT domain switched off and on");
    check(jpeg_buffered > 0, "JPEG block buffered in the FIFO while off");
    check(jpeg_restored > 0, "JPEG retained count restored");
    check(n_sat > 0, "de-quantiser saturation");
    check(n_clamp > 0, "IDCT output clamping");
    check(mul_down > 0 && mul_up > 0 && div_down > 0 && div_up > 0, "ALU domains switched off and on");
    check(mul_held > 0 && div_held > 0, "ALU operations held while a unit was off");
    check(rca_down > 0 && rca_up > 0, "RCA upper half switched off and on");
    check(rca_iso > 0 && rca16 > 0 && rca32 > 0, "RCA isolated, 16-bit and 32-bit results");
    check(knn_runs == 4, "KNN queries finished");
    $display("JPEG off %0d on %0d buffered %0d restored %0d saturated %0d clamped %0d",
             jpeg_down, jpeg_up, jpeg_buffered, jpeg_restored, n_sat, n_clamp);
    $display("ALU mul off %0d on %0d held %0d, div off %0d on %0d held %0d",
             mul_down, mul_up, mul_held, div_down, div_up, div_held);
    $display("RCA off %0d on %0d isolated %0d 16-bit %0d 32-bit %0d; KNN queries %0d",
             rca_down, rca_up, rca_iso, rca16, rca32, knn_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
