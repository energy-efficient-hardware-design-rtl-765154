// Power-control toggle-rate sweep on jpeg_idct_decoder.
//
// A profiler in this testbench switches the IDCT domain off whenever it has
// nothing to do (IDCT idle, FIFO empty, no block being sent) and wakes it as
// soon as the next block starts to arrive. Blocks are spaced so that, in a
// window of 120000 cycles, the number of shut-offs is 1x, 4x, 8x and 32x a
// base rate of 3 (3, 12, 24 and 96 shut-off/wake-up pairs). In every window
// the testbench checks that the domain was switched exactly that many times,
// that every sample matches a floating-point IDCT (+-1), and that the
// retained block count is right after every wake-up.
module tb_jpeg_toggle_sweep;
  localparam int WINDOW = 120000;
  localparam int BASE = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic qt_we = 1'b0;
  logic [5:0] qt_addr = '0;
  logic [7:0] qt_data = '0;
  logic coef_valid = 1'b0, coef_ready;
  logic signed [11:0] coef_data = '0;
  logic pix_valid, pix_ready = 1'b1;
  logic [7:0] pix_data;
  logic pso_req = 1'b0;
  logic idct_idle, idct_fifo_empty, iso_enable, ret_enable, pso_enable, cg;
  logic [15:0] blocks_done;
  int checks = 0, failures = 0;
  int natural_of_zz[64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};
  int qt[64];
  int zz[64];
  int exp_q[$];
  int n_sent = 0, n_down = 0, n_up = 0;
  logic pso_d = 1'b0;
  bit sending = 1'b0;

  always #5 clk = ~clk;

  jpeg_idct_decoder dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (4 * WINDOW + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    pso_d <= pso_enable;
    if (pso_enable && !pso_d) n_down++;
    if (!pso_enable && pso_d) n_up++;
  end

  // Profiler: request shut-off once there is nothing to do, and hold the
  // request (idle reads 0 while the outputs are isolated) until a block
  // starts to arrive.
  always @(negedge clk) if (rst_n)
    pso_req <= !sending && (pso_req || (idct_idle && idct_fifo_empty && exp_q.size() == 0));

  task automatic make_block();
    int c[64];
    real pi, s, cu, cv;
    pi = 3.14159265358979;
    for (int k = 0; k < 64; k++) begin
      zz[k] = 0;
      if (k == 0) zz[k] = int'($urandom_range(0, 100)) - 50;
      else if ($urandom_range(0, 99) < ((k < 15) ? 40 : 5)) zz[k] = int'($urandom_range(0, 20)) - 10;
    end
    for (int k = 0; k < 64; k++) begin
      int p;
      p = zz[k] * qt[natural_of_zz[k]];
      if (p > 2047) p = 2047;
      if (p < -2048) p = -2048;
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
        if (s < 0.0) s = 0.0;
        if (s > 255.0) s = 255.0;
        exp_q.push_back(int'(s));
      end
  endtask

  always @(posedge clk) if (rst_n && pix_valid && pix_ready) begin
    int d;
    d = (exp_q.size() > 0) ? int'(pix_data) - exp_q[0] : 999;
    check(d <= 1 && d >= -1, $sformatf("sample %0d", pix_data));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  task automatic run_window(input int factor);
    int nblk, gap, t_end, down0, up0;
    nblk = BASE * factor;
    gap = WINDOW / nblk;
    down0 = n_down; up0 = n_up;
    t_end = 0;
    for (int b = 0; b < nblk; b++) begin
      int t0, kept;
      t0 = 0;
      // wait until the domain is down, as the profiler intends
      while (!pso_enable) begin @(negedge clk); t0++; end
      kept = n_sent;  // blocks finished before this shut-off
      make_block();
      sending = 1'b1;
      for (int k = 0; k < 64; k++) begin
        coef_valid = 1'b1;
        coef_data  = 12'(zz[k]);
        @(posedge clk);
        while (!coef_ready) @(posedge clk);
        @(negedge clk);
        t0++;
      end
      coef_valid = 1'b0;
      sending = 1'b0;
      while (pso_enable || iso_enable) begin @(negedge clk); t0++; end
      check(int'(blocks_done) == kept, "block count restored after wake-up");
      while (exp_q.size() != 0) begin @(negedge clk); t0++; end
      n_sent++;
      check(int'(blocks_done) == n_sent, $sformatf("blocks_done %0d", blocks_done));
      // idle for the rest of this block's slot
      while (t0 < gap) begin @(negedge clk); t0++; end
    end
    while (!pso_enable) @(negedge clk);
    $display("toggle x%0d: %0d blocks, %0d shut-offs, %0d wake-ups in about %0d cycles",
             factor, nblk, n_down - down0, n_up - up0, WINDOW);
    check(n_down - down0 == nblk && n_up - up0 == nblk,
          $sformatf("x%0d: %0d shut-off/wake-up pairs expected", factor, nblk));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      qt[i] = 1 + (i / 8 + i % 8) * 2 + int'($urandom_range(0, 3));
      qt_we = 1'b1; qt_addr = 6'(i); qt_data = 8'(qt[i]);
      @(negedge clk);
    end
    qt_we = 1'b0;
    run_window(1);
    run_window(4);
    run_window(8);
    run_window(32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
