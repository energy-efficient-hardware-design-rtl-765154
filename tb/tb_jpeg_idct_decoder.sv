// Testbench for jpeg_idct_decoder.
//
// Loads a quantisation table, then sends blocks of quantised coefficients in
// zigzag order. The expected samples are worked out here: undo the zigzag
// with the standard table, multiply by the step and saturate to 12 bits,
// then a floating-point 2D IDCT, +128, clamp to 0..255; the decoder may
// differ by +-1. Every other block is sent with the IDCT domain switched
// off, so it waits in the FIFO until the domain wakes up. Also checks the
// number of finished blocks and the output rate of a block.
module tb_jpeg_idct_decoder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
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
  int checks = 0, failures = 0, n_off = 0, n_sat = 0;
  int natural_of_zz[64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};
  int n_made = 0;
  int qt[64];
  int zz[64];
  int exp_q[$];
  localparam int NBLK = 8;

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
    repeat (NBLK * 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_block();
    int c[64];
    real pi, s, cu, cv;
    pi = 3.14159265358979;
    for (int k = 0; k < 64; k++) begin
      zz[k] = 0;
      if (k == 0) zz[k] = int'($urandom_range(0, 100)) - 50;
      else if ($urandom_range(0, 99) < ((k < 15) ? 50 : 6)) zz[k] = int'($urandom_range(0, 20)) - 10;
    end
    n_made++;
    if (n_made % 3 == 0) zz[0] = 2000;  // forces saturation of the product
    for (int k = 0; k < 64; k++) begin
      int p;
      p = zz[k] * qt[natural_of_zz[k]];
      if (p > 2047) begin p = 2047; n_sat++; end
      if (p < -2048) begin p = -2048; n_sat++; end
      c[natural_of_zz[k]] = p;
    end
    for (int y = 0; y < 8; y++)      // row-major output order
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

  int t_first, t_last, n_pix = 0;
  always @(posedge clk) if (rst_n && pix_valid && pix_ready) begin
    int d;
    d = int'(pix_data) - exp_q[0];
    check(exp_q.size() > 0 && d <= 1 && d >= -1, $sformatf("pixel %0d expected %0d", pix_data, exp_q[0]));
    void'(exp_q.pop_front());
    if (n_pix % 64 == 0) t_first = $time;
    if (n_pix % 64 == 63) t_last = $time;
    n_pix++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      qt[i] = 2 + (i / 8 + i % 8) * 3 + int'($urandom_range(0, 3));
      qt_we = 1'b1; qt_addr = 6'(i); qt_data = 8'(qt[i]);
      @(negedge clk);
    end
    qt_we = 1'b0;
    for (int b = 0; b < NBLK; b++) begin
      make_block();
      if (b % 2 == 1) begin
        pso_req = 1'b1;
        while (!pso_enable) @(negedge clk);
        n_off++;
      end
      for (int k = 0; k < 64; k++) begin
        coef_valid = 1'b1;
        coef_data  = 12'(zz[k]);
        @(posedge clk);
        while (!coef_ready) @(posedge clk);
        @(negedge clk);
      end
      coef_valid = 1'b0;
      if (b % 2 == 1) begin
        // Let the zigzag and dequantiser hand the block to the FIFO while asleep.
        repeat (80) @(negedge clk);
        check(pso_enable && !idct_fifo_empty, "block waiting in the FIFO while off");
        pso_req = 1'b0;
      end
      while (exp_q.size() != 0) @(negedge clk);
      check((t_last - t_first) / 10 == 63, "64 samples in 64 cycles");
    end
    repeat (4) @(negedge clk);
    check(int'(blocks_done) == NBLK, $sformatf("blocks_done %0d", blocks_done));
    check(n_off == NBLK / 2 && n_sat > 0, "shut-offs and saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
