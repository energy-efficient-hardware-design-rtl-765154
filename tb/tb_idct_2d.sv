// Testbench for idct_2d: random JPEG-like blocks (a large DC term, a few
// moderate low-frequency terms, the rest mostly zero) go through the block;
// the 64 samples are compared with a floating-point 2D IDCT plus 128,
// rounded and clamped to 0..255, within +-1. Checks the 144-cycle block time
// at full rate, that idle is high only between blocks, and that clamping
// happens at both ends.
module tb_idct_2d;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic signed [11:0] in_data = '0;
  logic [7:0] out_data;
  logic idle, block_done;
  int checks = 0, failures = 0, clamp_lo = 0, clamp_hi = 0;
  int coef[64];
  int expv[64];
  localparam int NBLK = 40;

  always #5 clk = ~clk;

  idct_2d #(.CW(12)) dut (.*);

  initial begin
    repeat (NBLK * 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_block(input int b);
    real pi, s, cu, cv;
    pi = 3.14159265358979;
    for (int i = 0; i < 64; i++) coef[i] = 0;
    coef[0] = (b % 5 == 0) ? ((b % 2 == 0) ? 1200 : -1200) : int'($urandom_range(0, 1600)) - 800;
    for (int i = 1; i < 64; i++)
      if ($urandom_range(0, 99) < ((i < 20) ? 40 : 8)) coef[i] = int'($urandom_range(0, 300)) - 150;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        s = 0.0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            // coefficient at row v (vertical frequency), column u
            s += cu * cv / 4.0 * real'(coef[v * 8 + u]) *
                 $cos((2.0 * x + 1.0) * u * pi / 16.0) * $cos((2.0 * y + 1.0) * v * pi / 16.0);
          end
        s += 128.0;
        if (s < 0.0) s = 0.0;
        if (s > 255.0) s = 255.0;
        expv[y * 8 + x] = int'(s);
      end
  endtask

  initial begin
    int t_first_in, t_first_out, d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      make_block(b);
      checks++;
      if (!idle) begin failures++; $display("FAIL not idle before block %0d", b); end
      for (int i = 0; i < 64; i++) begin
        in_valid = 1'b1;
        in_data  = 12'(coef[i]);
        @(posedge clk);
        if (i == 0) t_first_in = $time;
        #1;
        if (idle) begin checks++; failures++; $display("FAIL idle during load"); end
        @(negedge clk);
      end
      in_valid = 1'b0;
      for (int i = 0; i < 64; i++) begin
        @(posedge clk);
        while (!out_valid) @(posedge clk);
        if (i == 0) t_first_out = $time;
        checks++;
        d = int'(out_data) - expv[i];
        if (expv[i] == 0) clamp_lo++;
        if (expv[i] == 255) clamp_hi++;
        if (d > 1 || d < -1) begin
          failures++;
          $display("FAIL block %0d sample %0d got %0d expected %0d", b, i, out_data, expv[i]);
        end
      end
      checks++;
      if ((t_first_out - t_first_in) / 10 != 80) begin
        failures++;
        $display("FAIL first sample %0d cycles after first coefficient, expected 80",
                 (t_first_out - t_first_in) / 10);
      end
      @(negedge clk);
    end
    checks++;
    if (clamp_lo == 0 || clamp_hi == 0) begin
      failures++;
      $display("FAIL clamping not exercised lo=%0d hi=%0d", clamp_lo, clamp_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
