// Testbench for dequant: loads a random quantisation table, streams four
// blocks of random coefficients (some large enough to saturate) with random
// stalls, and checks each output against coefficient * step, saturated to
// 12 bits, in the right table position.
module tb_dequant;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic qt_we = 1'b0;
  logic [5:0] qt_addr = '0;
  logic [7:0] qt_data = '0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic signed [11:0] in_data = '0, out_data;
  logic [7:0] qt[64];
  int expect_q[$];
  int checks = 0, failures = 0, sat = 0, n_in = 0;

  always #5 clk = ~clk;

  dequant #(.W(12)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      int p;
      p = int'(in_data) * int'(qt[n_in % 64]);
      if (p > 2047) begin p = 2047; sat++; end
      if (p < -2048) begin p = -2048; sat++; end
      expect_q.push_back(p);
      n_in++;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (int'(out_data) != expect_q[0]) begin
        failures++;
        $display("FAIL got %0d expected %0d", out_data, expect_q[0]);
      end
      void'(expect_q.pop_front());
    end
  end

  // Output stalls at random, independently of the input.
  always @(negedge clk) out_ready <= 1'($urandom_range(0, 3) != 0);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      qt[i]   = 8'($urandom_range(1, 99));
      qt_we   = 1'b1;
      qt_addr = 6'(i);
      qt_data = qt[i];
      @(negedge clk);
    end
    qt_we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      in_valid  = 1'($urandom_range(0, 3) != 0);
      in_data   = (i % 9 == 0) ? 12'($urandom) : 12'(int'($urandom_range(0, 60)) - 30);
      @(posedge clk);
      while (in_valid && !in_ready) @(posedge clk);
      @(negedge clk);
      if (!in_valid) i--;
    end
    in_valid  = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (n_in != 256 || expect_q.size() != 0 || sat == 0) begin
      failures++;
      $display("FAIL accepted %0d, left %0d, saturated %0d", n_in, expect_q.size(), sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
