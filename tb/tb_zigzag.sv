// Testbench for zigzag: feeds blocks in zigzag order and checks the
// row-major read-out against the standard JPEG zigzag table written out
// here, with random stalls on both sides; also checks the 128-cycle block
// time at full rate.
module tb_zigzag;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [11:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  // Row-major index of the k-th coefficient in zigzag order.
  int natural_of_zz[64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};
  logic [11:0] blocks[4][64];   // row-major expected content
  logic [11:0] zz[4][64];       // zigzag-order input

  always #5 clk = ~clk;

  zigzag #(.W(12)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 64; k++) begin
        zz[b][k] = 12'($urandom);
        blocks[b][natural_of_zz[k]] = zz[b][k];
      end
  end

  // producer
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 64; k++) begin
        in_valid = 1'b1;
        in_data  = zz[b][k];
        if (b >= 2) begin  // random gaps in the second half
          in_valid = 1'($urandom_range(0, 3) != 0);
          while (!in_valid) begin
            @(negedge clk);
            in_valid = 1'($urandom_range(0, 3) != 0);
          end
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
    in_valid = 1'b0;
  end

  // consumer
  initial begin
    int t0, t1;
    wait (rst_n);
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        out_ready = (b < 2) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = (b < 2) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
          @(posedge clk);
        end
        if (b == 0 && i == 63) t0 = $time;
        if (b == 1 && i == 63) t1 = $time;
        checks++;
        if (out_data != blocks[b][i]) begin
          failures++;
          $display("FAIL block %0d pos %0d got %h expected %h", b, i, out_data, blocks[b][i]);
        end
      end
    end
    checks++;
    if ((t1 - t0) / 10 != 128) begin
      failures++;
      $display("FAIL block time %0d cycles, expected 128", (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
