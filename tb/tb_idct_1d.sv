// Testbench for idct_1d: random 8-point inputs against a floating-point
// IDCT computed here with $cos; the fixed-point result may differ by at most
// 2 (weight rounding), and must be exact for a DC-only input.
module tb_idct_1d;
  logic signed [15:0] x[8];
  logic signed [15:0] y[8];
  int checks = 0, failures = 0;

  idct_1d #(.IW(16), .OW(16), .SHIFT(12)) dut (.x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, ref_v, ck;
    pi = 3.14159265358979;
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 8; k++)
        x[k] = (t == 0) ? ((k == 0) ? 16'sd800 : 16'sd0) : 16'(int'($urandom_range(0, 2000)) - 1000);
      #1;
      for (int n = 0; n < 8; n++) begin
        ref_v = 0.0;
        for (int k = 0; k < 8; k++) begin
          ck = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
          ref_v += ck / 2.0 * real'(x[k]) * $cos((2.0 * n + 1.0) * k * pi / 16.0);
        end
        checks++;
        if ((real'(y[n]) - ref_v > 2.0) || (ref_v - real'(y[n]) > 2.0) ||
            (t == 0 && y[n] != 16'sd283)) begin
          failures++;
          $display("FAIL t=%0d n=%0d got %0d expected %f", t, n, y[n], ref_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
