// Testbench for pwr_rca32.
//
// Random additions in 32-bit mode (compared with a + b + cin) and in 16-bit
// mode (lower half and its carry, upper half 0), with P_shut-off toggled at
// random. Checks that the upper half is isolated (reads 0) during the
// power-down and power-up sequences, that msb_on is high only when the full
// result is valid, and counts both modes and both transitions.
module tb_pwr_rca32;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic p_shutoff = 1'b0;
  logic [31:0] a = '0, b = '0, sum;
  logic cin = 1'b0, cout, msb_on;
  logic iso_enable, ret_enable, pso_enable, cg;
  int checks = 0, failures = 0, n32 = 0, n16 = 0, n_iso = 0, n_down = 0, n_up = 0;
  logic pso_d = 1'b0;

  always #5 clk = ~clk;

  pwr_rca32 dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    pso_d <= pso_enable;
    if (pso_enable && !pso_d) n_down++;
    if (!pso_enable && pso_d) n_up++;
  end

  initial begin
    logic [32:0] full;
    logic [16:0] low;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      if (i % 40 == 0) p_shutoff = ~p_shutoff;
      a = $urandom; b = $urandom; cin = 1'($urandom_range(0, 1));
      #1;
      full = 33'(a) + 33'(b) + 33'(cin);
      low  = 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin);
      if (p_shutoff) begin
        check({cout, sum} == {low[16], 16'h0000, low[15:0]}, "16-bit mode result");
        check(!msb_on, "msb_on low in 16-bit mode");
        n16++;
      end else if (iso_enable) begin
        check(sum[15:0] == low[15:0] && sum[31:16] == 16'h0000 && !cout, "upper half isolated");
        check(!msb_on, "msb_on low while isolated");
        n_iso++;
      end else begin
        check({cout, sum} == full, $sformatf("32-bit %h+%h+%b got %b_%h", a, b, cin, cout, sum));
        check(msb_on, "msb_on in 32-bit mode");
        n32++;
      end
      @(negedge clk);
    end
    check(n32 > 100 && n16 > 100 && n_iso > 0 && n_down > 10 && n_up > 10, "all modes exercised");
    $display("32-bit %0d, 16-bit %0d, isolated %0d, power-down %0d, power-up %0d", n32, n16, n_iso, n_down, n_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
