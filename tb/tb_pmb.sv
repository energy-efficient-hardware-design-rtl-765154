// Testbench for pmb.
//
// A reference model written as a clocked thread (each wait() is one clock
// edge) runs next to the block; a random enable pattern with runs of
// different lengths is applied, and all four outputs are compared every
// cycle. Also checks the power-down order (iso, then ret one cycle later,
// then pso and cg one cycle later) on an isolated request, and counts how
// many complete power-down and power-up sequences were seen.
module tb_pmb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic iso_enable, ret_enable, pso_enable, cg;
  logic iso_m = 1'b0, ret_m = 1'b0, pso_m = 1'b0, cg_m = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   downs = 0, ups = 0;

  always #5 clk = ~clk;

  pmb dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // Reference: the power management thread.
  initial begin
    wait (rst_n);
    @(posedge clk);          // thread start: initialization
    @(posedge clk);          // wait()
    forever begin
      if (enable) begin
        iso_m = 1'b1;
        @(posedge clk);
        ret_m = 1'b1;
        @(posedge clk);
        pso_m = 1'b1;
        cg_m  = 1'b1;
      end else begin
        cg_m  = 1'b0;
        pso_m = 1'b0;
        @(posedge clk);
        ret_m = 1'b0;
        @(posedge clk);
        iso_m = 1'b0;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    check({iso_enable, ret_enable, pso_enable, cg} == {iso_m, ret_m, pso_m, cg_m},
          $sformatf("outputs %b model %b", {iso_enable, ret_enable, pso_enable, cg},
                    {iso_m, ret_m, pso_m, cg_m}));
  end

  logic pso_d;
  always @(posedge clk) begin
    pso_d <= pso_enable;
    if (pso_enable && !pso_d) downs++;
    if (!pso_enable && pso_d) ups++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check({iso_enable, ret_enable, pso_enable, cg} == 4'b0000, "all off after reset");
    // Directed: one request, check the order cycle by cycle.
    enable = 1'b1;
    t = 0;
    while (!iso_enable && t < 4) begin @(negedge clk); t++; end
    check(iso_enable && !ret_enable && !pso_enable, "iso first");
    @(negedge clk);
    check(iso_enable && ret_enable && !pso_enable, "ret one cycle after iso");
    @(negedge clk);
    check(iso_enable && ret_enable && pso_enable && cg, "pso and cg one cycle after ret");
    repeat (6) @(negedge clk);
    enable = 1'b0;
    t = 0;
    while (pso_enable && t < 4) begin @(negedge clk); t++; end
    check(!pso_enable && !cg && ret_enable && iso_enable, "pso and cg drop first");
    @(negedge clk);
    check(!ret_enable && iso_enable, "ret drops one cycle later");
    @(negedge clk);
    check(!iso_enable, "iso drops last");
    // Random runs.
    for (int i = 0; i < 400; i++) begin
      enable = $urandom_range(0, 1);
      repeat ($urandom_range(1, 12)) @(negedge clk);
    end
    enable = 1'b0;
    repeat (10) @(negedge clk);
    check(downs > 20 && ups > 20, $sformatf("sequences seen down=%0d up=%0d", downs, ups));
    $display("power-down sequences %0d, power-up sequences %0d", downs, ups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
