// Testbench for clock_gate.
//
// Counts rising edges of the gated clock over windows with the enable held
// high, held low, and changed in the middle of a high clock phase, and
// checks that no pulse is cut short (gclk never rises while clk is low and
// every gclk pulse lasts the whole high phase).
module tb_clock_gate;
  logic clk = 1'b0;
  logic en = 1'b0;
  logic gclk;
  int   checks = 0;
  int   failures = 0;
  int   gedges = 0;
  realtime rise_t = -1.0;

  always #5 clk = ~clk;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  always @(posedge gclk) begin
    gedges++;
    rise_t = $realtime;
    check(clk == 1'b1, "gclk rises only with clk");
  end
  always @(negedge gclk) if (rise_t >= 0.0) check($realtime - rise_t == 5.0, "full-width pulse");

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0;
    @(negedge clk);
    en = 1'b1;
    e0 = gedges;
    repeat (10) @(negedge clk);
    check(gedges - e0 == 10, $sformatf("10 edges while enabled, got %0d", gedges - e0));
    en = 1'b0;
    e0 = gedges;
    repeat (10) @(negedge clk);
    check(gedges - e0 == 0, "no edge while disabled");
    // Enable changes during the high phase take effect only at the next pulse.
    @(posedge clk); #1 en = 1'b1;
    e0 = gedges;
    @(negedge clk);
    check(gedges - e0 == 0, "no pulse from an enable raised mid-phase");
    @(posedge clk); #1 en = 1'b0;
    @(negedge clk);
    check(gedges - e0 == 1, "pulse not cut by an enable dropped mid-phase");
    repeat (3) @(negedge clk);
    check(gedges - e0 == 1, "stopped afterwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
