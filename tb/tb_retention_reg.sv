// Testbench for retention_reg.
//
// Drives the register the way a power management block does: loads values
// with the domain on, then runs the power-down order (ret_enable high, clock
// stopped, power lost = reset), keeps the domain off for a while, and runs
// the power-up order (power back, clock running while ret_enable is high,
// then ret_enable low). The value must survive; a plain register would come
// back as 0. Repeated with random values.
module tb_retention_reg;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clk_en = 1'b1;
  logic gclk;
  logic pwr_rst_n = 1'b0;
  logic ret = 1'b0;
  logic load = 1'b0;
  logic [15:0] d = '0;
  logic [15:0] q;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;
  assign gclk = clk & clk_en;

  retention_reg #(.WIDTH(16)) dut (
    .aon_clk(clk), .rst_n(rst_n), .clk(gclk), .pwr_rst_n(pwr_rst_n),
    .ret_enable(ret), .load(load), .d(d), .q(q)
  );

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pwr_rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      v = 16'($urandom);
      load = 1'b1; d = v;
      @(negedge clk);
      load = 1'b0; d = ~v;
      check(q == v, "loaded");
      @(negedge clk);
      check(q == v, "holds without load");
      // power down: retain, stop clock, remove power
      ret = 1'b1;
      @(negedge clk);
      clk_en = 1'b0;
      pwr_rst_n = 1'b0;
      repeat ($urandom_range(2, 8)) @(negedge clk);
      check(q == 16'h0000, "content lost without power");
      // power up: power and clock back with ret high, then release ret
      pwr_rst_n = 1'b1;
      clk_en = 1'b1;
      @(negedge clk);
      check(q == v, $sformatf("restored %h got %h", v, q));
      ret = 1'b0;
      @(negedge clk);
      check(q == v, "kept after retention released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
