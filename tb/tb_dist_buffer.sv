// Testbench for dist_buffer: writes random words to random addresses of a
// small instance while reading others, and checks every read against a
// model, one cycle after the address; rdata holds when re is low.
module tb_dist_buffer;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [32:0] wdata = '0, rdata;
  logic [32:0] model[1000];
  logic [32:0] exp_r;
  logic exp_v = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dist_buffer #(.DEPTH(1000), .WIDTH(33), .AW(10)) dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      we = 1'b1; waddr = 10'(i); wdata = {1'($urandom), $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      we = 1'($urandom_range(0, 1));
      waddr = 10'($urandom_range(0, 999));
      wdata = {1'($urandom), $urandom};
      re = 1'($urandom_range(0, 3) != 0);
      raddr = 10'($urandom_range(0, 999));
      if (re) exp_r = model[raddr];  // read-before-write on a collision
      @(posedge clk);
      #1;
      if (re || exp_v) begin
        checks++;
        if (rdata != exp_r) begin failures++; $display("FAIL read %0d got %h expected %h", raddr, rdata, exp_r); end
      end
      exp_v = 1'b1;
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
