// Testbench for alu_multiply: random operands, result and done one cycle
// after start, product kept while start is low.
module tb_alu_multiply;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  logic [31:0] a = '0, b = '0, p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alu_multiply #(.W(32)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      a = $urandom; b = (i % 3 == 0) ? 32'($urandom_range(0, 1000)) : $urandom;
      e = a * b;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      a = $urandom;
      checks++;
      if (!done || p != e) begin failures++; $display("FAIL product %h expected %h", p, e); end
      @(negedge clk);
      checks++;
      if (done || p != e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
