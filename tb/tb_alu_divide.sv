// Testbench for alu_divide: random and corner operands (divide by 0, by 1,
// a < b, a = b) against / and %, done exactly W = 32 cycles after start.
module tb_alu_divide;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [31:0] a = '0, b = '0, q, r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alu_divide #(.W(32)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] eq, er;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      case (i)
        0: begin a = 32'd12345; b = 32'd0; end
        1: begin a = 32'hFFFF_FFFF; b = 32'd1; end
        2: begin a = 32'd7; b = 32'd9; end
        3: begin a = 32'd99; b = 32'd99; end
        default: begin
          a = $urandom;
          b = (i % 2 == 0) ? 32'($urandom_range(1, 5000)) : $urandom;
        end
      endcase
      eq = (b == 0) ? 32'hFFFF_FFFF : a / b;
      er = (b == 0) ? a : a % b;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n = 1;
      while (!done && n < 100) begin @(negedge clk); n++; end
      checks++;
      if (q != eq || r != er || n != 33) begin
        failures++;
        $display("FAIL %0d / %0d = %0d r %0d (exp %0d r %0d) after %0d cycles", a, b, q, r, eq, er, n);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
