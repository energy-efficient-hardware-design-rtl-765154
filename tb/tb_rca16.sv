// Testbench for rca16: random and corner operands (all ones, carry through
// every bit) against a + b + ci.
module tb_rca16;
  logic [15:0] a, b, s;
  logic ci, co;
  int checks = 0, failures = 0;

  rca16 #(.W(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i == 0)      begin a = 16'hFFFF; b = 16'h0000; ci = 1'b1; end
      else if (i == 1) begin a = 16'hFFFF; b = 16'hFFFF; ci = 1'b1; end
      else begin a = 16'($urandom); b = 16'($urandom); ci = 1'($urandom_range(0, 1)); end
      #1;
      checks++;
      if ({co, s} != 17'(a) + 17'(b) + 17'(ci)) begin
        failures++;
        $display("FAIL %h + %h + %b = %b_%h", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
