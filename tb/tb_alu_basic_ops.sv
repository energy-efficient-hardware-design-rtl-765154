// Testbench for alu_basic_ops: random operands against the six operations
// computed here.
module tb_alu_basic_ops;
  logic [31:0] a, b, and_r, or_r, add_r, sub_r, shl_r, shr_r;
  int checks = 0, failures = 0;

  alu_basic_ops #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = (i % 2 == 0) ? $urandom : 32'($urandom_range(0, 31));
      #1;
      checks++;
      if (and_r != (a & b) || or_r != (a | b) || add_r != a + b || sub_r != a - b ||
          shl_r != (a << (b % 32)) || shr_r != (a >> (b % 32))) begin
        failures++;
        $display("FAIL a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
