// Testbench for alu_encoder: every SEL code gives exactly the enable bit of
// its operation.
module tb_alu_encoder;
  import lp_pkg::*;
  alu_op_e    sel;
  logic [7:0] en;
  int checks = 0, failures = 0;

  alu_encoder dut (.sel(sel), .en(en));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      sel = alu_op_e'(i);
      #1;
      checks++;
      if (en != (8'b1 << i)) begin
        failures++;
        $display("FAIL sel %0d en %b", i, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
