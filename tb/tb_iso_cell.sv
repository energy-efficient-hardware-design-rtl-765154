// Testbench for iso_cell: random data with isolation off passes unchanged;
// with isolation on the output is the clamp value, for two clamp values.
module tb_iso_cell;
  logic        iso;
  logic [15:0] d;
  logic [15:0] q0, q1;
  int checks = 0;
  int failures = 0;

  iso_cell #(.WIDTH(16), .CLAMP(16'h0000)) dut0 (.iso_enable(iso), .d(d), .q(q0));
  iso_cell #(.WIDTH(16), .CLAMP(16'hA5C3)) dut1 (.iso_enable(iso), .d(d), .q(q1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      iso = 1'($urandom_range(0, 1));
      d   = 16'($urandom);
      #1;
      checks++;
      if (q0 !== (iso ? 16'h0000 : d) || q1 !== (iso ? 16'hA5C3 : d)) begin
        failures++;
        $display("FAIL iso=%b d=%h q0=%h q1=%h", iso, d, q0, q1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
