// Testbench for pwr_alu.
//
// Issues random operations of all eight kinds and compares each result with
// the value computed here, and its latency (1 cycle for the basic
// operations, 2 for MULTIPLY, 34 for DIVIDE). MP and DP are raised and
// lowered at random, so the multiplier and divider domains are switched off
// and on; the testbench checks that an operation for a switched-off unit is
// held (op_ready low) until the unit is on again, and counts shut-offs,
// wake-ups and held operations for each unit.
module tb_pwr_alu;
  import lp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  alu_op_e sel = OP_AND;
  logic [31:0] a = '0, b = '0, out;
  logic op_valid = 1'b0, op_ready, out_valid;
  logic mp = 1'b0, dp = 1'b0, mul_on, div_on;
  logic [3:0] mul_pwr, div_pwr;
  int checks = 0, failures = 0;
  int n_op[8];
  int mul_off = 0, div_off = 0, mul_held = 0, div_held = 0;
  logic mul_pso_d = 1'b0, div_pso_d = 1'b0;

  always #5 clk = ~clk;

  pwr_alu #(.W(32)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    mul_pso_d <= mul_pwr[2];
    div_pso_d <= div_pwr[2];
    if (mul_pwr[2] && !mul_pso_d) mul_off++;
    if (div_pwr[2] && !div_pso_d) div_off++;
  end

  // Power requests change at random, independently of the operations.
  initial begin
    forever begin
      repeat ($urandom_range(20, 120)) @(negedge clk);
      mp = 1'($urandom_range(0, 1));
      dp = 1'($urandom_range(0, 1));
    end
  end

  function automatic logic [31:0] model(alu_op_e op, logic [31:0] x, logic [31:0] y);
    case (op)
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_SHL: return x << y[4:0];
      OP_SHR: return x >> y[4:0];
      OP_MUL: return x * y;
      default: return (y == 0) ? 32'hFFFF_FFFF : x / y;
    endcase
  endfunction

  initial begin
    logic [31:0] e;
    int lat, wait_c, exp_lat;
    logic was_off;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 1500; i++) begin
      sel = alu_op_e'($urandom_range(0, 7));
      a = $urandom;
      b = (sel == OP_DIV) ? 32'($urandom_range(0, 70000)) : $urandom;
      e = model(sel, a, b);
      op_valid = 1'b1;
      wait_c = 0;
      #1;
      was_off = (sel == OP_MUL && !mul_on) || (sel == OP_DIV && !div_on);
      while (!op_ready) begin
        @(negedge clk);
        wait_c++;
        #1;
      end
      if (was_off && wait_c > 0 && sel == OP_MUL) mul_held++;
      if (was_off && wait_c > 0 && sel == OP_DIV) div_held++;
      if (sel == OP_MUL) check(mul_on, "multiply issued only when on");
      if (sel == OP_DIV) check(div_on, "divide issued only when on");
      @(negedge clk);
      op_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      exp_lat = (sel == OP_MUL) ? 2 : (sel == OP_DIV) ? 34 : 1;
      check(out == e, $sformatf("op %s %h,%h = %h expected %h", sel.name(), a, b, out, e));
      check(lat == exp_lat, $sformatf("op %s latency %0d expected %0d", sel.name(), lat, exp_lat));
      n_op[sel]++;
    end
    for (int k = 0; k < 8; k++) check(n_op[k] > 50, $sformatf("operation %0d issued %0d times", k, n_op[k]));
    check(mul_off > 5 && div_off > 5, $sformatf("shut-offs mul %0d div %0d", mul_off, div_off));
    check(mul_held > 0 && div_held > 0, $sformatf("held operations mul %0d div %0d", mul_held, div_held));
    $display("shut-offs mul %0d div %0d, held mul %0d div %0d", mul_off, div_off, mul_held, div_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
