// Usage sweeps on lp_hls_top: the share of time the switchable domains are
// requested on is stepped through the levels used to characterise the
// design's power: MSB half of the adder at 90 %, 70 %, 50 % and 30 %, and
// the ALU's DIVIDE-MULTIPLY pair at 1-10 %, 10-40 %, 20-50 % and 30-60 %.
//
// Each level runs for 10 periods of 2000 cycles; in every period a domain is
// requested on for its share, then off. The measured share of cycles the
// domain was fully on must match the level to within 2 % (the power-up and
// power-down sequences take a few cycles each). Meanwhile random additions
// and ALU operations run and are checked; operations for an unpowered unit
// wait until it is on again. KNN is reduced to N = 64 as it is not used.
module tb_lp_hls_usage;
  import lp_pkg::*;
  localparam int PERIOD = 2000;
  localparam int NPER = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic jpeg_qt_we = 1'b0;
  logic [5:0] jpeg_qt_addr = '0;
  logic [7:0] jpeg_qt_data = '0;
  logic jpeg_coef_valid = 1'b0, jpeg_coef_ready;
  logic signed [11:0] jpeg_coef_data = '0;
  logic jpeg_pix_valid, jpeg_pix_ready = 1'b1;
  logic [7:0] jpeg_pix_data;
  logic jpeg_pso_req = 1'b0, jpeg_idct_idle, jpeg_fifo_empty;
  logic [3:0] jpeg_pwr;
  logic [15:0] jpeg_blocks_done;
  alu_op_e alu_sel = OP_AND;
  logic [31:0] alu_a = '0, alu_b = '0, alu_out;
  logic alu_op_valid = 1'b0, alu_op_ready, alu_out_valid;
  logic alu_mp = 1'b1, alu_dp = 1'b1, alu_mul_on, alu_div_on;
  logic [3:0] alu_mul_pwr, alu_div_pwr;
  logic rca_p_shutoff = 1'b1, rca_cin = 1'b0, rca_cout, rca_msb_on;
  logic [31:0] rca_a = '0, rca_b = '0, rca_sum;
  logic [3:0] rca_pwr;
  logic knn_start = 1'b0, knn_pt_valid = 1'b0, knn_pt_ready, knn_done;
  logic [31:0] knn_qx = '0, knn_qy = '0, knn_pt_x = '0, knn_pt_y = '0;
  logic [6:0] knn_n_points = '0;
  logic [5:0] knn_nn_idx[5];
  logic [31:0] knn_nn_dist[5];
  logic [4:0] knn_nn_valid;

  int checks = 0, failures = 0;
  int on_rca = 0, on_mul = 0, on_div = 0, n_cyc = 0;
  int n_ops = 0, n_adds = 0;
  bit running = 1'b1;

  always #5 clk = ~clk;

  lp_hls_top #(.KNN_N(64), .KNN_K(5)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (4 * NPER * PERIOD + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_cyc++;
    if (!rca_pwr[2] && !rca_pwr[1] && !rca_pwr[0]) on_rca++;
    if (alu_mul_on) on_mul++;
    if (alu_div_on) on_div++;
  end

  function automatic logic [31:0] alu_model(alu_op_e op, logic [31:0] x, logic [31:0] y);
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

  // Random ALU traffic for the whole run.
  initial begin
    logic [31:0] e;
    @(posedge rst_n);
    while (running) begin
      @(negedge clk);
      alu_sel = alu_op_e'($urandom_range(0, 7));
      alu_a = $urandom;
      alu_b = (alu_sel == OP_DIV) ? 32'($urandom_range(1, 1000)) : $urandom;
      e = alu_model(alu_sel, alu_a, alu_b);
      alu_op_valid = 1'b1;
      #1;
      while (!alu_op_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      alu_op_valid = 1'b0;
      while (!alu_out_valid) @(negedge clk);
      check(alu_out == e, $sformatf("ALU %s result", alu_sel.name()));
      n_ops++;
    end
  end

  // Random additions for the whole run, checked in the mode in force.
  initial begin
    logic [32:0] full;
    logic [16:0] low;
    @(posedge rst_n);
    while (running) begin
      @(negedge clk);
      rca_a = $urandom; rca_b = $urandom; rca_cin = 1'($urandom_range(0, 1));
      #1;
      full = 33'(rca_a) + 33'(rca_b) + 33'(rca_cin);
      low  = 17'(rca_a[15:0]) + 17'(rca_b[15:0]) + 17'(rca_cin);
      if (rca_msb_on) check({rca_cout, rca_sum} == full, "RCA 32-bit result");
      else            check(rca_sum[15:0] == low[15:0] && rca_sum[31:16] == 16'h0000, "RCA 16-bit result");
      n_adds++;
    end
  end

  task automatic run_level(input int rca_pct, input int div_pct, input int mul_pct);
    int c0, r0, m0, d0;
    real f_rca, f_mul, f_div;
    c0 = n_cyc; r0 = on_rca; m0 = on_mul; d0 = on_div;
    for (int p = 0; p < NPER; p++)
      for (int c = 0; c < PERIOD; c++) begin
        rca_p_shutoff = !(c < PERIOD * rca_pct / 100);
        alu_dp        = !(c < PERIOD * div_pct / 100);
        alu_mp        = !(c < PERIOD * mul_pct / 100);
        @(negedge clk);
      end
    f_rca = real'(on_rca - r0) / real'(n_cyc - c0);
    f_mul = real'(on_mul - m0) / real'(n_cyc - c0);
    f_div = real'(on_div - d0) / real'(n_cyc - c0);
    $display("level RCA %0d%% -> %.3f, DIV %0d%% -> %.3f, MULT %0d%% -> %.3f",
             rca_pct, f_rca, div_pct, f_div, mul_pct, f_mul);
    check(f_rca > rca_pct / 100.0 - 0.02 && f_rca < rca_pct / 100.0 + 0.02, "MSB_RCA usage share");
    check(f_div > div_pct / 100.0 - 0.02 && f_div < div_pct / 100.0 + 0.02, "DIVIDE usage share");
    check(f_mul > mul_pct / 100.0 - 0.02 && f_mul < mul_pct / 100.0 + 0.02, "MULTIPLY usage share");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_level(90, 1, 10);
    run_level(70, 10, 40);
    run_level(50, 20, 50);
    run_level(30, 30, 60);
    running = 1'b0;
    repeat (100) @(negedge clk);
    check(n_ops > 100 && n_adds > 1000, $sformatf("traffic: %0d operations, %0d additions", n_ops, n_adds));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
