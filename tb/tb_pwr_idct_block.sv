// Testbench for pwr_idct_block.
//
// Sends JPEG-like 8x8 blocks and compares every output sample with a
// floating-point IDCT (+128, clamped) within +-1. Between blocks the IDCT
// domain is switched off and on again; in some rounds the next block's 64
// coefficients are sent while the domain is off, so they wait in the FIFO.
// Checks: no output while isolated, the clock gate is closed exactly while
// the domain is off, the block count survives shut-off (retention), and the
// FIFO accepts all 64 coefficients while the IDCT sleeps. Counts each
// mechanism (shut-offs, wake-ups, blocks buffered while off, retained
// restores) and fails if one never happened.
module tb_pwr_idct_block;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pso_req = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [11:0] in_data = '0;
  logic out_valid, out_ready = 1'b1;
  logic [7:0] out_data;
  logic idle, fifo_empty, iso_enable, ret_enable, pso_enable, cg;
  logic [15:0] blocks_done;
  int checks = 0, failures = 0;
  int n_off = 0, n_on = 0, n_buffered = 0, n_restored = 0, gclk_while_off = 0;
  int coef[64];
  int expv[64];
  int exp_q[$];
  localparam int NBLK = 12;

  always #5 clk = ~clk;

  pwr_idct_block #(.CW(12), .FIFO_DEPTH(64)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (NBLK * 600) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_block(input int b);
    real pi, s, cu, cv;
    pi = 3.14159265358979;
    for (int i = 0; i < 64; i++) coef[i] = 0;
    coef[0] = int'($urandom_range(0, 1600)) - 800;
    for (int i = 1; i < 64; i++)
      if ($urandom_range(0, 99) < ((i < 20) ? 40 : 8)) coef[i] = int'($urandom_range(0, 300)) - 150;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        s = 0.0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            s += cu * cv / 4.0 * real'(coef[v * 8 + u]) *
                 $cos((2.0 * x + 1.0) * u * pi / 16.0) * $cos((2.0 * y + 1.0) * v * pi / 16.0);
          end
        s += 128.0;
        if (s < 0.0) s = 0.0;
        if (s > 255.0) s = 255.0;
        expv[y * 8 + x] = int'(s);
      end
    for (int i = 0; i < 64; i++) exp_q.push_back(expv[i]);
  endtask

  task automatic send_block();
    for (int i = 0; i < 64; i++) begin
      in_valid = 1'b1;
      in_data  = 12'(coef[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  // Output checker and isolation / clock checks.
  always @(posedge clk) if (rst_n) begin
    if (iso_enable) check(!out_valid, "no output while isolated");
    if (out_valid && out_ready) begin
      int d;
      d = int'(out_data) - exp_q[0];
      check(exp_q.size() > 0 && d <= 1 && d >= -1,
            $sformatf("sample %0d expected %0d", out_data, exp_q[0]));
      void'(exp_q.pop_front());
    end
  end
  always @(posedge clk) if (rst_n && (pso_enable != cg)) gclk_while_off++;

  task automatic power_off();
    logic [15:0] kept;
    kept = blocks_done;
    pso_req = 1'b1;
    while (!pso_enable) @(negedge clk);
    n_off++;
    repeat (5) @(negedge clk);
    pso_req = 1'b0;
    while (iso_enable) @(negedge clk);
    n_on++;
    check(blocks_done == kept, "retained block count after wake-up");
    if (kept != 0) n_restored++;
  endtask

  initial begin
    int done_before;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      make_block(b);
      if (b % 3 == 1) begin
        // Shut off, then send the block while asleep: it must wait in the FIFO.
        done_before = blocks_done;
        pso_req = 1'b1;
        while (!pso_enable) @(negedge clk);
        n_off++;
        send_block();
        check(!fifo_empty && pso_enable, "block buffered while the IDCT is off");
        n_buffered++;
        pso_req = 1'b0;
        while (iso_enable) @(negedge clk);
        n_on++;
        check(int'(blocks_done) == done_before, "count kept across shut-off");
        if (done_before != 0) n_restored++;
      end else begin
        send_block();
      end
      while (exp_q.size() != 0) @(negedge clk);
      repeat (2) @(negedge clk);
      check(int'(blocks_done) == b + 1, $sformatf("blocks_done %0d after block %0d", blocks_done, b));
      check(idle && fifo_empty, "idle between blocks");
      if (b % 3 == 2) power_off();
    end
    check(gclk_while_off == 0, "clock gated exactly while off");
    check(n_off >= 4 && n_on >= 4, "shut-off and wake-up happened");
    check(n_buffered >= 3, "blocks buffered while off");
    check(n_restored >= 3, "retention restored a non-zero count");
    $display("shut-offs %0d wake-ups %0d buffered %0d restored %0d", n_off, n_on, n_buffered, n_restored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
