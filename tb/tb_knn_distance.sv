// Testbench for knn_distance: random latitude/longitude-like points streamed
// one per cycle with gaps, plus points equal to the query and points far
// apart; each distance and index is compared bit for bit with a binary32
// reference computed here, three cycles after entry.
`include "fp_ref.svh"
module tb_knn_distance;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] qx = '0, qy = '0, pt_x = '0, pt_y = '0, d;
  logic pt_valid = 1'b0, d_valid;
  logic [18:0] pt_idx = '0, d_idx;
  logic [31:0] exp_d[$];
  int exp_i[$];
  int exp_t[$];
  int cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  knn_distance #(.IW(19)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (d_valid) begin
      checks++;
      if (exp_d.size() == 0 || d != exp_d[0] || int'(d_idx) != exp_i[0] || cyc - exp_t[0] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL d=%h idx=%0d expected %h", d, d_idx, exp_d.size() ? exp_d[0] : 0);
      end
      if (exp_d.size() > 0) begin
        void'(exp_d.pop_front()); void'(exp_i.pop_front()); void'(exp_t.pop_front());
      end
    end
    if (pt_valid) begin
      exp_d.push_back(fp_dist(pt_x, pt_y, qx, qy));
      exp_i.push_back(int'(pt_idx));
      exp_t.push_back(cyc);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    qx = rand_coord(90); qy = rand_coord(180);
    for (int i = 0; i < 3000; i++) begin
      if (i == 1000) begin qx = rand_coord(180); qy = rand_coord(180); end
      pt_valid = 1'($urandom_range(0, 4) != 0);
      pt_x = rand_coord(90);
      pt_y = rand_coord(180);
      if (i % 50 == 7) begin pt_x = qx; pt_y = qy; end                 // zero distance
      if (i % 50 == 8) begin pt_x = qx; end                            // one axis only
      if (i % 50 == 9) begin pt_x = qx ^ 32'h1; end                    // smallest step
      if (i % 50 == 10) begin pt_x = {~qx[31], qx[30:0]}; end          // mirrored
      pt_idx = 19'(i);
      @(negedge clk);
      if (i == 999) begin pt_valid = 1'b0; repeat (4) @(negedge clk); end
    end
    pt_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_d.size() != 0) begin failures++; $display("FAIL %0d distances missing", exp_d.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
