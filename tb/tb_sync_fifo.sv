// Testbench for sync_fifo: random writes and reads against a queue model,
// checking order, data, count, and that wr_ready drops exactly when full
// (reached at least once) and rd_valid when empty.
module tb_sync_fifo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_valid = 1'b0, rd_ready = 1'b0;
  logic wr_ready, rd_valid;
  logic [11:0] wr_data = '0, rd_data;
  logic [4:0] count;
  logic [11:0] model[$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(12), .DEPTH(16)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
    check(wr_ready == (model.size() < 16), "wr_ready");
    check(rd_valid == (model.size() > 0), "rd_valid");
    if (model.size() == 16) fulls++;
    if (model.size() == 0) empties++;
    if (rd_valid && rd_ready) begin
      check(rd_data == model[0], $sformatf("data %h expected %h", rd_data, model[0]));
      void'(model.pop_front());
    end
    if (wr_valid && wr_ready) model.push_back(wr_data);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 6; phase++) begin
      for (int i = 0; i < 500; i++) begin
        @(negedge clk);
        wr_valid = ($urandom_range(0, 99) < (phase[0] ? 80 : 30));
        rd_ready = ($urandom_range(0, 99) < (phase[0] ? 30 : 80));
        wr_data  = 12'($urandom);
      end
    end
    @(negedge clk);
    wr_valid = 1'b0;
    rd_ready = 1'b0;
    @(negedge clk);
    check(fulls > 0 && empties > 0, $sformatf("full seen %0d, empty seen %0d", fulls, empties));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
