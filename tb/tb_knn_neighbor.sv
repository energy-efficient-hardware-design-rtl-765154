// Testbench for knn_neighbor: streams random distances (with many ties and
// gaps), and after each one compares the K = 5 kept entries with the first
// five of a stably sorted copy of all distances seen since the last clear.
module tb_knn_neighbor;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, d_valid = 1'b0;
  logic [32:0] d = '0;
  logic [18:0] d_idx = '0;
  logic [32:0] nn_dist[5];
  logic [18:0] nn_idx[5];
  logic [4:0]  nn_valid;
  typedef struct { longint dsq; int idx; } ent_t;
  ent_t seen[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  knn_neighbor #(.K(5), .DW(33), .IW(19)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    ent_t s[$];
    s = seen;
    // stable insertion sort by distance
    for (int i = 1; i < s.size(); i++) begin
      ent_t t;
      int j;
      t = s[i];
      j = i - 1;
      while (j >= 0 && s[j].dsq > t.dsq) begin s[j + 1] = s[j]; j--; end
      s[j + 1] = t;
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (k < s.size()) begin
        if (!nn_valid[k] || longint'(nn_dist[k]) != s[k].dsq || int'(nn_idx[k]) != s[k].idx) begin
          failures++;
          $display("FAIL entry %0d got %0d/%0d expected %0d/%0d", k, nn_dist[k], nn_idx[k], s[k].dsq, s[k].idx);
        end
      end else if (nn_valid[k]) begin
        failures++;
        $display("FAIL entry %0d valid too early", k);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 6; r++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      seen.delete();
      for (int i = 0; i < 300; i++) begin
        d_valid = 1'($urandom_range(0, 3) != 0);
        d = (r % 2 == 0) ? 33'($urandom_range(0, 40)) : {1'($urandom), $urandom};
        d_idx = 19'(i);
        if (d_valid) seen.push_back('{longint'(d), i});
        @(negedge clk);
        compare();
      end
      d_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
