// tb_dropout_table: random pushes and clears against a reference queue:
// entries in push order, count, full at 16 entries, pushes ignored when
// full, and a push in the clearing cycle becoming the first new entry.
module tb_dropout_table;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, push = 0, full;
  logic [15:0] idx;
  logic [15:0][15:0] entries;
  logic [4:0] count;
  dropout_table dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q[$];
  int n_full = 0;
  initial begin
    idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || full != (q.size() == 16)) begin
        failures++; $display("FAIL: count %0d exp %0d", count, q.size());
      end
      foreach (q[i]) begin
        checks++;
        if (int'(entries[i]) != q[i]) begin failures++; $display("FAIL: entry %0d", i); end
      end
      if (full) n_full++;
      push  = ($urandom_range(3) != 0);
      clear = ($urandom_range(24) == 0);
      idx   = 16'($urandom);
      if (clear) begin q.delete(); if (push) q.push_back(int'(idx)); end
      else if (push && q.size() < 16) q.push_back(int'(idx));
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
