// tb_nfu: checks one NFU against a reference sum of truncated Q16.16
// products: accumulation over several inputs between 'first' and 'last',
// ReLU and pass-through activation, a disabled unit, and the three-stage
// latency (result exactly 3 cycles after the 'last' input).
module tb_nfu;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, en = 1, first = 0, last = 0;
  act_e act = ACT_NONE;
  logic [NFU_IN-1:0][DATA_W-1:0] a, w;
  logic out_valid; word_t out;

  nfu dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_cyc = -1, exp_q[$];
  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (out != e || cyc - last_cyc != 3) begin
        failures++;
        $display("FAIL: out %0h exp %0h latency %0d", out, e, cyc - last_cyc);
      end
    end
  end

  initial begin
    a = '0; w = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int n, s;
      bit relu, ena;
      n = 1 + $urandom_range(4);
      s = 0;
      relu = $urandom_range(1);
      ena = ($urandom_range(9) != 0);
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        in_valid = 1; first = (k == 0); last = (k == n-1); en = ena;
        act = relu ? ACT_RELU : ACT_NONE;
        for (int i = 0; i < NFU_IN; i++) begin
          a[i] = rnd_fx(); w[i] = rnd_fx();
          if (ena) s += ref_mul(a[i], w[i]);
        end
        if (k == n-1) begin
          if (relu && s < 0) s = 0;
          exp_q.push_back(s);
          last_cyc = cyc + 1;
        end
        // random idle cycle between inputs of the same sum
        if ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk); in_valid = 0;
      repeat (4) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
