// tb_nfu_array: sixteen NFUs fed with one shared activation vector and one
// weight vector each, accumulating over 1..4 inputs. Disabled slots must
// produce zero; every NFU result is compared with a reference, and the
// result must appear 3 cycles after the last input.
module tb_nfu_array;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, first = 0, last = 0;
  logic [NFU_N-1:0] slot_en;
  act_e act = ACT_NONE;
  logic [NFU_IN-1:0][DATA_W-1:0] a;
  logic [NFU_N-1:0][NFU_IN-1:0][DATA_W-1:0] w;
  logic out_valid;
  logic [NFU_N-1:0][DATA_W-1:0] out;

  nfu_array dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; w = '0; slot_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int n, lat;
      int s [NFU_N];
      n = 1 + $urandom_range(3);
      slot_en = 16'($urandom);
      foreach (s[q]) s[q] = 0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        in_valid = 1; first = (k == 0); last = (k == n-1);
        for (int i = 0; i < NFU_IN; i++) a[i] = rnd_fx();
        for (int q = 0; q < NFU_N; q++)
          for (int i = 0; i < NFU_IN; i++) begin
            w[q][i] = rnd_fx();
            if (slot_en[q]) s[q] += ref_mul(a[i], w[q][i]);
          end
      end
      @(negedge clk); in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 3) begin failures++; $display("FAIL: latency %0d", lat); end
      for (int q = 0; q < NFU_N; q++) begin
        checks++;
        if (int'(out[q]) != s[q]) begin
          failures++; $display("FAIL: NFU%0d %0h exp %0h", q, out[q], s[q]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
