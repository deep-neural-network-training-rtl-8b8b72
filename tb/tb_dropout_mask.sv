// tb_dropout_mask: random NFU outputs, bit-vectors and scale factors; each
// output must be the input times the Q16.16 scale where its bit is 1 and
// zero where it is 0, one cycle after the input.
module tb_dropout_mask;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic [15:0] bits;
  word_t scale;
  logic [15:0][31:0] in, out;
  dropout_mask dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bits = '0; scale = '0; in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = 1; bits = 16'($urandom);
      scale = (t % 3 == 0) ? 32'h0001_0000 : 32'($urandom_range(32'h0004_0000));
      for (int i = 0; i < 16; i++) in[i] = rnd_fx();
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid"); end
      for (int i = 0; i < 16; i++) begin
        int e;
        e = bits[i] ? ref_mul(int'(in[i]), int'(scale)) : 0;
        checks++;
        if (int'(out[i]) != e) begin failures++; $display("FAIL: lane %0d %0h exp %0h", i, out[i], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
