// tb_dropout_rng: the generator must follow the xorshift reference sequence
// from its seed, hold its value when not stepped, replay the same sequence
// after the same seed is loaded again (the property that makes the forward
// and backward masks agree), and replace a zero seed.
module tb_dropout_rng;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, step = 0;
  logic [31:0] seed, rnd;
  dropout_rng dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    int unsigned r, first [100];
    seed = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 3; pass++) begin
      seed = (pass == 2) ? 32'h0 : 32'hC0FFEE11;
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      r = (seed == 0) ? 32'h2545_F491 : seed;
      for (int i = 0; i < 100; i++) begin
        chk(rnd == r, $sformatf("pass %0d number %0d: %08h exp %08h", pass, i, rnd, r));
        if (pass == 1) chk(rnd == first[i], "replay after reloading the seed");
        if (pass == 0) first[i] = rnd;
        if ($urandom_range(3) == 0) begin
          @(negedge clk);               // not stepped: must hold
          chk(rnd == r, "value held without step");
        end
        step = 1; @(negedge clk); step = 0;
        r = ref_xs(r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
