// tb_filter_collector: the grouping of bit-vector lines into sets of up to
// 16 filters. First the 64-bit example line (groups ending at bits 27, 53
// and 63 with 16, 16 and 3 set bits), then random lines of random length
// and density, including empty, full and exactly-16-ones lines, against a
// reference grouping. With grp_ready held high, the groups of a line must
// come out on consecutive cycles (one group per cycle).
module tb_filter_collector;
  import sgc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic line_valid = 0, line_ready, grp_valid, grp_ready = 0, grp_last;
  logic [511:0] line;
  logic [9:0] line_len;
  logic [15:0][8:0] grp_pos;
  logic [4:0] grp_cnt;
  logic [8:0] grp_start, grp_end;
  logic [511:0] grp_bits;

  filter_collector dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  // Feed one line and compare every group with the reference.
  task automatic run_line(logic [511:0] l, int len, int exp_groups = -1);
    int ones[$];
    int g = 0, st = 0, first_cyc = -1, c = 0;
    bit done = 0;
    for (int p = 0; p < len; p++) if (l[p]) ones.push_back(p);
    @(negedge clk);
    line = l; line_len = 10'(len); line_valid = 1;
    @(negedge clk);
    line_valid = 0;
    grp_ready = 1;
    while (!done) begin
      c++;
      if (grp_valid) begin
        int base, rem, cnt, en;
        base = 16 * g;
        rem = ones.size() - base;
        cnt = rem >= 16 ? 16 : rem;
        en  = rem >= 16 ? ones[base + 15] : len - 1;
        if (first_cyc < 0) first_cyc = c;
        chk(c - first_cyc == g, $sformatf("group %0d not on consecutive cycle", g));
        chk(int'(grp_cnt) == cnt, $sformatf("group %0d cnt %0d exp %0d", g, grp_cnt, cnt));
        chk(int'(grp_start) == st, $sformatf("group %0d start %0d exp %0d", g, grp_start, st));
        chk(int'(grp_end) == en, $sformatf("group %0d end %0d exp %0d", g, grp_end, en));
        chk(grp_last == (en == len - 1), "last flag");
        for (int j = 0; j < cnt; j++)
          chk(int'(grp_pos[j]) == ones[base + j], $sformatf("group %0d pos %0d", g, j));
        st = en + 1;
        g++;
        if (grp_last) done = 1;
      end
      @(negedge clk);
      if (c > 100) begin chk(0, "line never finished"); done = 1; end
    end
    grp_ready = 0;
    if (exp_groups >= 0) chk(g == exp_groups, $sformatf("%0d groups, expected %0d", g, exp_groups));
  endtask

  initial begin
    logic [511:0] l;
    string bv3, bv2, bv1, all;
    line = '0; line_len = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Example line, written from bit 63 down to bit 0.
    bv3 = "0000110010";
    bv2 = "11011101101001110111010001";
    bv1 = "1110110010001111001100001111";
    all = {bv3, bv2, bv1};
    l = '0;
    for (int i = 0; i < 64; i++) l[63 - i] = (all[i] == "1");
    run_line(l, 64, 3);
    // empty line, exactly 16 ones followed by zeros, full line
    run_line('0, 100, 1);
    l = '0; l[15:0] = '1; run_line(l, 40, 2);
    run_line('1, 512, 32);
    for (int t = 0; t < 300; t++) begin
      int len, dens;
      len  = 1 + $urandom_range(511);
      dens = $urandom_range(100);
      for (int p = 0; p < 512; p++) l[p] = ($urandom_range(99) < dens);
      run_line(l, len);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
