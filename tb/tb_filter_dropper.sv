// tb_filter_dropper: forward and backward use of the same seed.
// FP: for a 40-neuron layer the bit-vectors of blocks of 16, 16 and 8
// neurons must match the reference mask, each ready one cycle per neuron
// after the request (plus one cycle to start), and the mask unit must zero
// dropped outputs and scale kept ones. BP: with the same seed, the tables
// handed out must list exactly the kept neurons in order, at most 16 per
// table, each table ending because it is full, because 512 neurons were
// scanned or because the layer ended, with a segment bit-vector equal to the
// mask over its range. Run at 50 % and ~99.6 % dropout.
module tb_filter_dropper;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, mode = 0, bv_req = 0, bv_valid, mask_in_valid = 0, mask_out_valid;
  logic [31:0] seed, rate;
  word_t scale;
  logic [16:0] n_neu;
  logic [4:0] bv_cnt;
  logic [15:0] bv;
  logic [15:0][31:0] mask_in, mask_out;
  logic tbl_valid, tbl_ready = 0, tbl_last;
  logic [15:0][15:0] tbl_idx;
  logic [4:0] tbl_cnt;
  logic [15:0] seg_first;
  logic [9:0] seg_len;
  line_t seg_bits;
  logic [31:0] n_dropped;

  filter_dropper dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic run_fp(int n, int unsigned s, int unsigned r);
    bit keep [];
    int nd = 0;
    ref_keep(s, r, n, keep);
    seed = s; rate = r; n_neu = 17'(n); mode = 0; scale = 32'h0001_8000;  // 1.5
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int b = 0; b < n; b += 16) begin
      int cnt, cyc;
      cnt = (n - b >= 16) ? 16 : n - b;
      bv_cnt = 5'(cnt); bv_req = 1;
      @(negedge clk); bv_req = 0;
      cyc = 1;
      while (!bv_valid && cyc < 40) begin @(negedge clk); cyc++; end
      chk(cyc == cnt + 1, $sformatf("bit-vector of %0d bits took %0d cycles", cnt, cyc));
      for (int i = 0; i < 16; i++) begin
        chk(bv[i] == (i < cnt ? keep[b + i] : 1'b0), $sformatf("FP bit %0d", b + i));
        if (i < cnt && !keep[b + i]) nd++;
      end
      // mask the block
      for (int i = 0; i < 16; i++) mask_in[i] = rnd_fx();
      mask_in_valid = 1; @(negedge clk); mask_in_valid = 0;
      chk(mask_out_valid, "mask valid");
      for (int i = 0; i < 16; i++)
        chk(int'(mask_out[i]) == (bv[i] ? ref_mul(int'(mask_in[i]), 32'h0001_8000) : 0),
            $sformatf("masked output %0d", i));
    end
    chk(int'(n_dropped) == nd, "FP dropped count");
  endtask

  task automatic run_bp(int n, int unsigned s, int unsigned r);
    bit keep [];
    int next = 0, kept_seen = 0, nk = 0;
    bit fin = 0;
    ref_keep(s, r, n, keep);
    foreach (keep[i]) nk += int'(keep[i]);
    seed = s; rate = r; n_neu = 17'(n); mode = 1; scale = 32'h0001_0000;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!fin) begin
      while (!tbl_valid) @(negedge clk);
      if ($urandom_range(2) == 0) begin @(negedge clk); continue; end  // late ready
      chk(int'(seg_first) == next, $sformatf("segment starts at %0d, exp %0d", seg_first, next));
      begin
        int k = 0, endn;
        endn = next + int'(seg_len) - 1;
        chk(seg_len > 0 && endn < n, "segment length");
        for (int m = next; m <= endn; m++) begin
          chk(seg_bits[m - next] == keep[m], $sformatf("segment bit of neuron %0d", m));
          if (keep[m]) begin
            chk(k < 16 && int'(tbl_idx[k]) == m, $sformatf("table entry %0d = %0d, exp %0d", k, tbl_idx[k], m));
            k++;
          end
        end
        chk(int'(tbl_cnt) == k, "table count");
        chk((k == 16 && keep[endn]) || seg_len == 10'd512 || endn == n - 1, "reason for hand-out");
        chk(tbl_last == (endn == n - 1), "last flag");
        kept_seen += k;
        next = endn + 1;
        fin = tbl_last;
      end
      tbl_ready = 1; @(negedge clk); tbl_ready = 0;
    end
    chk(kept_seen == nk, "all kept neurons listed");
    chk(int'(n_dropped) == n - nk, "BP dropped count");
  endtask

  initial begin
    seed = '0; rate = '0; scale = '0; n_neu = '0; bv_cnt = '0; mask_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_fp(40, 32'hABCD, 32'h8000_0000);
    run_bp(40, 32'hABCD, 32'h8000_0000);
    run_bp(700, 32'h777, 32'h8000_0000);
    run_bp(1500, 32'h31, 32'hFF00_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
