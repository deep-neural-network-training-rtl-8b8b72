// tb_fc_dropout_accel: a fully connected layer through the dropout
// accelerator: forward pass (20 neurons from 48 inputs, no activation, 30 %
// dropout, outputs scaled by 2.0) and then backward passes with the same
// seed (64 and 300 neurons from 48 gradients). Every value written to the
// DRAM model is compared with a reference using the regenerated mask,
// neighbours must be untouched, and the backward pass must read no more
// weight rows than there are kept neurons.
module tb_fc_dropout_accel;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, cfg_mode; act_e cfg_act;
  logic [16:0] cfg_n_neu, cfg_n_src; logic [ADDR_W-1:0] cfg_src_base, cfg_w_base;
  logic [EADDR_W-1:0] cfg_dst_base; logic [31:0] cfg_seed, cfg_rate; word_t cfg_scale;
  logic m_valid, m_ready, m_we, m_rsp_valid; logic [ADDR_W-1:0] m_addr;
  line_t m_wdata, m_rsp_data; logic [LINE_WORDS-1:0] m_wmask;
  logic [31:0] n_steps, n_empty_steps, n_dropped, n_data_reads, n_zero_ins;

  fc_dropout_accel dut (.*);
  dram_model #(.LAT(10), .STALL_PCT(5)) u_fdram (
    .clk, .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we),
    .req_addr(m_addr), .req_wdata(m_wdata), .req_wmask(m_wmask),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int SENT = 32'h5A5A_5A5A;

  // ---------------- FC layer ----------------
  task automatic run_fc(bit mode, int n_neu, int n_src, int unsigned rate, int unsigned seed,
                        int src_base, int w_base, longint dst_base);
    int src [];
    int w [][];
    bit keep [];
    int cyc = 0;
    int reads0 = int'(n_data_reads);
    cfg_mode = mode; cfg_act = ACT_NONE; cfg_n_neu = 17'(n_neu); cfg_n_src = 17'(n_src);
    cfg_src_base = ADDR_W'(src_base); cfg_w_base = ADDR_W'(w_base); cfg_dst_base = EADDR_W'(dst_base);
    cfg_seed = seed; cfg_rate = rate; cfg_scale = 32'h0002_0000;   // 2.0
    src = new[n_src];
    foreach (src[k]) begin src[k] = rnd_fx(); u_fdram.wrw(36'(src_base*16 + k), src[k]); end
    w = new[n_neu];
    foreach (w[n]) begin
      w[n] = new[n_src];
      foreach (w[n][k]) begin
        w[n][k] = rnd_fx();
        u_fdram.wrw(36'((w_base + n*(n_src/16))*16 + k), w[n][k]);
      end
    end
    for (int e = -2; e < n_neu + 2; e++) u_fdram.wrw(36'(dst_base + e), SENT);
    ref_keep(seed, rate, n_neu, keep);

    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    while (!done) begin @(posedge clk); cyc++; end
    $display("FC %s n=%0d rate=%08h done in %0d cycles, steps=%0d empty=%0d dropped=%0d reads=%0d",
             mode ? "BP" : "FP", n_neu, rate, cyc, n_steps, n_empty_steps, n_dropped, n_data_reads);
    for (int n = 0; n < n_neu; n++) begin
      int s = 0, e, got;
      foreach (src[k]) s += ref_mul(src[k], w[n][k]);
            e = keep[n] ? ref_mul(s, 32'h0002_0000) : 0;
      got = u_fdram.rdw(36'(dst_base + n));
      check(got == e, $sformatf("FC %s neuron %0d = %0h, expected %0h", mode ? "BP" : "FP", n, got, e));
    end
    check(u_fdram.rdw(36'(dst_base - 1)) == SENT, "word before FC output overwritten");
    check(u_fdram.rdw(36'(dst_base + n_neu)) == SENT, "word after FC output overwritten");
    begin
      int nk = 0;
      foreach (keep[n]) nk += int'(keep[n]);
      check(int'(n_dropped) == n_neu - nk, "dropped-neuron count");
      if (mode) begin
        // BP reads: per step n_src/16 jobs of 1 + kept reads; only kept rows read
        check(int'(n_data_reads) - reads0 <= (n_src/16) * (nk + (nk + 15)/16 + n_neu/512 + 1),
              $sformatf("BP read %0d lines", int'(n_data_reads) - reads0));
      end
    end
  endtask


  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_fc(1'b0, 20, 48, 32'h4CCC_CCCD, 32'hBEEF, 100, 200, 16*400 + 9);
    run_fc(1'b1, 64, 48, 32'h4CCC_CCCD, 32'hBEEF, 500, 600, 16*900 + 2);
    run_fc(1'b1, 300, 48, 32'h4CCC_CCCD, 32'hBEEF, 1000, 1100, 16*3000 + 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
