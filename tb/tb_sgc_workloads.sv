// tb_sgc_workloads: runs slices of the evaluated layers through sgc_top at
// its default sizes and measures the DRAM read savings.
//
// Convolutional BP: full-depth slices (all channels, all filters, one or two
// pixels) of a VGG-16 layer with 28x28x512 input gradients, 3x3x512 filters
// and 512 filters, and of an AlexNet layer with 13x13x384 input gradients,
// 3x3 filters and 256 filters. About 62 % and 66 % of the ReLU outputs are
// zero, the average zero ratios reported for the two networks; the bits are
// drawn at random with that density. FC: the forward and backward pass of
// an 800-neuron hidden layer (784 inputs, then 800 next-layer gradients) at
// dropout 0.5, and the backward pass of a 4096 x 1024 layer at dropout 0.3,
// 0.5 and 0.7.
//
// Every written gradient is compared with a reference. The read counts are
// compared with what a DianNao-style datapath without skipping would need
// (17 reads per MAC job, every filter or neuron computed) and printed as a
// ratio. Every backward-pass ratio must lie below 1 (the forward pass reads
// everything, as without skipping), and the CNN read counts must equal
// Fx*Fy*Fn/16 * (set bits + groups) exactly.
module tb_sgc_workloads;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic c_start = 0, c_busy, c_done, c_mode = 1'b1;
  logic [15:0] c_ix, c_iy; logic [9:0] c_iz; logic [3:0] c_fx, c_fy; logic [15:0] c_fn;
  logic [ADDR_W-1:0] c_dout_base, c_w_base, c_bv_base; logic [EADDR_W-1:0] c_din_base;
  logic c_m_valid, c_m_ready, c_m_we, c_m_rsp_valid; logic [ADDR_W-1:0] c_m_addr;
  line_t c_m_wdata, c_m_rsp_data; logic [LINE_WORDS-1:0] c_m_wmask;
  logic [7:0][31:0] c_stats;

  logic f_start = 0, f_busy, f_done, f_mode; act_e f_act;
  logic [16:0] f_n_neu, f_n_src; logic [ADDR_W-1:0] f_src_base, f_w_base;
  logic [EADDR_W-1:0] f_dst_base; logic [31:0] f_seed, f_rate; word_t f_scale;
  logic f_m_valid, f_m_ready, f_m_we, f_m_rsp_valid; logic [ADDR_W-1:0] f_m_addr;
  line_t f_m_wdata, f_m_rsp_data; logic [LINE_WORDS-1:0] f_m_wmask;
  logic [4:0][31:0] f_stats;

  sgc_top u_top (.*);

  dram_model #(.LAT(8), .STALL_PCT(0)) u_cdram (
    .clk, .req_valid(c_m_valid), .req_ready(c_m_ready), .req_we(c_m_we),
    .req_addr(c_m_addr), .req_wdata(c_m_wdata), .req_wmask(c_m_wmask),
    .rsp_valid(c_m_rsp_valid), .rsp_data(c_m_rsp_data));
  dram_model #(.LAT(8), .STALL_PCT(0)) u_fdram (
    .clk, .req_valid(f_m_valid), .req_ready(f_m_ready), .req_we(f_m_we),
    .req_addr(f_m_addr), .req_wdata(f_m_wdata), .req_wmask(f_m_wmask),
    .rsp_valid(f_m_rsp_valid), .rsp_data(f_m_rsp_data));

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- convolutional layer slice ----------------
  task automatic run_cnn(string name, int IX, int IY, int IZ, int FX, int FY, int FN, int ones_pct);
    int PX = IX + FX - 1;
    int dout [][][];
    int filt [][][][];
    bit bv [][][];
    longint exp_reads = 0, base_reads;
    int reads0 = int'(c_stats[5]);
    int cyc = 0;
    c_ix = 16'(IX); c_iy = 16'(IY); c_iz = 10'(IZ); c_fx = 4'(FX); c_fy = 4'(FY); c_fn = 16'(FN);
    c_dout_base = 1000; c_w_base = 100000; c_bv_base = 10; c_din_base = 36'(16*20000 + 3);
    dout = new[IY+FY-1];
    foreach (dout[py]) begin
      dout[py] = new[PX];
      foreach (dout[py][px]) begin
        dout[py][px] = new[FN];
        foreach (dout[py][px][k]) begin
          dout[py][px][k] = rnd_fx();
          u_cdram.wrw(EADDR_W'((longint'(c_dout_base) + longint'((py*PX + px)*(FN/16))) * 16 + longint'(k)),
                      dout[py][px][k]);
        end
      end
    end
    filt = new[IZ];
    foreach (filt[z]) begin
      filt[z] = new[FY];
      foreach (filt[z][j]) begin
        filt[z][j] = new[FX];
        foreach (filt[z][j][i]) begin
          filt[z][j][i] = new[FN];
          foreach (filt[z][j][i][k]) begin
            filt[z][j][i][k] = rnd_fx();
            u_cdram.wrw(EADDR_W'((longint'(c_w_base) + longint'(((z*FY + j)*FX + i)*(FN/16))) * 16
                                 + longint'(k)), filt[z][j][i][k]);
          end
        end
      end
    end
    bv = new[IY];
    foreach (bv[y]) begin
      bv[y] = new[IX];
      foreach (bv[y][x]) begin
        int ones = 0;
        bv[y][x] = new[IZ];
        foreach (bv[y][x][z]) begin
          bv[y][x][z] = ($urandom_range(99) < ones_pct);
          u_cdram.wrbit(longint'(c_bv_base) * 512 + longint'((y*IX + x)*IZ + z), bv[y][x][z]);
          ones += int'(bv[y][x][z]);
        end
        exp_reads += longint'(FX*FY*(FN/16)) * longint'(ones + (ones + 15) / 16);
      end
    end
    base_reads = longint'(IX*IY) * longint'(IZ/16) * longint'(FX*FY*(FN/16)) * 17;

    @(posedge clk); c_start <= 1'b1; @(posedge clk); c_start <= 1'b0;
    while (!c_done) begin @(posedge clk); cyc++; end

    for (int y = 0; y < IY; y++)
      for (int x = 0; x < IX; x++)
        for (int z = 0; z < IZ; z++) begin
          int s = 0;
          int got;
          if (bv[y][x][z])
            for (int j = 0; j < FY; j++)
              for (int i = 0; i < FX; i++)
                for (int k = 0; k < FN; k++)
                  s += ref_mul(dout[y+j][x+i][k], filt[z][j][i][k]);
          got = u_cdram.rdw(EADDR_W'(longint'(c_din_base) + longint'((y*IX + x)*IZ + z)));
          check(got == s, $sformatf("%s dCin(%0d,%0d,%0d) = %0h, expected %0h", name, x, y, z, got, s));
        end
    check(longint'(int'(c_stats[5]) - reads0) == exp_reads, $sformatf("%s data reads", name));
    check(exp_reads < base_reads, $sformatf("%s no read saving", name));
    $display("%s: %0d cycles, data reads %0d vs %0d without skipping (ratio %0.3f)",
             name, cyc, exp_reads, base_reads, real'(exp_reads) / real'(base_reads));
  endtask

  // ---------------- FC layer ----------------
  task automatic run_fc(string name, bit mode, int n_neu, int n_src, real rate_f, int unsigned seed);
    int src [];
    int w [][];
    bit keep [];
    int cyc = 0, nk = 0;
    int reads0 = int'(f_stats[3]);
    int unsigned rate = 32'(longint'(rate_f * 4294967296.0));
    longint base_reads;
    word_t scale = word_t'(int'(65536.0 / (1.0 - rate_f)));
    f_mode = mode; f_act = mode ? ACT_NONE : ACT_RELU; f_n_neu = 17'(n_neu); f_n_src = 17'(n_src);
    f_src_base = 10; f_w_base = 1000; f_dst_base = 36'(16*2000000);
    f_seed = seed; f_rate = rate; f_scale = scale;
    src = new[n_src];
    foreach (src[k]) begin src[k] = rnd_fx(); u_fdram.wrw(EADDR_W'(longint'(f_src_base)*16 + longint'(k)), src[k]); end
    w = new[n_neu];
    foreach (w[n]) begin
      w[n] = new[n_src];
      foreach (w[n][k]) begin
        w[n][k] = rnd_fx();
        u_fdram.wrw(EADDR_W'((longint'(f_w_base) + longint'(n*(n_src/16)))*16 + longint'(k)), w[n][k]);
      end
    end
    ref_keep(seed, rate, n_neu, keep);
    foreach (keep[n]) nk += int'(keep[n]);

    @(posedge clk); f_start <= 1'b1; @(posedge clk); f_start <= 1'b0;
    while (!f_done) begin @(posedge clk); cyc++; end

    for (int n = 0; n < n_neu; n++) begin
      int s = 0, e, got;
      foreach (src[k]) s += ref_mul(src[k], w[n][k]);
      if (!mode && s < 0) s = 0;
      e = keep[n] ? ref_mul(s, scale) : 0;
      got = u_fdram.rdw(EADDR_W'(longint'(f_dst_base) + longint'(n)));
      check(got == e, $sformatf("%s neuron %0d = %0h, expected %0h", name, n, got, e));
    end
    base_reads = longint'((n_neu + 15) / 16) * longint'(n_src / 16) * 17;
    if (mode) check(longint'(int'(f_stats[3]) - reads0) < base_reads, $sformatf("%s no read saving", name));
    $display("%s: %0d cycles, %0d of %0d neurons kept, data reads %0d vs %0d without skipping (ratio %0.3f)",
             name, cyc, nk, n_neu, int'(f_stats[3]) - reads0, base_reads,
             real'(int'(f_stats[3]) - reads0) / real'(base_reads));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_cnn("VGG-16 28x28x512 layer, 2 pixels", 2, 1, 512, 3, 3, 512, 38);
    run_cnn("AlexNet 13x13x384 layer, 2 pixels", 1, 2, 384, 3, 3, 256, 34);
    run_fc("MLP 800 hidden FP p=0.5", 1'b0, 800, 784, 0.5, 32'h1234_5678);
    run_fc("MLP 800 hidden BP p=0.5", 1'b1, 800, 800, 0.5, 32'h1234_5678);
    run_fc("FC 4096x1024 BP p=0.3", 1'b1, 1024, 4096, 0.3, 32'h0BAD_CAFE);
    run_fc("FC 4096x1024 BP p=0.5", 1'b1, 1024, 4096, 0.5, 32'h0BAD_CAFE);
    run_fc("FC 4096x1024 BP p=0.7", 1'b1, 1024, 4096, 0.7, 32'h0BAD_CAFE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
