// tb_sgc_top: end-to-end test of both accelerators in sgc_top.
//
// The convolutional BP accelerator runs one small layer (3 x 2 x 200 input
// gradient map, 2 x 2 filters, 32 output-side channels) whose bit-vector
// lines straddle DRAM lines and include an all-zero line, a line with
// exactly 16 ones and a dense line. The FC accelerator then runs a forward
// pass with dropout and three backward passes with the same seed (50 %,
// ~99.6 % and ~100 % dropout). Every gradient or activation written to the
// DRAM model is compared with a reference computed here, words around the
// output regions are checked to be untouched, and the number of DRAM data
// reads is checked against 1 + (collected filters) per MAC job. Both DRAM
// models stall at random. Each mechanism (filter skipping, empty group,
// multi-group line, two-line bit-vector, cached bit-vector line, zero
// insertion, DRAM stall, CNN forward pass writing the bit-vector, dropout
// masking, full table, 512-neuron segment limit, empty table, FP/BP mode
// switch) must occur at least once. The CNN forward pass (5 x 3 pixels, 40
// channels, ReLU) is checked word by word and bit by bit.
module tb_sgc_top;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- DUT ----------------
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

  dram_model #(.LAT(8), .STALL_PCT(10)) u_cdram (
    .clk, .req_valid(c_m_valid), .req_ready(c_m_ready), .req_we(c_m_we),
    .req_addr(c_m_addr), .req_wdata(c_m_wdata), .req_wmask(c_m_wmask),
    .rsp_valid(c_m_rsp_valid), .rsp_data(c_m_rsp_data));
  dram_model #(.LAT(8), .STALL_PCT(10)) u_fdram (
    .clk, .req_valid(f_m_valid), .req_ready(f_m_ready), .req_we(f_m_we),
    .req_addr(f_m_addr), .req_wdata(f_m_wdata), .req_wmask(f_m_wmask),
    .rsp_valid(f_m_rsp_valid), .rsp_data(f_m_rsp_data));

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FC table hand-outs seen
  int n_tbl_full = 0, n_seg_limit = 0;
  always @(posedge clk)
    if (u_top.u_fc.tbl_valid && u_top.u_fc.tbl_ready) begin
      if (u_top.u_fc.tbl_cnt == 5'd16) n_tbl_full++;
      if (u_top.u_fc.seg_len == 10'd512) n_seg_limit++;
    end

  localparam int SENT = 32'h5A5A_5A5A;

  // ---------------- CNN layer ----------------
  task automatic run_cnn();
    int IX = 3, IY = 2, IZ = 200, FX = 2, FY = 2, FN = 32;
    int PX = IX + FX - 1;
    int dout [][][];           // [py][px][k]
    int filt [][][][];         // [z][j][i][k]
    bit bv [][][];             // [y][x][z]
    longint exp_reads = 0;
    int cyc = 0;
    c_ix = 16'(IX); c_iy = 16'(IY); c_iz = 10'(IZ); c_fx = 4'(FX); c_fy = 4'(FY); c_fn = 16'(FN);
    c_dout_base = 1000; c_w_base = 5000; c_bv_base = 100; c_din_base = 36'(16*20000 + 5);
    dout = new[IY+FY-1];
    foreach (dout[py]) begin
      dout[py] = new[PX];
      foreach (dout[py][px]) begin
        dout[py][px] = new[FN];
        foreach (dout[py][px][k]) begin
          dout[py][px][k] = rnd_fx();
          u_cdram.wrw(36'((c_dout_base + (py*PX + px)*(FN/16)) * 16 + k), dout[py][px][k]);
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
            u_cdram.wrw(36'((c_w_base + ((z*FY + j)*FX + i)*(FN/16)) * 16 + k), filt[z][j][i][k]);
          end
        end
      end
    end
    bv = new[IY];
    foreach (bv[y]) begin
      bv[y] = new[IX];
      foreach (bv[y][x]) begin
        int pix = y*IX + x;
        int ones = 0;
        bv[y][x] = new[IZ];
        foreach (bv[y][x][z]) begin
          case (pix)
            1: bv[y][x][z] = 1'b0;                 // all zero
            2: bv[y][x][z] = (z < 16);             // exactly 16 ones, then zeros
            3: bv[y][x][z] = 1'b1;                 // dense
            default: bv[y][x][z] = ($urandom_range(99) < 40);
          endcase
          u_cdram.wrbit(longint'(c_bv_base) * 512 + longint'(pix*IZ + z), bv[y][x][z]);
          ones += int'(bv[y][x][z]);
        end
        // MAC jobs per group: FX*FY*FN/16, each 1 + (filters) reads
        exp_reads += longint'(FX*FY*(FN/16)) * (longint'(ones) + longint'((ones + 15) / 16));
      end
    end
    for (int e = -3; e < IX*IY*IZ + 3; e++) u_cdram.wrw(36'(longint'(c_din_base) + e), SENT);

    @(posedge clk); c_start <= 1'b1; @(posedge clk); c_start <= 1'b0;
    while (!c_done) begin @(posedge clk); cyc++; end
    $display("CNN layer done in %0d cycles, groups=%0d empty=%0d skipped=%0d bvreads=%0d span=%0d reads=%0d zeros=%0d",
             cyc, c_stats[0], c_stats[1], c_stats[2], c_stats[3], c_stats[4], c_stats[5], c_stats[6]);

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
          got = u_cdram.rdw(36'(longint'(c_din_base) + (y*IX + x)*IZ + z));
          check(got == s, $sformatf("dCin(%0d,%0d,%0d) = %0h, expected %0h", x, y, z, got, s));
        end
    for (int e = 1; e <= 3; e++) begin
      check(u_cdram.rdw(36'(longint'(c_din_base) - e)) == SENT, "word before dCin overwritten");
      check(u_cdram.rdw(36'(longint'(c_din_base) + IX*IY*IZ - 1 + e)) == SENT, "word after dCin overwritten");
    end
    check(longint'(c_stats[5]) == exp_reads,
          $sformatf("data reads %0d, expected %0d", c_stats[5], exp_reads));
    // mechanisms
    check(c_stats[2] > 0, "no filter was skipped");
    check(c_stats[1] > 0, "no empty group");
    check(c_stats[0] > 32'(IX*IY + 1), "no line needed several groups");
    check(c_stats[4] > 0, "no bit-vector line spanned two DRAM lines");
    check(c_stats[3] < 32'(IX*IY) + c_stats[4], "bit-vector line cache never reused");
    check(c_stats[6] > 0, "no zero gradient inserted");
    check(u_cdram.n_stalls > 0, "CNN DRAM never stalled");
  endtask

  // ---------------- forward pass writing the bit-vector ----------------
  // out(x,y,z) = relu(sum in'(x+i, y+j, k) * F_z(i, j, k)); the bit of
  // (x,y,z) is out > 0. Returns the bits for a following backward pass.
  task automatic run_fp(int IX, int IY, int IZ, int FX, int FY, int FN, ref bit obv [][][]);
    int PX = IX + FX - 1;
    int inp [][][];
    int filt [][][][];
    int cyc = 0, ones = 0;
    longint total = longint'(IX*IY*IZ);
    c_mode = 1'b0;
    c_ix = 16'(IX); c_iy = 16'(IY); c_iz = 10'(IZ); c_fx = 4'(FX); c_fy = 4'(FY); c_fn = 16'(FN);
    c_dout_base = 3000; c_w_base = 9000; c_bv_base = 300; c_din_base = 36'(16*40000 + 7);
    inp = new[IY+FY-1];
    foreach (inp[py]) begin
      inp[py] = new[PX];
      foreach (inp[py][px]) begin
        inp[py][px] = new[FN];
        foreach (inp[py][px][k]) begin
          inp[py][px][k] = rnd_fx();
          u_cdram.wrw(36'((c_dout_base + (py*PX + px)*(FN/16)) * 16 + k), inp[py][px][k]);
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
            u_cdram.wrw(36'((c_w_base + ((z*FY + j)*FX + i)*(FN/16)) * 16 + k), filt[z][j][i][k]);
          end
        end
      end
    end
    // bit-vector area filled with ones so that every written zero shows
    for (longint l = 0; l <= (total + 511) / 512 + 1; l++)
      for (int b = 0; b < 512; b++) u_cdram.wrbit(longint'(c_bv_base) * 512 + l * 512 + b, 1'b1);
    for (int e = -3; e < IX*IY*IZ + 3; e++) u_cdram.wrw(36'(longint'(c_din_base) + e), SENT);

    @(posedge clk); c_start <= 1'b1; @(posedge clk); c_start <= 1'b0;
    while (!c_done) begin @(posedge clk); cyc++; end
    $display("CNN forward pass done in %0d cycles, groups=%0d skipped=%0d bvreads=%0d reads=%0d bv line writes=%0d",
             cyc, c_stats[0], c_stats[2], c_stats[3], c_stats[5], c_stats[7]);

    obv = new[IY];
    for (int y = 0; y < IY; y++) begin
      obv[y] = new[IX];
      for (int x = 0; x < IX; x++) begin
        obv[y][x] = new[IZ];
        for (int z = 0; z < IZ; z++) begin
          int s = 0, got;
          longint b = longint'((y*IX + x)*IZ + z);
          line_t l;
          for (int j = 0; j < FY; j++)
            for (int i = 0; i < FX; i++)
              for (int k = 0; k < FN; k++)
                s += ref_mul(inp[y+j][x+i][k], filt[z][j][i][k]);
          if (s < 0) s = 0;
          got = u_cdram.rdw(36'(longint'(c_din_base) + b));
          check(got == s, $sformatf("FP out(%0d,%0d,%0d) = %0h, expected %0h", x, y, z, got, s));
          l = u_cdram.rd(ADDR_W'(longint'(c_bv_base) + b / 512));
          obv[y][x][z] = (s > 0);
          ones += int'(s > 0);
          check(l[b % 512] == (s > 0), $sformatf("FP bit (%0d,%0d,%0d) wrong", x, y, z));
        end
      end
    end
    begin
      line_t l = u_cdram.rd(ADDR_W'(longint'(c_bv_base) + (total + 511) / 512));
      check(l == '1, "line after the bit-vector overwritten");
      check(longint'(c_stats[7]) == (total + 511) / 512, "one write per bit-vector line");
    end
    check(c_stats[2] == 0 && c_stats[3] == 0, "forward pass skipped or read bits");
    check(ones > 0 && ones < IX*IY*IZ, "ReLU outputs all of one sign");
    c_mode = 1'b1;
  endtask

  // ---------------- FC layer ----------------
  task automatic run_fc(bit mode, int n_neu, int n_src, int unsigned rate, int unsigned seed,
                        int src_base, int w_base, longint dst_base);
    int src [];
    int w [][];
    bit keep [];
    int cyc = 0;
    int reads0 = int'(f_stats[3]);
    f_mode = mode; f_act = ACT_RELU; f_n_neu = 17'(n_neu); f_n_src = 17'(n_src);
    f_src_base = ADDR_W'(src_base); f_w_base = ADDR_W'(w_base); f_dst_base = EADDR_W'(dst_base);
    f_seed = seed; f_rate = rate; f_scale = 32'h0002_0000;   // 2.0
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

    @(posedge clk); f_start <= 1'b1; @(posedge clk); f_start <= 1'b0;
    while (!f_done) begin @(posedge clk); cyc++; end
    $display("FC %s n=%0d rate=%08h done in %0d cycles, steps=%0d empty=%0d dropped=%0d reads=%0d",
             mode ? "BP" : "FP", n_neu, rate, cyc, f_stats[0], f_stats[1], f_stats[2], f_stats[3]);
    for (int n = 0; n < n_neu; n++) begin
      int s = 0, e, got;
      foreach (src[k]) s += ref_mul(src[k], w[n][k]);
      if (!mode && s < 0) s = 0;
      e = keep[n] ? ref_mul(s, 32'h0002_0000) : 0;
      got = u_fdram.rdw(36'(dst_base + n));
      check(got == e, $sformatf("FC %s neuron %0d = %0h, expected %0h", mode ? "BP" : "FP", n, got, e));
    end
    check(u_fdram.rdw(36'(dst_base - 1)) == SENT, "word before FC output overwritten");
    check(u_fdram.rdw(36'(dst_base + n_neu)) == SENT, "word after FC output overwritten");
    begin
      int nk = 0;
      foreach (keep[n]) nk += int'(keep[n]);
      check(int'(f_stats[2]) == n_neu - nk, "dropped-neuron count");
      if (mode) begin
        // BP reads: per step n_src/16 jobs of 1 + kept reads; only kept rows read
        check(int'(f_stats[3]) - reads0 <= (n_src/16) * (nk + (nk + 15)/16 + n_neu/512 + 1),
              $sformatf("BP read %0d lines", int'(f_stats[3]) - reads0));
      end
    end
  endtask

  int n_fp = 0, n_bp = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_cnn();
    begin
      bit fbv [][][];
      run_fp(5, 3, 40, 2, 2, 16, fbv);
      check(c_stats[7] > 0, "forward pass wrote no bit-vector line");
    end
    run_fc(1'b0, 40, 32, 32'h8000_0000, 32'h1234, 200, 300, 16*700 + 3);   n_fp++;
    run_fc(1'b1, 100, 32, 32'h8000_0000, 32'h1234, 800, 900, 16*1500 + 7); n_bp++;
    run_fc(1'b1, 1100, 16, 32'hFF00_0000, 32'h9876, 2000, 3000, 16*5000);  n_bp++;
    run_fc(1'b1, 20, 16, 32'hFFFF_FFFF, 32'h55, 2500, 2600, 16*9000 + 1);  n_bp++;
    $display("mechanisms: table full %0d, segment limit %0d, empty table %0d, dropped %0d, FP %0d, BP %0d, FC stalls %0d",
             n_tbl_full, n_seg_limit, f_stats[1], f_stats[2], n_fp, n_bp, u_fdram.n_stalls);
    check(n_tbl_full > 0, "table never full");
    check(n_seg_limit > 0, "segment limit never reached");
    check(f_stats[1] > 0, "no empty table");
    check(n_fp > 0 && n_bp > 0, "mode switch FP -> BP");
    check(u_fdram.n_stalls > 0, "FC DRAM never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
