// tb_cnn_bp_accel: one convolutional layer through the BP accelerator:
// 2 x 2 x 512 input-side gradient map (each bit-vector line is exactly one
// aligned DRAM line), 3 x 3 filters, 16 output-side channels. Pixel 1 has no
// set bit, pixel 2 exactly 16 and pixel 3 all 512; the rest are random. All
// gradients written to the DRAM model are compared with a reference, words
// beside the map must be untouched, and the number of data reads must be
// 1 + (collected filters) per MAC job.
// Then a forward pass (13 x 4 pixels, 10 output channels from 16 input
// channels, 2 x 2 filters, ReLU) writes activations and a bit-vector whose
// last group straddles a DRAM line; activations and every bit are checked,
// and a backward pass of the same shape must read exactly that bit-vector.
module tb_cnn_bp_accel;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, cfg_mode = 1'b1;
  logic [15:0] cfg_ix, cfg_iy; logic [9:0] cfg_iz; logic [3:0] cfg_fx, cfg_fy; logic [15:0] cfg_fn;
  logic [ADDR_W-1:0] cfg_dout_base, cfg_w_base, cfg_bv_base; logic [EADDR_W-1:0] cfg_din_base;
  logic m_valid, m_ready, m_we, m_rsp_valid; logic [ADDR_W-1:0] m_addr;
  line_t m_wdata, m_rsp_data; logic [LINE_WORDS-1:0] m_wmask;
  logic [31:0] n_groups, n_empty_groups, n_filters_skipped, n_bv_reads, n_bv_span, n_data_reads, n_zero_ins, n_bv_writes;

  cnn_bp_accel dut (.*);
  dram_model #(.LAT(12), .STALL_PCT(5)) u_cdram (
    .clk, .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we),
    .req_addr(m_addr), .req_wdata(m_wdata), .req_wmask(m_wmask),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data));

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

  localparam int SENT = 32'h5A5A_5A5A;

  // ---------------- CNN layer ----------------
  task automatic run_cnn(int IX, int IY, int IZ, int FX, int FY, int FN, bit given, ref bit gbv [][][]);
    int PX = IX + FX - 1;
    int dout [][][];           // [py][px][k]
    int filt [][][][];         // [z][j][i][k]
    bit bv [][][];             // [y][x][z]
    longint exp_reads = 0;
    int cyc = 0;
    longint reads0 = longint'(n_data_reads);
    cfg_ix = 16'(IX); cfg_iy = 16'(IY); cfg_iz = 10'(IZ); cfg_fx = 4'(FX); cfg_fy = 4'(FY); cfg_fn = 16'(FN);
    cfg_dout_base = 1000; cfg_w_base = 5000; if (!given) cfg_bv_base = 100; cfg_din_base = 36'(16*20000 + 5);
    dout = new[IY+FY-1];
    foreach (dout[py]) begin
      dout[py] = new[PX];
      foreach (dout[py][px]) begin
        dout[py][px] = new[FN];
        foreach (dout[py][px][k]) begin
          dout[py][px][k] = rnd_fx();
          u_cdram.wrw(36'((cfg_dout_base + (py*PX + px)*(FN/16)) * 16 + k), dout[py][px][k]);
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
            u_cdram.wrw(36'((cfg_w_base + ((z*FY + j)*FX + i)*(FN/16)) * 16 + k), filt[z][j][i][k]);
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
          if (given) bv[y][x][z] = gbv[y][x][z];
          else begin
            case (pix)
              1: bv[y][x][z] = 1'b0;                 // all zero
              2: bv[y][x][z] = (z < 16);             // exactly 16 ones, then zeros
              3: bv[y][x][z] = 1'b1;                 // dense
              default: bv[y][x][z] = ($urandom_range(99) < 40);
            endcase
            u_cdram.wrbit(longint'(cfg_bv_base) * 512 + longint'(pix*IZ + z), bv[y][x][z]);
          end
          ones += int'(bv[y][x][z]);
        end
        // MAC jobs per group: FX*FY*FN/16, each 1 + (filters) reads
        exp_reads += longint'(FX*FY*(FN/16)) * (longint'(ones) + longint'((ones + 15) / 16));
      end
    end
    for (int e = -3; e < IX*IY*IZ + 3; e++) u_cdram.wrw(36'(longint'(cfg_din_base) + e), SENT);

    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    while (!done) begin @(posedge clk); cyc++; end
    $display("CNN layer done in %0d cycles, groups=%0d empty=%0d skipped=%0d bvreads=%0d span=%0d reads=%0d zeros=%0d",
             cyc, n_groups, n_empty_groups, n_filters_skipped, n_bv_reads, n_bv_span, n_data_reads, n_zero_ins);

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
          got = u_cdram.rdw(36'(longint'(cfg_din_base) + (y*IX + x)*IZ + z));
          check(got == s, $sformatf("dCin(%0d,%0d,%0d) = %0h, expected %0h", x, y, z, got, s));
        end
    for (int e = 1; e <= 3; e++) begin
      check(u_cdram.rdw(36'(longint'(cfg_din_base) - e)) == SENT, "word before dCin overwritten");
      check(u_cdram.rdw(36'(longint'(cfg_din_base) + IX*IY*IZ - 1 + e)) == SENT, "word after dCin overwritten");
    end
    check(longint'(n_data_reads) - reads0 == exp_reads,
          $sformatf("data reads %0d, expected %0d", longint'(n_data_reads) - reads0, exp_reads));
    // mechanisms
    check(n_filters_skipped > 0, "no filter was skipped");
    if (!given) check(n_bv_reads == 32'(IX*IY), "one DRAM read per aligned bit-vector line");
    else check(n_bv_span > 0, "no bit-vector line spanned two DRAM lines");
    check(n_zero_ins > 0, "no zero gradient inserted");
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
    cfg_mode = 1'b0;
    cfg_ix = 16'(IX); cfg_iy = 16'(IY); cfg_iz = 10'(IZ); cfg_fx = 4'(FX); cfg_fy = 4'(FY); cfg_fn = 16'(FN);
    cfg_dout_base = 3000; cfg_w_base = 9000; cfg_bv_base = 300; cfg_din_base = 36'(16*40000 + 7);
    inp = new[IY+FY-1];
    foreach (inp[py]) begin
      inp[py] = new[PX];
      foreach (inp[py][px]) begin
        inp[py][px] = new[FN];
        foreach (inp[py][px][k]) begin
          inp[py][px][k] = rnd_fx();
          u_cdram.wrw(36'((cfg_dout_base + (py*PX + px)*(FN/16)) * 16 + k), inp[py][px][k]);
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
            u_cdram.wrw(36'((cfg_w_base + ((z*FY + j)*FX + i)*(FN/16)) * 16 + k), filt[z][j][i][k]);
          end
        end
      end
    end
    // bit-vector area filled with ones so that every written zero shows
    for (longint l = 0; l <= (total + 511) / 512 + 1; l++)
      for (int b = 0; b < 512; b++) u_cdram.wrbit(longint'(cfg_bv_base) * 512 + l * 512 + b, 1'b1);
    for (int e = -3; e < IX*IY*IZ + 3; e++) u_cdram.wrw(36'(longint'(cfg_din_base) + e), SENT);

    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    while (!done) begin @(posedge clk); cyc++; end
    $display("CNN forward pass done in %0d cycles, groups=%0d skipped=%0d bvreads=%0d reads=%0d bv line writes=%0d",
             cyc, n_groups, n_filters_skipped, n_bv_reads, n_data_reads, n_bv_writes);

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
          got = u_cdram.rdw(36'(longint'(cfg_din_base) + b));
          check(got == s, $sformatf("FP out(%0d,%0d,%0d) = %0h, expected %0h", x, y, z, got, s));
          l = u_cdram.rd(ADDR_W'(longint'(cfg_bv_base) + b / 512));
          obv[y][x][z] = (s > 0);
          ones += int'(s > 0);
          check(l[b % 512] == (s > 0), $sformatf("FP bit (%0d,%0d,%0d) wrong", x, y, z));
        end
      end
    end
    begin
      line_t l = u_cdram.rd(ADDR_W'(longint'(cfg_bv_base) + (total + 511) / 512));
      check(l == '1, "line after the bit-vector overwritten");
      check(longint'(n_bv_writes) == (total + 511) / 512, "one write per bit-vector line");
    end
    check(n_filters_skipped == 0 && n_bv_reads == 0, "forward pass skipped or read bits");
    check(ones > 0 && ones < IX*IY*IZ, "ReLU outputs all of one sign");
    cfg_mode = 1'b1;
  endtask


  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    begin
      bit none [][][];
      bit fbv [][][];
      run_cnn(2, 2, 512, 3, 3, 16, 1'b0, none);
      // 52 pixels of 10 channels: the last group straddles a DRAM line
      run_fp(13, 4, 10, 2, 2, 16, fbv);
      cfg_bv_base = 300;
      run_cnn(13, 4, 10, 2, 2, 32, 1'b1, fbv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
