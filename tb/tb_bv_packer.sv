// tb_bv_packer: random groups of 1..16 bits, as the forward pass produces
// them (each pixel split into groups of 16 channels and a shorter last one),
// for several layer sizes. Sizes are chosen so that groups start and end
// inside lines, end exactly on a line boundary, and so that the final group
// straddles two lines (the case that needs a second, tail write). The DRAM
// model must hold exactly the packed bits afterwards, bits beyond the last
// written word must be untouched, and the number of line writes must be
// ceil(total / 512). The write port stalls at random.
module tb_bv_packer;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, en = 1, in_valid = 0, in_ready, wr_valid, wr_ready, idle, rsp_valid;
  logic [ADDR_W-1:0] base, wr_addr;
  logic [EADDR_W-1:0] total;
  logic [NFU_N-1:0] in_bits;
  logic [4:0] in_cnt;
  line_t wr_data, rsp_data;
  logic [LINE_WORDS-1:0] wr_mask;
  logic [31:0] n_writes;

  bv_packer dut (.*);
  dram_model #(.LAT(2), .STALL_PCT(30)) u_dram (
    .clk, .req_valid(wr_valid), .req_ready(wr_ready), .req_we(1'b1),
    .req_addr(wr_addr), .req_wdata(wr_data), .req_wmask(wr_mask),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic run(int pixels, int iz, int b);
    bit exp_bits [];
    int n = 0;
    int tot = pixels * iz;
    int lines = (tot + 511) / 512;
    int last_word_end = ((tot + 31) / 32) * 32;
    exp_bits = new[tot];
    // area filled with a pattern that must survive outside the written words
    for (int l = 0; l <= lines; l++)
      for (int k = 0; k < 512; k++) u_dram.wrbit(longint'(b + l) * 512 + k, 1'b1);
    base = ADDR_W'(b); total = EADDR_W'(tot);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int p = 0; p < pixels; p++)
      for (int z = 0; z < iz; z += 16) begin
        int c = (iz - z < 16) ? iz - z : 16;
        in_bits = 16'($urandom);
        in_cnt = 5'(c);
        for (int i = 0; i < c; i++) exp_bits[n + i] = in_bits[i];
        n += c;
        in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk); in_valid = 0;
        if ($urandom_range(3) == 0) repeat ($urandom_range(4)) @(negedge clk);
      end
    while (!idle) @(negedge clk);
    repeat (4) @(negedge clk);
    for (int k = 0; k < (lines + 1) * 512; k++) begin
      line_t l = u_dram.rd(ADDR_W'(b + k / 512));
      bit e = (k < tot) ? exp_bits[k] : (k < last_word_end ? 1'b0 : 1'b1);
      chk(l[k % 512] == e, $sformatf("size %0d x %0d: bit %0d", pixels, iz, k));
    end
    chk(n_writes == 32'(lines), $sformatf("size %0d x %0d: %0d line writes", pixels, iz, n_writes));
  endtask

  initial begin
    in_bits = '0; in_cnt = '0; base = '0; total = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run(52, 10, 100);    // final group 510..519 straddles a line
    run(4, 128, 200);    // ends exactly on a line boundary
    run(7, 40, 300);     // 280-bit last line, groups of 16, 16 and 8
    run(3, 200, 400);    // a group ends on a boundary inside the layer
    run(1, 512, 500);    // one full line
    run(9, 37, 600);     // odd sizes, groups straddling lines inside
    // disabled: nothing is taken and nothing is written
    en = 0;
    begin
      int w0;
      w0 = u_dram.n_reqs;
      in_valid = 1; in_cnt = 5'd16; in_bits = '1;
      repeat (5) @(negedge clk);
      chk(!in_ready && u_dram.n_reqs == w0 && idle, "disabled packer took input");
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
