// tb_write_dma: zero-gradient insertion. First the 7-bit example 1101010
// with gradients g0 g1 g3 g5, which must be written as g0 g1 0 g3 0 g5 0;
// then a group over bits 0..16 with bit 15 clear, where the one zero lands
// between the results of NFU14 and NFU15; then random bit ranges of random lines at unaligned element addresses.
// The DRAM image is compared word by word, including untouched neighbours,
// and the number of line writes must equal the lines the range covers.
module tb_write_dma;
  import sgc_pkg::*;
  import sgc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic job_valid = 0, job_ready, wr_valid, wr_ready, idle, rsp_valid;
  wr_job_t job;
  logic [ADDR_W-1:0] wr_addr;
  line_t wr_data, rsp_data;
  logic [LINE_WORDS-1:0] wr_mask;
  logic [31:0] n_zero_ins;

  write_dma dut (.*);
  dram_model #(.LAT(2), .STALL_PCT(25)) u_dram (
    .clk, .req_valid(wr_valid), .req_ready(wr_ready), .req_we(1'b1),
    .req_addr(wr_addr), .req_wdata(wr_data), .req_wmask(wr_mask),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data));

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

  localparam int SENT = 32'h5A5A_5A5A;

  task automatic run(wr_job_t j);
    int r0, k, z0, nz;
    longint first_e, last_e;
    first_e = longint'(j.elem_base) + j.seg_start;
    last_e  = longint'(j.elem_base) + j.seg_end;
    for (longint e = first_e - 20; e <= last_e + 20; e++) u_dram.wrw(36'(e), SENT);
    r0 = u_dram.n_reqs;
    z0 = int'(n_zero_ins);
    @(negedge clk); job = j; job_valid = 1;
    @(negedge clk); job_valid = 0;
    while (!idle) @(negedge clk);
    chk(u_dram.n_reqs - r0 == int'((last_e >> 4) - (first_e >> 4) + 1), "line writes");
    k = 0; nz = 0;
    for (longint e = first_e - 20; e <= last_e + 20; e++) begin
      int exp_v, got;
      if (e < first_e || e > last_e) exp_v = SENT;
      else if (j.bits[e - j.elem_base]) begin exp_v = int'(j.grad[k]); k++; end
      else begin exp_v = 0; nz++; end
      got = u_dram.rdw(36'(e));
      chk(got == exp_v, $sformatf("element %0d: %0h exp %0h", e, got, exp_v));
    end
    chk(int'(n_zero_ins) - z0 == nz, "zero counter");
  endtask

  initial begin
    wr_job_t j;
    job = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // example: bits 0..6 = 1 1 0 1 0 1 0
    j = '0;
    j.elem_base = 36'd1600;
    j.bits[6:0] = 7'b0101011;
    j.seg_start = 0; j.seg_end = 6;
    for (int i = 0; i < 16; i++) j.grad[i] = 32'h100 + 32'(i);
    run(j);
    chk(u_dram.rdw(36'd1600) == 32'h100 && u_dram.rdw(36'd1601) == 32'h101 &&
        u_dram.rdw(36'd1602) == 0 && u_dram.rdw(36'd1603) == 32'h102 &&
        u_dram.rdw(36'd1604) == 0 && u_dram.rdw(36'd1605) == 32'h103 &&
        u_dram.rdw(36'd1606) == 0, "example g0 g1 0 g3 0 g5 0");
    // group of bits 0..16 without bit 15: 16 results, one zero before NFU15's
    j = '0;
    j.elem_base = 36'd2000;
    j.bits[16:0] = 17'h17FFF;
    j.seg_start = 0; j.seg_end = 16;
    for (int i = 0; i < 16; i++) j.grad[i] = 32'h200 + 32'(i);
    run(j);
    chk(u_dram.rdw(36'd2014) == 32'h20E && u_dram.rdw(36'd2015) == 0 &&
        u_dram.rdw(36'd2016) == 32'h20F, "zero between NFU14 and NFU15");
    for (int t = 0; t < 200; t++) begin
      int st, en, ones;
      j = '0;
      j.elem_base = 36'($urandom_range(100000));
      for (int p = 0; p < 512; p++) j.bits[p] = ($urandom_range(99) < 30);
      st = $urandom_range(511);
      // end at the 16th set bit or earlier so that at most 16 gradients are used
      en = st; ones = 0;
      while (en < 511 && ones + int'(j.bits[en]) <= 16 && $urandom_range(40) != 0) begin
        ones += int'(j.bits[en]); en++;
      end
      if (ones + int'(j.bits[en]) > 16) en--;
      if (en < st) en = st;
      j.seg_start = 10'(st); j.seg_end = 10'(en);
      for (int i = 0; i < 16; i++) j.grad[i] = 32'($urandom);
      run(j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
