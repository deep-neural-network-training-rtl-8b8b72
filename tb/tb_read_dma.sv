// tb_read_dma: MAC jobs with random sets of collected filters at scattered
// addresses, served by a stalling DRAM model. Checks that exactly 1 + (used
// slots) lines are read per job, that the activation line and each used
// slot's weight line arrive in the right place, that unused slots are zero
// and disabled, and that first/last are passed through.
module tb_read_dma;
  import sgc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic job_valid = 0, job_ready;
  mac_job_t job;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid;
  logic [ADDR_W-1:0] rd_req_addr;
  line_t rd_rsp_data;
  logic nfu_valid, nfu_first, nfu_last;
  logic [NFU_N-1:0] nfu_slot_en;
  logic [NFU_IN-1:0][DATA_W-1:0] nfu_a;
  logic [NFU_N-1:0][NFU_IN-1:0][DATA_W-1:0] nfu_w;
  logic [31:0] n_reads;

  read_dma dut (.*);
  dram_model #(.LAT(5), .STALL_PCT(20)) u_dram (
    .clk, .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_we(1'b0),
    .req_addr(rd_req_addr), .req_wdata('0), .req_wmask('0),
    .rsp_valid(rd_rsp_valid), .rsp_data(rd_rsp_data));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_t pattern(logic [ADDR_W-1:0] a);
    line_t l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = a * 32'd1000 + 32'(i);
    return l;
  endfunction

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    job = '0;
    for (int a = 0; a < 4096; a++) u_dram.mem[a] = pattern(a);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      mac_job_t j;
      int r0, nused;
      j.act_addr = $urandom_range(4095);
      for (int s = 0; s < NFU_N; s++) j.w_addr[s] = $urandom_range(4095);
      case (t % 4)
        0: j.slot_valid = '1;
        1: j.slot_valid = '0;
        default: j.slot_valid = 16'($urandom);
      endcase
      j.first = $urandom_range(1); j.last = $urandom_range(1);
      nused = $countones(j.slot_valid);
      r0 = int'(u_dram.n_reqs);
      @(negedge clk);
      chk(job_ready, "idle before a job");
      job = j; job_valid = 1;
      @(negedge clk);
      job_valid = 0;
      while (!nfu_valid) @(negedge clk);
      chk(int'(u_dram.n_reqs) - r0 == 1 + nused,
          $sformatf("job %0d: %0d reads for %0d filters", t, int'(u_dram.n_reqs) - r0, nused));
      chk(nfu_a == pattern(j.act_addr), "activation line");
      chk(nfu_slot_en == j.slot_valid && nfu_first == j.first && nfu_last == j.last, "flags");
      for (int s = 0; s < NFU_N; s++)
        chk(nfu_w[s] == (j.slot_valid[s] ? pattern(j.w_addr[s]) : '0), $sformatf("slot %0d", s));
    end
    chk(n_reads == u_dram.n_reqs, "read counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
