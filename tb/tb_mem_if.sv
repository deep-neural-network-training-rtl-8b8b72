// tb_mem_if: three clients issue random reads and writes through the memory
// interface to a stalling DRAM model. Each read must come back to the client
// that issued it, in its issue order, with the line stored at its address;
// writes must land with their word mask; when two clients request together
// the lower-numbered one must be granted.
module tb_mem_if;
  import sgc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 3;
  logic [N-1:0] c_valid, c_ready, c_we, c_rsp_valid;
  logic [N-1:0][ADDR_W-1:0] c_addr;
  logic [N-1:0][LINE_BITS-1:0] c_wdata;
  logic [N-1:0][LINE_WORDS-1:0] c_wmask;
  line_t c_rsp_data;
  logic m_valid, m_ready, m_we, m_rsp_valid;
  logic [ADDR_W-1:0] m_addr;
  line_t m_wdata, m_rsp_data;
  logic [LINE_WORDS-1:0] m_wmask;

  mem_if #(.NCLI(N), .DEPTH(8)) dut (.*);
  dram_model #(.LAT(6), .STALL_PCT(20)) u_dram (
    .clk, .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .req_wmask(m_wmask), .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data));

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

  // Reference memory: lines 0..63; clients read and write disjoint halves
  // so that the expected read data is known at issue time.
  line_t ref_mem [64];
  line_t exp_q [N][$];
  bit stop = 0;

  // clients
  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < N; c++) begin
        if (!c_valid[c] || c_ready[c]) begin
          c_valid[c] = !stop && ($urandom_range(2) != 0);
          c_we[c]    = ($urandom_range(3) == 0);
          c_addr[c]  = ADDR_W'(c * 16 + $urandom_range(15));
          c_wdata[c] = {16{$urandom}};
          c_wmask[c] = 16'($urandom);
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      int granted;
      granted = 0;
      for (int c = 0; c < N; c++) if (c_valid[c] && c_ready[c]) begin
        granted++;
        for (int d = 0; d < c; d++) if (c_valid[d] && (c_we[d] || dut.cnt_q < 8)) begin
          chk(0, "lower-numbered client skipped");
        end
                if (c_we[c]) begin
          for (int w = 0; w < 16; w++)
            if (c_wmask[c][w]) ref_mem[c_addr[c]][w*32 +: 32] = c_wdata[c][w*32 +: 32];
        end else exp_q[c].push_back(ref_mem[c_addr[c]]);
      end
      chk(granted <= 1, "two grants in one cycle");
      for (int c = 0; c < N; c++) if (c_rsp_valid[c]) begin
        chk(exp_q[c].size() > 0, "unexpected response");
        if (exp_q[c].size() > 0) chk(exp_q[c].pop_front() == c_rsp_data, $sformatf("client %0d data", c));
      end
    end
  end

  initial begin
    c_valid = '0; c_we = '0; c_addr = '0; c_wdata = '0; c_wmask = '0;
    for (int a = 0; a < 64; a++) begin
      ref_mem[a] = {16{32'(a * 7 + 1)}};
      u_dram.mem[a] = ref_mem[a];
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    stop = 1;                        // no new requests; let reads drain
    repeat (40) @(posedge clk);
    for (int c = 0; c < N; c++) chk(exp_q[c].size() == 0, "read never answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
