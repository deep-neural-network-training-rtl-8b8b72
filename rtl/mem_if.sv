// mem_if: the memory interface between the DMA engines and the DRAM port.
//
// Several clients (bit-vector fetch, read DMA, write DMA) share one DRAM
// port that moves 512-bit lines. Requests are granted by fixed priority,
// client 0 first. The DRAM returns read data in request order, so the
// interface remembers, in a FIFO, which client issued each outstanding read
// and routes every returning line to it. When that FIFO is full, reads wait.
// Writes carry a 16-bit word mask and return nothing.
//
// Timing: a request passes through combinationally (grant in the same cycle
// as the DRAM accepts it); the response valid of a client is the DRAM
// response valid of the line it asked for. Arbitration policy and FIFO depth
// are this design's choices: the document names the interface only.
module mem_if
  import sgc_pkg::*;
#(
  parameter int NCLI  = 3,   // clients
  parameter int DEPTH = 64   // outstanding reads
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NCLI-1:0]               c_valid,
  output logic [NCLI-1:0]               c_ready,
  input  logic [NCLI-1:0]               c_we,
  input  logic [NCLI-1:0][ADDR_W-1:0]   c_addr,
  input  logic [NCLI-1:0][LINE_BITS-1:0] c_wdata,
  input  logic [NCLI-1:0][LINE_WORDS-1:0] c_wmask,
  output logic [NCLI-1:0]               c_rsp_valid,
  output line_t                         c_rsp_data,
  output logic                          m_valid,
  input  logic                          m_ready,
  output logic                          m_we,
  output logic [ADDR_W-1:0]             m_addr,
  output line_t                         m_wdata,
  output logic [LINE_WORDS-1:0]         m_wmask,
  input  logic                          m_rsp_valid,
  input  line_t                         m_rsp_data
);

  localparam int CW = (NCLI > 1) ? $clog2(NCLI) : 1;
  localparam int DW = $clog2(DEPTH);

  logic [CW-1:0] fifo_q [DEPTH];
  logic [DW-1:0] wp_q, rp_q;
  logic [DW:0]   cnt_q;
  logic          full;
  assign full = (cnt_q == (DW+1)'(DEPTH));

  // Fixed-priority pick among requests that may go now.
  logic [NCLI-1:0] elig;
  logic [CW-1:0]   sel;
  logic            any;
  always_comb begin
    for (int c = 0; c < NCLI; c++) elig[c] = c_valid[c] && (c_we[c] || !full);
    sel = '0; any = 1'b0;
    for (int c = NCLI-1; c >= 0; c--) if (elig[c]) begin sel = CW'(c); any = 1'b1; end
  end

  assign m_valid = any;
  assign m_we    = c_we[sel];
  assign m_addr  = c_addr[sel];
  assign m_wdata = c_wdata[sel];
  assign m_wmask = c_wmask[sel];

  always_comb begin
    c_ready = '0;
    if (any) c_ready[sel] = m_ready;
  end

  logic push, pop;
  assign push = any && m_ready && !m_we;
  assign pop  = m_rsp_valid;

  always_comb begin
    c_rsp_valid = '0;
    if (m_rsp_valid) c_rsp_valid[fifo_q[rp_q]] = 1'b1;
  end
  assign c_rsp_data = m_rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0; rp_q <= '0; cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) fifo_q[i] <= '0;
    end else begin
      if (push) begin fifo_q[wp_q] <= sel; wp_q <= wp_q + 1'b1; end
      if (pop)  rp_q <= rp_q + 1'b1;
      cnt_q <= cnt_q + (DW+1)'(push) - (DW+1)'(pop);
    end
  end

  // A response must belong to an outstanding read.
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   m_rsp_valid |-> cnt_q != 0);

endmodule
