// read_dma: loads the operands of one MAC job and hands them to the NFUs.
//
// A job names one DRAM line of 16 activations (in BP: 16 dCout pixels of one
// position and channel block) and, for each of the 16 NFU slots, the line of
// 16 weights of the filter collected for that slot. Unlike a DMA that can only
// stream 16 consecutive filters, the weight addresses here are independent,
// so non-consecutive filters are read, and slots without a filter are not read
// at all: a full job costs 1 + 16 DRAM accesses, a job with k filters 1 + k.
//
// Interface: job_valid/job_ready takes a job (accepted only when idle); reads
// go out on rd_req_valid/rd_req_ready with the line address; the memory
// returns data in request order on rd_rsp_valid. When the last line has
// arrived, nfu_valid is high for one cycle with the assembled operands.
// Jobs are processed one at a time (no overlap of two jobs' reads); this is
// this design's simplification.
module read_dma
  import sgc_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         job_valid,
  output logic                         job_ready,
  input  mac_job_t                     job,
  output logic                         rd_req_valid,
  input  logic                         rd_req_ready,
  output logic [ADDR_W-1:0]            rd_req_addr,
  input  logic                         rd_rsp_valid,
  input  line_t                        rd_rsp_data,
  output logic                         nfu_valid,
  output logic [NFU_N-1:0]             nfu_slot_en,
  output logic                         nfu_first,
  output logic                         nfu_last,
  output logic [NFU_IN-1:0][DATA_W-1:0]            nfu_a,
  output logic [NFU_N-1:0][NFU_IN-1:0][DATA_W-1:0] nfu_w,
  output logic [31:0]                  n_reads       // lines read so far
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_EMIT} state_e;
  state_e state_q;

  mac_job_t            job_q;
  logic [4:0]          iss_q;     // 0: activations, 1..16: slot iss_q-1
  logic [4:0]          dest_q [NFU_N+1];
  logic [4:0]          n_iss_q, n_rcv_q;
  logic [NFU_IN-1:0][DATA_W-1:0]            a_q;
  logic [NFU_N-1:0][NFU_IN-1:0][DATA_W-1:0] w_q;

  // Next slot to read at or after iss_q (skipping slots without a filter).
  logic [4:0] cur;
  logic       cur_ok;
  always_comb begin
    cur    = iss_q;
    cur_ok = 1'b0;
    for (int k = NFU_N; k >= 0; k--)
      if (5'(k) >= iss_q && (k == 0 || job_q.slot_valid[k-1])) begin
        cur = 5'(k); cur_ok = 1'b1;
      end
  end

  assign job_ready    = (state_q == S_IDLE);
  assign rd_req_valid = (state_q == S_ISSUE) && cur_ok;
  assign rd_req_addr  = (cur == 5'd0) ? job_q.act_addr : job_q.w_addr[cur - 5'd1];

  assign nfu_valid   = (state_q == S_EMIT);
  assign nfu_slot_en = job_q.slot_valid;
  assign nfu_first   = job_q.first;
  assign nfu_last    = job_q.last;
  assign nfu_a       = a_q;
  assign nfu_w       = w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE; job_q <= '0; iss_q <= '0; n_iss_q <= '0; n_rcv_q <= '0;
      a_q <= '0; w_q <= '0; n_reads <= '0;
      for (int k = 0; k <= NFU_N; k++) dest_q[k] <= '0;
    end else begin
      if (rd_rsp_valid) begin
        if (dest_q[n_rcv_q] == 5'd0) a_q <= rd_rsp_data;
        else w_q[dest_q[n_rcv_q] - 5'd1] <= rd_rsp_data;
        n_rcv_q <= n_rcv_q + 5'd1;
        n_reads <= n_reads + 1;
      end
      case (state_q)
        S_IDLE: if (job_valid) begin
          job_q <= job; iss_q <= '0; n_iss_q <= '0; n_rcv_q <= '0;
          w_q <= '0; state_q <= S_ISSUE;
        end
        S_ISSUE: begin
          if (!cur_ok) state_q <= S_WAIT;
          else if (rd_req_ready) begin
            dest_q[n_iss_q] <= cur;
            n_iss_q <= n_iss_q + 5'd1;
            iss_q   <= cur + 5'd1;
          end
        end
        S_WAIT: if (n_rcv_q == n_iss_q) state_q <= S_EMIT;
        S_EMIT: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
