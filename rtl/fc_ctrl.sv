// fc_ctrl: sequencer of a fully connected layer with dropout, in the forward
// pass (mode 0) or the backward pass (mode 1).
//
// FP: out[n] = act(sum_k in[k] * W[n][k]) for n < n_neu, 16 neurons per step
// (one per NFU). For each step it asks the filter dropper for the 16-bit
// dropout bit-vector (generated while the MACs run), issues n_src/16 MAC jobs
// (one input line plus the 16 weight-row lines), passes the NFU result
// through the dropout mask and writes the 16 words back.
// BP: the gradient of the dropped layer's neuron m is
// d[m] = sum_k dnext[k] * W[k][m], zero where m was dropped. The controller
// takes from the dropper's table up to 16 kept neuron indices, issues n_src/16
// MAC jobs reading the matching rows of the transposed weight matrix, scales
// the results in the mask unit and gives them to the write DMA with the
// neuron range's bit-vector, which writes zeros for the dropped neurons.
// A table with no kept neuron only writes zeros.
//
// Memory layout (this design's choice):
//   input / dnext line = src_base + k/16
//   FP weight line     = w_base + n*(n_src/16) + k/16   (row n of W)
//   BP weight line     = w_base + m*(n_src/16) + k/16   (row m of W^T)
//   output element     = dst_base + neuron index
// n_src must be a multiple of 16.
//
// Interface: configuration held stable from start to done; start is a
// one-cycle pulse that also starts the filter dropper in the same mode.
module fc_ctrl
  import sgc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic                cfg_mode,
  input  act_e                cfg_act,
  input  logic [16:0]         cfg_n_neu,
  input  logic [16:0]         cfg_n_src,
  input  logic [ADDR_W-1:0]   cfg_src_base,
  input  logic [ADDR_W-1:0]   cfg_w_base,
  input  logic [EADDR_W-1:0]  cfg_dst_base,
  // filter dropper
  output logic                bv_req,
  output logic [4:0]          bv_cnt,
  input  logic                bv_valid,
  output logic                mask_in_valid,
  output logic [NFU_N-1:0][DATA_W-1:0] mask_in,
  input  logic                mask_out_valid,
  input  logic [NFU_N-1:0][DATA_W-1:0] mask_out,
  input  logic                tbl_valid,
  output logic                tbl_ready,
  input  logic [NFU_N-1:0][IDX_W-1:0] tbl_idx,
  input  logic [4:0]          tbl_cnt,
  input  logic [IDX_W-1:0]    seg_first,
  input  logic [9:0]          seg_len,
  input  line_t               seg_bits,
  input  logic                tbl_last,
  // read DMA / NFUs
  output logic                job_valid,
  input  logic                job_ready,
  output mac_job_t            job,
  output act_e                nfu_act,
  input  logic                nfu_out_valid,
  input  logic [NFU_N-1:0][DATA_W-1:0] nfu_out,
  // write DMA
  output logic                wr_job_valid,
  input  logic                wr_job_ready,
  output wr_job_t             wr_job,
  input  logic                wdma_idle,
  output logic [31:0]         n_steps,
  output logic [31:0]         n_empty_steps
);

  typedef enum logic [3:0] {
    S_IDLE, S_FP_BV, S_BP_TBL, S_JOB, S_RES, S_WAITBV, S_MASK, S_MASKW, S_WR, S_DRAIN
  } state_e;
  state_e state_q;

  logic [16:0] ob_q;                       // FP: first neuron of the step
  logic [16:0] kb_q;
  logic [16:0] nkb;
  assign nkb = cfg_n_src >> 4;

  logic [4:0]  cnt_q;
  logic [NFU_N-1:0][IDX_W-1:0] idx_q;
  logic [IDX_W-1:0] segf_q;
  logic [9:0]  segl_q;
  line_t       segb_q;
  logic        last_q;
  logic [NFU_N-1:0][DATA_W-1:0] res_q;

  logic [16:0] remain;
  assign remain = cfg_n_neu - ob_q;

  assign busy      = (state_q != S_IDLE);
  assign bv_req    = (state_q == S_FP_BV);
  assign bv_cnt    = (remain >= 17'd16) ? 5'd16 : 5'(remain);
  assign tbl_ready = (state_q == S_BP_TBL);
  assign nfu_act   = cfg_mode ? ACT_NONE : cfg_act;

  always_comb begin
    job.act_addr = cfg_src_base + ADDR_W'(kb_q);
    for (int s = 0; s < NFU_N; s++) begin
      job.w_addr[s] = cfg_w_base
                    + (cfg_mode ? ADDR_W'(idx_q[s]) : ADDR_W'(ob_q) + ADDR_W'(s)) * ADDR_W'(nkb)
                    + ADDR_W'(kb_q);
      job.slot_valid[s] = (5'(s) < cnt_q);
    end
    job.first = (kb_q == 0);
    job.last  = (kb_q == nkb - 1);
  end
  assign job_valid = (state_q == S_JOB);

  assign mask_in_valid = (state_q == S_MASK);
  assign mask_in       = res_q;

  always_comb begin
    wr_job = '0;
    wr_job.grad = res_q;
    wr_job.seg_start = '0;
    if (cfg_mode) begin
      wr_job.elem_base = cfg_dst_base + EADDR_W'(segf_q);
      wr_job.bits      = segb_q;
      wr_job.seg_end   = segl_q - 1'b1;
    end else begin
      wr_job.elem_base = cfg_dst_base + EADDR_W'(ob_q);
      for (int s = 0; s < NFU_N; s++) wr_job.bits[s] = (5'(s) < cnt_q);
      wr_job.seg_end   = 10'(cnt_q) - 1'b1;
    end
  end
  assign wr_job_valid = (state_q == S_WR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE; done <= 1'b0; ob_q <= '0; kb_q <= '0; cnt_q <= '0; idx_q <= '0;
      segf_q <= '0; segl_q <= '0; segb_q <= '0; last_q <= 1'b0; res_q <= '0;
      n_steps <= '0; n_empty_steps <= '0;
    end else begin
      done <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          ob_q <= '0; n_steps <= '0; n_empty_steps <= '0;
          state_q <= cfg_mode ? S_BP_TBL : S_FP_BV;
        end
        S_FP_BV: begin
          cnt_q <= bv_cnt; kb_q <= '0; n_steps <= n_steps + 1;
          state_q <= S_JOB;
        end
        S_BP_TBL: if (tbl_valid) begin
          idx_q <= tbl_idx; cnt_q <= tbl_cnt; segf_q <= seg_first; segl_q <= seg_len;
          segb_q <= seg_bits; last_q <= tbl_last; kb_q <= '0; res_q <= '0;
          n_steps <= n_steps + 1;
          if (tbl_cnt == 0) begin
            n_empty_steps <= n_empty_steps + 1;
            state_q <= S_WR;
          end else state_q <= S_JOB;
        end
        S_JOB: if (job_ready) begin
          if (job.last) state_q <= S_RES;
          else kb_q <= kb_q + 1;
        end
        S_RES: if (nfu_out_valid) begin
          res_q <= nfu_out;
          state_q <= cfg_mode ? S_MASK : S_WAITBV;
        end
        S_WAITBV: if (bv_valid) state_q <= S_MASK;
        S_MASK: state_q <= S_MASKW;
        S_MASKW: if (mask_out_valid) begin res_q <= mask_out; state_q <= S_WR; end
        S_WR: if (wr_job_ready) begin
          if (cfg_mode) state_q <= last_q ? S_DRAIN : S_BP_TBL;
          else if (remain <= 17'd16) state_q <= S_DRAIN;
          else begin ob_q <= ob_q + 17'd16; state_q <= S_FP_BV; end
        end
        S_DRAIN: if (wdma_idle) begin done <= 1'b1; state_q <= S_IDLE; end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
