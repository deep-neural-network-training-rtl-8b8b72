// cnn_bp_ctrl: sequencer of the backward propagation through one
// convolutional layer that follows a ReLU layer.
//
// It computes the input-side gradient map dCin (Ix x Iy x Iz) from the
// zero-padded output-side gradient map dCout' ((Ix+Fx-1) x (Iy+Fy-1) x Fn)
// and the Iz rearranged BP filters (Fx x Fy x Fn each):
//   dCin(x,y,z) = sum_{i,j,k} dCout'(x+i, y+j, k) * Fbp_z(i, j, k)
// but only where the ReLU output at (x,y,z) was positive. Pixels are visited
// in raster order. For each (x,y) it fetches the Iz-bit bit-vector line
// (bits are stored densely, so a line may span two DRAM lines; the last
// fetched DRAM line is kept and reused), gives it to the filter collector,
// and for every group of up to 16 collected filters issues Fx*Fy*Fn/16 MAC
// jobs: one dCout' line of 16 channels plus one weight line per collected
// filter. The NFU result of the group goes to the write DMA together with
// the bit range of the group, which fills the skipped channels with zeros.
// A group with no set bits costs no MAC job, only the write of its zeros.
//
// Memory layout (this design's choice; channel index fastest everywhere):
//   dCout' line  = dout_base + ((y+j)*(Ix+Fx-1) + (x+i))*Fn/16 + k/16
//   filter line  = w_base + ((z*Fy + j)*Fx + i)*Fn/16 + k/16
//   bit-vector   = bit (y*Ix + x)*Iz + z counted from line bv_base
//   dCin element = din_base + (y*Ix + x)*Iz + z
// Fn must be a multiple of 16 and Iz at most 512.
//
// Forward mode (cfg_mode = 0) runs the same loop nest as a forward
// convolution: with every bit taken as 1, dCout' is read as the padded input
// map, the Iz filters as the forward filters and dCin as the output map. No
// bit-vector is read; the accelerator applies ReLU in the NFUs and packs the
// output signs into a new bit-vector (bv_packer). Reusing the backward loop
// for the forward pass is this design's choice.
//
// Interface: configuration inputs are held stable from start to done; start
// is a one-cycle pulse; done pulses when the last write has left the DMA.
module cnn_bp_ctrl
  import sgc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic                cfg_mode,         // 0: forward, 1: backward
  input  logic [15:0]         cfg_ix, cfg_iy,   // dCin width, height
  input  logic [9:0]          cfg_iz,           // dCin channels (<= 512)
  input  logic [3:0]          cfg_fx, cfg_fy,   // filter width, height
  input  logic [15:0]         cfg_fn,           // dCout channels, multiple of 16
  input  logic [ADDR_W-1:0]   cfg_dout_base,
  input  logic [ADDR_W-1:0]   cfg_w_base,
  input  logic [ADDR_W-1:0]   cfg_bv_base,
  input  logic [EADDR_W-1:0]  cfg_din_base,
  // bit-vector reads (memory interface client)
  output logic                bv_req_valid,
  input  logic                bv_req_ready,
  output logic [ADDR_W-1:0]   bv_req_addr,
  input  logic                bv_rsp_valid,
  input  line_t               bv_rsp_data,
  // filter collector
  output logic                fc_line_valid,
  input  logic                fc_line_ready,
  output line_t               fc_line,
  output logic [9:0]          fc_line_len,
  input  logic                fc_grp_valid,
  output logic                fc_grp_ready,
  input  logic [NFU_N-1:0][8:0] fc_grp_pos,
  input  logic [4:0]          fc_grp_cnt,
  input  logic [8:0]          fc_grp_start,
  input  logic [8:0]          fc_grp_end,
  input  line_t               fc_grp_bits,
  input  logic                fc_grp_last,
  // read DMA
  output logic                job_valid,
  input  logic                job_ready,
  output mac_job_t            job,
  // NFU results
  input  logic                nfu_out_valid,
  input  logic [NFU_N-1:0][DATA_W-1:0] nfu_out,
  // write DMA
  output logic                wr_job_valid,
  input  logic                wr_job_ready,
  output wr_job_t             wr_job,
  input  logic                wdma_idle,
  // event counters
  output logic [31:0]         n_groups,
  output logic [31:0]         n_empty_groups,
  output logic [31:0]         n_filters_skipped,
  output logic [31:0]         n_bv_reads,
  output logic [31:0]         n_bv_span
);

  typedef enum logic [3:0] {
    S_IDLE, S_BV_CALC, S_BV_REQ0, S_BV_WAIT0, S_BV_REQ1, S_BV_WAIT1,
    S_PUSH, S_GRP, S_JOB, S_RES, S_WR, S_NEXT, S_DRAIN
  } state_e;
  state_e state_q;

  logic [15:0] x_q, y_q;
  logic [3:0]  i_q, j_q;
  logic [15:0] kb_q;
  logic [15:0] nkb;
  assign nkb = cfg_fn >> 4;

  // bit-vector line fetch with a one-line cache
  logic [ADDR_W-1:0] l0_q, l1_q, tag_q;
  logic              tag_ok_q;
  line_t             lo_q, hi_q;
  logic [8:0]        off_q;
  logic [EADDR_W-1:0] bitaddr;
  assign bitaddr = (EADDR_W'(y_q) * EADDR_W'(cfg_ix) + EADDR_W'(x_q)) * EADDR_W'(cfg_iz);

  // latched group
  logic [NFU_N-1:0][8:0] pos_q;
  logic [4:0]   cnt_q;
  logic [8:0]   gstart_q, gend_q;
  line_t        gbits_q;
  logic         glast_q;
  logic [NFU_N-1:0][DATA_W-1:0] res_q;

  // assembled line: the Iz bits starting at off_q
  logic [2*LINE_BITS-1:0] both;
  line_t                  shifted;
  assign both    = {hi_q, lo_q} >> off_q;
  assign shifted = both[LINE_BITS-1:0];

  assign busy          = (state_q != S_IDLE);
  logic cache_hit;
  assign cache_hit     = tag_ok_q && (tag_q == l0_q);
  assign bv_req_valid  = ((state_q == S_BV_REQ0) && !cache_hit) || (state_q == S_BV_REQ1);
  assign bv_req_addr   = (state_q == S_BV_REQ0) ? l0_q : l1_q;
  assign fc_line_valid = (state_q == S_PUSH);
  assign fc_line       = cfg_mode ? shifted : '1;   // forward: every channel
  assign fc_line_len   = cfg_iz;
  assign fc_grp_ready  = (state_q == S_GRP);

  // MAC job for the current (group, j, i, kb)
  logic [ADDR_W-1:0] pix_line;
  assign pix_line = ADDR_W'((32'(y_q) + 32'(j_q)) * (32'(cfg_ix) + 32'(cfg_fx) - 1)
                            + 32'(x_q) + 32'(i_q));
  always_comb begin
    job.act_addr = cfg_dout_base + pix_line * ADDR_W'(nkb) + ADDR_W'(kb_q);
    for (int s = 0; s < NFU_N; s++) begin
      job.w_addr[s] = cfg_w_base
                    + ((ADDR_W'(pos_q[s]) * ADDR_W'(cfg_fy) + ADDR_W'(j_q)) * ADDR_W'(cfg_fx)
                       + ADDR_W'(i_q)) * ADDR_W'(nkb) + ADDR_W'(kb_q);
      job.slot_valid[s] = (5'(s) < cnt_q);
    end
    job.first = (j_q == 0) && (i_q == 0) && (kb_q == 0);
    job.last  = (j_q == cfg_fy - 1) && (i_q == cfg_fx - 1) && (kb_q == nkb - 1);
  end
  assign job_valid = (state_q == S_JOB);

  assign wr_job_valid     = (state_q == S_WR);
  assign wr_job.elem_base = cfg_din_base + bitaddr;
  assign wr_job.bits      = gbits_q;
  assign wr_job.seg_start = 10'(gstart_q);
  assign wr_job.seg_end   = 10'(gend_q);
  assign wr_job.grad      = res_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE; done <= 1'b0;
      x_q <= '0; y_q <= '0; i_q <= '0; j_q <= '0; kb_q <= '0;
      l0_q <= '0; l1_q <= '0; tag_q <= '0; tag_ok_q <= 1'b0; lo_q <= '0; hi_q <= '0; off_q <= '0;
      pos_q <= '0; cnt_q <= '0; gstart_q <= '0; gend_q <= '0; gbits_q <= '0; glast_q <= 1'b0;
      res_q <= '0;
      n_groups <= '0; n_empty_groups <= '0; n_filters_skipped <= '0; n_bv_reads <= '0;
      n_bv_span <= '0;
    end else begin
      done <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          x_q <= '0; y_q <= '0; tag_ok_q <= 1'b0; state_q <= S_BV_CALC;
          n_groups <= '0; n_empty_groups <= '0; n_filters_skipped <= '0;
          n_bv_reads <= '0; n_bv_span <= '0;
        end
        S_BV_CALC: begin
          l0_q  <= cfg_bv_base + ADDR_W'(bitaddr >> 9);
          l1_q  <= cfg_bv_base + ADDR_W'((bitaddr + EADDR_W'(cfg_iz) - 1) >> 9);
          off_q <= bitaddr[8:0];
          state_q <= cfg_mode ? S_BV_REQ0 : S_PUSH;
        end
        S_BV_REQ0: begin
          if (cache_hit) begin
            lo_q <= hi_q;       // cached line (always held in hi_q)
            state_q <= (l1_q != l0_q) ? S_BV_REQ1 : S_PUSH;
          end else if (bv_req_ready) begin
            state_q <= S_BV_WAIT0;
          end
        end
        S_BV_WAIT0: if (bv_rsp_valid) begin
          lo_q <= bv_rsp_data; hi_q <= bv_rsp_data;
          tag_q <= l0_q; tag_ok_q <= 1'b1; n_bv_reads <= n_bv_reads + 1;
          state_q <= (l1_q != l0_q) ? S_BV_REQ1 : S_PUSH;
        end
        S_BV_REQ1: if (bv_req_ready) state_q <= S_BV_WAIT1;
        S_BV_WAIT1: if (bv_rsp_valid) begin
          hi_q <= bv_rsp_data; tag_q <= l1_q; tag_ok_q <= 1'b1;
          n_bv_reads <= n_bv_reads + 1; n_bv_span <= n_bv_span + 1;
          state_q <= S_PUSH;
        end
        S_PUSH: if (fc_line_ready) begin
          // keep the newest line in hi_q as the cache for the next pixel
          if (l1_q == l0_q) hi_q <= lo_q;
          state_q <= S_GRP;
        end
        S_GRP: if (fc_grp_valid) begin
          pos_q <= fc_grp_pos; cnt_q <= fc_grp_cnt; gstart_q <= fc_grp_start;
          gend_q <= fc_grp_end; gbits_q <= fc_grp_bits; glast_q <= fc_grp_last;
          res_q <= '0;
          i_q <= '0; j_q <= '0; kb_q <= '0;
          n_groups <= n_groups + 1;
          n_filters_skipped <= n_filters_skipped
                             + 32'(fc_grp_end) - 32'(fc_grp_start) + 1 - 32'(fc_grp_cnt);
          if (fc_grp_cnt == 0) begin
            n_empty_groups <= n_empty_groups + 1;
            state_q <= S_WR;
          end else begin
            state_q <= S_JOB;
          end
        end
        S_JOB: if (job_ready) begin
          if (job.last) state_q <= S_RES;
          else if (kb_q != nkb - 1) kb_q <= kb_q + 1;
          else begin
            kb_q <= '0;
            if (i_q != cfg_fx - 1) i_q <= i_q + 1;
            else begin i_q <= '0; j_q <= j_q + 1; end
          end
        end
        S_RES: if (nfu_out_valid) begin
          res_q <= nfu_out; state_q <= S_WR;
        end
        S_WR: if (wr_job_ready) state_q <= glast_q ? S_NEXT : S_GRP;
        S_NEXT: begin
          if (x_q != cfg_ix - 1) begin x_q <= x_q + 1; state_q <= S_BV_CALC; end
          else if (y_q != cfg_iy - 1) begin x_q <= '0; y_q <= y_q + 1; state_q <= S_BV_CALC; end
          else state_q <= S_DRAIN;
        end
        S_DRAIN: if (wdma_idle) begin done <= 1'b1; state_q <= S_IDLE; end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
