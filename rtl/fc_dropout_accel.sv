// fc_dropout_accel: fully connected layer accelerator that uses dropout to
// skip gradient computations.
//
// Dropout zeroes randomly chosen neurons in the forward pass, so their
// gradients in the backward pass are known to be zero before anything is
// computed. The filter dropper regenerates the same random mask from the
// seed in both passes: in FP it masks the 16 NFU outputs before write-back,
// in BP it lists only kept neurons, so their weight rows alone are read and
// only their gradients are computed; the write DMA fills in the zeros.
//   fc_ctrl         sequences FP / BP steps of 16 neurons,
//   filter_dropper  RNG, comparator, FP/BP mux, table, dropout mask,
//   read_dma        one input line + up to 16 weight-row lines per job,
//   nfu_array       16 NFUs x 16 multipliers,
//   write_dma       masked line writes with zero insertion,
//   mem_if          one 512-bit DRAM port (write DMA first, then read DMA).
// There is no on-chip weight buffer: FC weights are used once.
//
// Interface: configuration, start/busy/done, a DRAM port like
// cnn_bp_accel's, and event counters.
module fc_dropout_accel
  import sgc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic                cfg_mode,     // 0: FP, 1: BP
  input  act_e                cfg_act,
  input  logic [16:0]         cfg_n_neu,
  input  logic [16:0]         cfg_n_src,
  input  logic [ADDR_W-1:0]   cfg_src_base,
  input  logic [ADDR_W-1:0]   cfg_w_base,
  input  logic [EADDR_W-1:0]  cfg_dst_base,
  input  logic [31:0]         cfg_seed,
  input  logic [31:0]         cfg_rate,
  input  word_t               cfg_scale,
  output logic                m_valid,
  input  logic                m_ready,
  output logic                m_we,
  output logic [ADDR_W-1:0]   m_addr,
  output line_t               m_wdata,
  output logic [LINE_WORDS-1:0] m_wmask,
  input  logic                m_rsp_valid,
  input  line_t               m_rsp_data,
  output logic [31:0]         n_steps,
  output logic [31:0]         n_empty_steps,
  output logic [31:0]         n_dropped,
  output logic [31:0]         n_data_reads,
  output logic [31:0]         n_zero_ins
);

  // memory clients: 0 write DMA, 1 read DMA
  logic [1:0] c_valid, c_ready, c_we, c_rsp_valid;
  logic [1:0][ADDR_W-1:0] c_addr;
  logic [1:0][LINE_BITS-1:0] c_wdata;
  logic [1:0][LINE_WORDS-1:0] c_wmask;
  line_t c_rsp_data;

  mem_if #(.NCLI(2)) u_mem (
    .clk, .rst_n, .c_valid, .c_ready, .c_we, .c_addr, .c_wdata, .c_wmask,
    .c_rsp_valid, .c_rsp_data,
    .m_valid, .m_ready, .m_we, .m_addr, .m_wdata, .m_wmask, .m_rsp_valid, .m_rsp_data
  );

  logic job_valid, job_ready;
  mac_job_t job;
  act_e nfu_act;
  logic nfu_in_valid, nfu_first, nfu_last, nfu_out_valid;
  logic [NFU_N-1:0] nfu_slot_en;
  logic [NFU_IN-1:0][DATA_W-1:0] nfu_a;
  logic [NFU_N-1:0][NFU_IN-1:0][DATA_W-1:0] nfu_w;
  logic [NFU_N-1:0][DATA_W-1:0] nfu_out;

  assign c_we[1] = 1'b0;
  assign c_wdata[1] = '0;
  assign c_wmask[1] = '0;
  read_dma u_rdma (
    .clk, .rst_n, .job_valid, .job_ready, .job,
    .rd_req_valid(c_valid[1]), .rd_req_ready(c_ready[1]), .rd_req_addr(c_addr[1]),
    .rd_rsp_valid(c_rsp_valid[1]), .rd_rsp_data(c_rsp_data),
    .nfu_valid(nfu_in_valid), .nfu_slot_en, .nfu_first, .nfu_last, .nfu_a, .nfu_w,
    .n_reads(n_data_reads)
  );

  nfu_array u_nfus (
    .clk, .rst_n, .in_valid(nfu_in_valid), .slot_en(nfu_slot_en),
    .first(nfu_first), .last(nfu_last), .act(nfu_act),
    .a(nfu_a), .w(nfu_w), .out_valid(nfu_out_valid), .out(nfu_out)
  );

  logic wr_job_valid, wr_job_ready, wdma_idle;
  wr_job_t wr_job;
  assign c_we[0] = 1'b1;
  write_dma u_wdma (
    .clk, .rst_n, .job_valid(wr_job_valid), .job_ready(wr_job_ready), .job(wr_job),
    .wr_valid(c_valid[0]), .wr_ready(c_ready[0]), .wr_addr(c_addr[0]),
    .wr_data(c_wdata[0]), .wr_mask(c_wmask[0]), .idle(wdma_idle), .n_zero_ins
  );

  logic bv_req, bv_valid, mask_in_valid, mask_out_valid;
  logic [4:0] bv_cnt;
  logic [NFU_N-1:0] bv;
  logic [NFU_N-1:0][DATA_W-1:0] mask_in, mask_out;
  logic tbl_valid, tbl_ready, tbl_last;
  logic [NFU_N-1:0][IDX_W-1:0] tbl_idx;
  logic [4:0] tbl_cnt;
  logic [IDX_W-1:0] seg_first;
  logic [9:0] seg_len;
  line_t seg_bits;

  filter_dropper u_drop (
    .clk, .rst_n, .start, .mode(cfg_mode), .seed(cfg_seed), .rate(cfg_rate),
    .scale(cfg_scale), .n_neu(cfg_n_neu),
    .bv_req, .bv_cnt, .bv_valid, .bv,
    .mask_in_valid, .mask_in, .mask_out_valid, .mask_out,
    .tbl_valid, .tbl_ready, .tbl_idx, .tbl_cnt, .seg_first, .seg_len, .seg_bits,
    .tbl_last, .n_dropped
  );

  fc_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .cfg_mode, .cfg_act, .cfg_n_neu, .cfg_n_src, .cfg_src_base, .cfg_w_base, .cfg_dst_base,
    .bv_req, .bv_cnt, .bv_valid,
    .mask_in_valid, .mask_in, .mask_out_valid, .mask_out,
    .tbl_valid, .tbl_ready, .tbl_idx, .tbl_cnt, .seg_first, .seg_len, .seg_bits, .tbl_last,
    .job_valid, .job_ready, .job, .nfu_act, .nfu_out_valid, .nfu_out,
    .wr_job_valid, .wr_job_ready, .wr_job, .wdma_idle,
    .n_steps, .n_empty_steps
  );

endmodule
