// cnn_bp_accel: backward-propagation accelerator for a convolutional layer
// that follows a ReLU layer, with selective gradient computation.
//
// A gradient of the ReLU input is zero wherever the ReLU output was zero, so
// the whole convolution that would compute it can be skipped, and the BP
// filter it would need need not be read. The forward pass leaves one bit per
// ReLU output (the bit-vector) in DRAM. Here:
//   cnn_bp_ctrl       walks the gradient map and fetches bit-vector lines,
//   filter_collector  turns a line into groups of up to 16 needed filters,
//   read_dma          reads dCout' pixels and the (non-consecutive) filters,
//   nfu_array         16 NFUs x 16 multipliers, accumulating over Fx*Fy*Fn,
//   write_dma         writes the results back with zeros re-inserted,
//   bv_packer         in the forward pass, packs the ReLU output signs into
//                     the bit-vector that a later backward pass reads,
//   mem_if            shares the single 512-bit DRAM port (priority: write
//                     DMA, bit-vector writes, bit-vector fetch, read DMA).
// There are no on-chip neuron or weight buffers: all operands stream from
// DRAM, as in the document's main configuration.
//
// cfg_mode selects the forward pass (0: all channels computed, ReLU in the
// NFUs, bit-vector written) or the backward pass (1: bit-vector read, only
// the needed gradients computed, no activation), the same encoding as the
// FC accelerator.
//
// Interface: configuration and start/busy/done as in cnn_bp_ctrl; a DRAM
// port that accepts one line request per cycle when m_ready is high and
// returns read lines in order; event counters for monitoring.
module cnn_bp_accel
  import sgc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic                cfg_mode,
  input  logic [15:0]         cfg_ix, cfg_iy,
  input  logic [9:0]          cfg_iz,
  input  logic [3:0]          cfg_fx, cfg_fy,
  input  logic [15:0]         cfg_fn,
  input  logic [ADDR_W-1:0]   cfg_dout_base,
  input  logic [ADDR_W-1:0]   cfg_w_base,
  input  logic [ADDR_W-1:0]   cfg_bv_base,
  input  logic [EADDR_W-1:0]  cfg_din_base,
  output logic                m_valid,
  input  logic                m_ready,
  output logic                m_we,
  output logic [ADDR_W-1:0]   m_addr,
  output line_t               m_wdata,
  output logic [LINE_WORDS-1:0] m_wmask,
  input  logic                m_rsp_valid,
  input  line_t               m_rsp_data,
  output logic [31:0]         n_groups,
  output logic [31:0]         n_empty_groups,
  output logic [31:0]         n_filters_skipped,
  output logic [31:0]         n_bv_reads,
  output logic [31:0]         n_bv_span,
  output logic [31:0]         n_data_reads,
  output logic [31:0]         n_zero_ins,
  output logic [31:0]         n_bv_writes
);

  // filter collector
  logic fc_line_valid, fc_line_ready, fc_grp_valid, fc_grp_ready, fc_grp_last;
  line_t fc_line, fc_grp_bits;
  logic [9:0] fc_line_len;
  logic [NFU_N-1:0][8:0] fc_grp_pos;
  logic [4:0] fc_grp_cnt;
  logic [8:0] fc_grp_start, fc_grp_end;

  filter_collector u_fc (
    .clk, .rst_n,
    .line_valid(fc_line_valid), .line_ready(fc_line_ready), .line(fc_line),
    .line_len(fc_line_len),
    .grp_valid(fc_grp_valid), .grp_ready(fc_grp_ready), .grp_pos(fc_grp_pos),
    .grp_cnt(fc_grp_cnt), .grp_start(fc_grp_start), .grp_end(fc_grp_end),
    .grp_bits(fc_grp_bits), .grp_last(fc_grp_last)
  );

  // memory clients: 0 write DMA, 1 bit-vector writes, 2 bit-vector fetch,
  // 3 read DMA
  logic [3:0] c_valid, c_ready, c_we, c_rsp_valid;
  logic [3:0][ADDR_W-1:0] c_addr;
  logic [3:0][LINE_BITS-1:0] c_wdata;
  logic [3:0][LINE_WORDS-1:0] c_wmask;
  line_t c_rsp_data;

  mem_if #(.NCLI(4)) u_mem (
    .clk, .rst_n, .c_valid, .c_ready, .c_we, .c_addr, .c_wdata, .c_wmask,
    .c_rsp_valid, .c_rsp_data,
    .m_valid, .m_ready, .m_we, .m_addr, .m_wdata, .m_wmask, .m_rsp_valid, .m_rsp_data
  );

  // read DMA and NFUs
  logic job_valid, job_ready;
  mac_job_t job;
  logic nfu_in_valid, nfu_first, nfu_last, nfu_out_valid;
  logic [NFU_N-1:0] nfu_slot_en;
  logic [NFU_IN-1:0][DATA_W-1:0] nfu_a;
  logic [NFU_N-1:0][NFU_IN-1:0][DATA_W-1:0] nfu_w;
  logic [NFU_N-1:0][DATA_W-1:0] nfu_out;

  assign c_we[3] = 1'b0;
  assign c_wdata[3] = '0;
  assign c_wmask[3] = '0;
  read_dma u_rdma (
    .clk, .rst_n, .job_valid, .job_ready, .job,
    .rd_req_valid(c_valid[3]), .rd_req_ready(c_ready[3]), .rd_req_addr(c_addr[3]),
    .rd_rsp_valid(c_rsp_valid[3]), .rd_rsp_data(c_rsp_data),
    .nfu_valid(nfu_in_valid), .nfu_slot_en, .nfu_first, .nfu_last, .nfu_a, .nfu_w,
    .n_reads(n_data_reads)
  );

  nfu_array u_nfus (
    .clk, .rst_n, .in_valid(nfu_in_valid), .slot_en(nfu_slot_en),
    .first(nfu_first), .last(nfu_last), .act(cfg_mode ? ACT_NONE : ACT_RELU),
    .a(nfu_a), .w(nfu_w), .out_valid(nfu_out_valid), .out(nfu_out)
  );

  // write DMA, and in the forward pass the bit-vector packer, take each
  // group's results together
  logic wr_job_valid, wr_job_ready, wdma_idle, wdma_job_ready;
  wr_job_t wr_job;
  logic pk_ready, pk_idle;
  logic [NFU_N-1:0] pk_bits;
  logic [9:0] pk_cnt;
  logic fwd;
  assign fwd = !cfg_mode;
  always_comb
    for (int i = 0; i < NFU_N; i++) pk_bits[i] = ($signed(wr_job.grad[i]) > 0);
  assign pk_cnt = wr_job.seg_end - wr_job.seg_start + 10'd1;
  assign wr_job_ready = wdma_job_ready && (!fwd || pk_ready);

  assign c_we[0] = 1'b1;
  write_dma u_wdma (
    .clk, .rst_n, .job_valid(wr_job_valid && (!fwd || pk_ready)), .job_ready(wdma_job_ready),
    .job(wr_job),
    .wr_valid(c_valid[0]), .wr_ready(c_ready[0]), .wr_addr(c_addr[0]),
    .wr_data(c_wdata[0]), .wr_mask(c_wmask[0]), .idle(wdma_idle), .n_zero_ins
  );

  assign c_we[1] = 1'b1;
  bv_packer u_pack (
    .clk, .rst_n, .start, .en(fwd), .base(cfg_bv_base),
    .total(EADDR_W'(cfg_ix) * EADDR_W'(cfg_iy) * EADDR_W'(cfg_iz)),
    .in_valid(wr_job_valid && wdma_job_ready && fwd), .in_ready(pk_ready),
    .in_bits(pk_bits), .in_cnt(pk_cnt[4:0]),
    .wr_valid(c_valid[1]), .wr_ready(c_ready[1]), .wr_addr(c_addr[1]),
    .wr_data(c_wdata[1]), .wr_mask(c_wmask[1]), .idle(pk_idle), .n_writes(n_bv_writes)
  );

  assign c_we[2] = 1'b0;
  assign c_wdata[2] = '0;
  assign c_wmask[2] = '0;
  cnn_bp_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .cfg_mode,
    .cfg_ix, .cfg_iy, .cfg_iz, .cfg_fx, .cfg_fy, .cfg_fn,
    .cfg_dout_base, .cfg_w_base, .cfg_bv_base, .cfg_din_base,
    .bv_req_valid(c_valid[2]), .bv_req_ready(c_ready[2]), .bv_req_addr(c_addr[2]),
    .bv_rsp_valid(c_rsp_valid[2]), .bv_rsp_data(c_rsp_data),
    .fc_line_valid, .fc_line_ready, .fc_line, .fc_line_len,
    .fc_grp_valid, .fc_grp_ready, .fc_grp_pos, .fc_grp_cnt, .fc_grp_start,
    .fc_grp_end, .fc_grp_bits, .fc_grp_last,
    .job_valid, .job_ready, .job,
    .nfu_out_valid, .nfu_out,
    .wr_job_valid, .wr_job_ready, .wr_job, .wdma_idle(wdma_idle && pk_idle),
    .n_groups, .n_empty_groups, .n_filters_skipped, .n_bv_reads, .n_bv_span
  );

endmodule
