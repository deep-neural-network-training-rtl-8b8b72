// sgc_top: the two selective-gradient-computation accelerators side by side.
//
// cnn_bp_accel speeds up backward propagation through convolutional layers
// that follow a ReLU, skipping gradients whose ReLU output was zero (its
// forward mode writes the bit-vector that the backward mode reads);
// fc_dropout_accel runs fully connected layers with dropout and skips the
// gradients of dropped neurons. Both are built around the same 16 x 16 NFU
// datapath, and each keeps its own controller and DRAM port ("c_" and "f_"
// prefixes); the two are not merged into one engine.
module sgc_top
  import sgc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // convolutional BP accelerator
  input  logic                c_start,
  output logic                c_busy,
  output logic                c_done,
  input  logic                c_mode,    // 0: forward, 1: backward
  input  logic [15:0]         c_ix, c_iy,
  input  logic [9:0]          c_iz,
  input  logic [3:0]          c_fx, c_fy,
  input  logic [15:0]         c_fn,
  input  logic [ADDR_W-1:0]   c_dout_base,
  input  logic [ADDR_W-1:0]   c_w_base,
  input  logic [ADDR_W-1:0]   c_bv_base,
  input  logic [EADDR_W-1:0]  c_din_base,
  output logic                c_m_valid,
  input  logic                c_m_ready,
  output logic                c_m_we,
  output logic [ADDR_W-1:0]   c_m_addr,
  output line_t               c_m_wdata,
  output logic [LINE_WORDS-1:0] c_m_wmask,
  input  logic                c_m_rsp_valid,
  input  line_t               c_m_rsp_data,
  output logic [7:0][31:0]    c_stats,   // groups, empty groups, skipped filters,
                                         // bit-vector reads, two-line bit-vectors,
                                         // data reads, inserted zeros,
                                         // bit-vector line writes
  // fully connected dropout accelerator
  input  logic                f_start,
  output logic                f_busy,
  output logic                f_done,
  input  logic                f_mode,
  input  act_e                f_act,
  input  logic [16:0]         f_n_neu,
  input  logic [16:0]         f_n_src,
  input  logic [ADDR_W-1:0]   f_src_base,
  input  logic [ADDR_W-1:0]   f_w_base,
  input  logic [EADDR_W-1:0]  f_dst_base,
  input  logic [31:0]         f_seed,
  input  logic [31:0]         f_rate,
  input  word_t               f_scale,
  output logic                f_m_valid,
  input  logic                f_m_ready,
  output logic                f_m_we,
  output logic [ADDR_W-1:0]   f_m_addr,
  output line_t               f_m_wdata,
  output logic [LINE_WORDS-1:0] f_m_wmask,
  input  logic                f_m_rsp_valid,
  input  line_t               f_m_rsp_data,
  output logic [4:0][31:0]    f_stats    // steps, empty steps, dropped neurons,
                                         // data reads, inserted zeros
);

  cnn_bp_accel u_cnn (
    .clk, .rst_n, .start(c_start), .busy(c_busy), .done(c_done), .cfg_mode(c_mode),
    .cfg_ix(c_ix), .cfg_iy(c_iy), .cfg_iz(c_iz), .cfg_fx(c_fx), .cfg_fy(c_fy),
    .cfg_fn(c_fn), .cfg_dout_base(c_dout_base), .cfg_w_base(c_w_base),
    .cfg_bv_base(c_bv_base), .cfg_din_base(c_din_base),
    .m_valid(c_m_valid), .m_ready(c_m_ready), .m_we(c_m_we), .m_addr(c_m_addr),
    .m_wdata(c_m_wdata), .m_wmask(c_m_wmask), .m_rsp_valid(c_m_rsp_valid),
    .m_rsp_data(c_m_rsp_data),
    .n_groups(c_stats[0]), .n_empty_groups(c_stats[1]), .n_filters_skipped(c_stats[2]),
    .n_bv_reads(c_stats[3]), .n_bv_span(c_stats[4]), .n_data_reads(c_stats[5]),
    .n_zero_ins(c_stats[6]), .n_bv_writes(c_stats[7])
  );

  fc_dropout_accel u_fc (
    .clk, .rst_n, .start(f_start), .busy(f_busy), .done(f_done),
    .cfg_mode(f_mode), .cfg_act(f_act), .cfg_n_neu(f_n_neu), .cfg_n_src(f_n_src),
    .cfg_src_base(f_src_base), .cfg_w_base(f_w_base), .cfg_dst_base(f_dst_base),
    .cfg_seed(f_seed), .cfg_rate(f_rate), .cfg_scale(f_scale),
    .m_valid(f_m_valid), .m_ready(f_m_ready), .m_we(f_m_we), .m_addr(f_m_addr),
    .m_wdata(f_m_wdata), .m_wmask(f_m_wmask), .m_rsp_valid(f_m_rsp_valid),
    .m_rsp_data(f_m_rsp_data),
    .n_steps(f_stats[0]), .n_empty_steps(f_stats[1]), .n_dropped(f_stats[2]),
    .n_data_reads(f_stats[3]), .n_zero_ins(f_stats[4])
  );

endmodule
