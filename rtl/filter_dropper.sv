// filter_dropper: dropout for a fully connected layer without a stored mask,
// and selection of the neurons whose gradients must be computed.
//
// A random number is drawn for every neuron, in neuron order, from a seeded
// generator and compared with the dropout rate: rnd < rate means dropped
// (bit 0), otherwise kept (bit 1). Because forward and backward pass load the
// same seed, both see the same bits, so the mask is never written to DRAM.
// A mode switch steers the comparator bit:
//  * FP (mode 0): bits are collected into a 16-bit bit-vector for the 16
//    output neurons being computed (one bit per cycle, hidden behind the MAC
//    work), and the dropout mask unit zeroes and scales the NFU outputs.
//  * BP (mode 1): the indices of kept neurons are pushed into the 16-entry
//    table. When the table is full, 512 neurons have been scanned, or all
//    neurons are done, the table is offered to the controller with the
//    bit-vector of the scanned range, so the write DMA can insert zero
//    gradients for the dropped neurons. Gradients of kept neurons go through
//    the mask unit with all bits set, i.e. they are only scaled.
// The RNG, comparator, mode mux, table and mask follow the document's filter
// dropper; the 512-neuron segment limit (one DRAM line of bits), the
// handshakes and the rate encoding (a 32-bit fraction of 2^32) are this
// design's choices.
//
// Timing: 'start' loads the seed and clears the state; in FP a bv_req
// produces bv_valid after bv_cnt cycles; in BP one neuron is examined per
// cycle while the table is not being handed out.
module filter_dropper
  import sgc_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         mode,      // 0: FP, 1: BP
  input  logic [31:0]                  seed,
  input  logic [31:0]                  rate,      // drop if rnd < rate
  input  word_t                        scale,
  input  logic [16:0]                  n_neu,     // neurons of the layer
  // FP bit-vector
  input  logic                         bv_req,
  input  logic [4:0]                   bv_cnt,    // 1..16 neurons
  output logic                         bv_valid,
  output logic [NFU_N-1:0]             bv,
  // mask unit
  input  logic                         mask_in_valid,
  input  logic [NFU_N-1:0][DATA_W-1:0] mask_in,
  output logic                         mask_out_valid,
  output logic [NFU_N-1:0][DATA_W-1:0] mask_out,
  // BP table
  output logic                         tbl_valid,
  input  logic                         tbl_ready,
  output logic [NFU_N-1:0][IDX_W-1:0]  tbl_idx,
  output logic [4:0]                   tbl_cnt,
  output logic [IDX_W-1:0]             seg_first,
  output logic [9:0]                   seg_len,
  output line_t                        seg_bits,
  output logic                         tbl_last,
  output logic [31:0]                  n_dropped
);

  typedef enum logic [2:0] {S_IDLE, S_FP_GEN, S_FP_HAVE, S_BP_GEN, S_BP_OUT} state_e;
  state_e state_q;

  logic [31:0] rnd;
  logic        step;
  logic        keep;
  dropout_rng u_rng (.clk, .rst_n, .load(start), .seed, .step, .rnd);

  // comparator
  assign keep = (rnd >= rate);

  logic [4:0]  c_q;
  logic [IDX_W:0] n_q;          // next neuron
  logic [9:0]  segpos_q;
  logic        push, clear, full;
  logic [4:0]  count;

  dropout_table #(.DEPTH(NFU_N), .IW(IDX_W)) u_tbl (
    .clk, .rst_n, .clear, .push, .idx(n_q[IDX_W-1:0]), .entries(tbl_idx),
    .count, .full
  );

  assign step  = (state_q == S_FP_GEN) || (state_q == S_BP_GEN);
  assign push  = (state_q == S_BP_GEN) && keep;
  assign clear = start || ((state_q == S_BP_OUT) && tbl_ready);

  assign bv_valid  = (state_q == S_FP_HAVE);
  assign tbl_valid = (state_q == S_BP_OUT);
  assign tbl_cnt   = count;
  assign seg_len   = segpos_q;
  assign tbl_last  = (n_q == (IDX_W+1)'(n_neu));

  dropout_mask u_mask (
    .clk, .rst_n, .in_valid(mask_in_valid), .bits(mode ? '1 : bv), .scale,
    .in(mask_in), .out_valid(mask_out_valid), .out(mask_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE; c_q <= '0; n_q <= '0; segpos_q <= '0; bv <= '0;
      seg_first <= '0; seg_bits <= '0; n_dropped <= '0;
    end else if (start) begin
      n_q <= '0; segpos_q <= '0; seg_first <= '0; seg_bits <= '0; n_dropped <= '0;
      state_q <= mode ? S_BP_GEN : S_IDLE;
    end else begin
      case (state_q)
        S_IDLE, S_FP_HAVE: if (bv_req && !mode) begin
          c_q <= '0; bv <= '0; state_q <= S_FP_GEN;
        end
        S_FP_GEN: begin
          bv[c_q[3:0]] <= keep;
          n_q <= n_q + 1'b1;
          if (!keep) n_dropped <= n_dropped + 1;
          c_q <= c_q + 1'b1;
          if (c_q == bv_cnt - 1'b1) state_q <= S_FP_HAVE;
        end
        S_BP_GEN: begin
          seg_bits[segpos_q[8:0]] <= keep;
          segpos_q <= segpos_q + 1'b1;
          n_q <= n_q + 1'b1;
          if (!keep) n_dropped <= n_dropped + 1;
          if ((keep && count == 5'(NFU_N - 1)) || segpos_q == 10'(LINE_BITS - 1)
              || n_q + 1'b1 == (IDX_W+1)'(n_neu))
            state_q <= S_BP_OUT;
        end
        S_BP_OUT: if (tbl_ready) begin
          segpos_q  <= '0;
          seg_bits  <= '0;
          seg_first <= n_q[IDX_W-1:0];
          state_q   <= tbl_last ? S_IDLE : S_BP_GEN;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The table is never pushed beyond its 16 entries.
  a_table_not_overfilled: assert property (@(posedge clk) disable iff (!rst_n)
                                           push |-> !full);

endmodule
