// bv_packer: writes the ReLU bit-vector during the forward pass of a
// convolutional layer.
//
// The forward pass stores, next to the output activations, one bit per
// activation: 1 if the ReLU output is positive, 0 if not. The backward pass
// later reads these bits as bit-vector lines. The packer receives the bits of
// each finished group (up to 16 consecutive channels of one pixel, in the
// order the controller produces them) and appends them to a 512-bit line
// register. Bits are packed densely from bit 0 of line 'base', pixel after
// pixel, which is the layout the backward pass reads. A line is written as
// soon as it is full, and the last, partial line once 'total' bits have
// arrived. That last line is written up to the word that holds the last bit.
// The unused bits of that word are written as zeros.
//
// Interface: 'start' (with 'en') clears the pointer; 'en' low makes the
// packer ignore its input (backward mode). in_valid/in_ready hand over
// in_cnt bits in in_bits[in_cnt-1:0]; in_ready is low while a line write is
// pending. The write port is a valid/ready request of one 512-bit line with
// a word mask. 'idle' is high when nothing is left to write.
// The document states only that the bit-vector is produced in the forward
// pass and written to DRAM with the activations. The line register, the
// dense layout and the write policy are this design's choices.
module bv_packer
  import sgc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   en,
  input  logic [ADDR_W-1:0]      base,
  input  logic [EADDR_W-1:0]     total,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [NFU_N-1:0]       in_bits,
  input  logic [4:0]             in_cnt,
  output logic                   wr_valid,
  input  logic                   wr_ready,
  output logic [ADDR_W-1:0]      wr_addr,
  output line_t                  wr_data,
  output logic [LINE_WORDS-1:0]  wr_mask,
  output logic                   idle,
  output logic [31:0]            n_writes
);

  line_t               buf_q;      // bits of the line being filled
  logic [EADDR_W-1:0]  ptr_q;      // bits received so far
  logic                pend_q;     // a line write is waiting for the port
  logic                tail_q;     // the final partial line still follows
  line_t               wdata_q;
  logic [ADDR_W-1:0]   waddr_q;
  logic [LINE_WORDS-1:0] wmask_q;

  // the incoming bits placed at the pointer, over two lines
  logic [2*LINE_BITS-1:0] ins, comb;
  logic [NFU_N-1:0]       kept;
  logic [EADDR_W-1:0]     nptr;
  logic                   crosses, fin;
  always_comb begin
    kept = '0;
    for (int i = 0; i < NFU_N; i++) kept[i] = in_bits[i] && (5'(i) < in_cnt);
    ins  = (2*LINE_BITS)'(kept) << ptr_q[8:0];
    comb = {{LINE_BITS{1'b0}}, buf_q} | ins;
    nptr = ptr_q + EADDR_W'(in_cnt);
    crosses = (nptr[EADDR_W-1:9] != ptr_q[EADDR_W-1:9]);
    fin   = (nptr == total);
  end

  // word mask of a partial line ending at bit 'e' (exclusive), e in 1..511
  function automatic logic [LINE_WORDS-1:0] upto(logic [8:0] e);
    logic [LINE_WORDS-1:0] m;
    for (int w = 0; w < LINE_WORDS; w++) m[w] = (9'(w * DATA_W) < e);
    return m;
  endfunction

  assign in_ready = en && !pend_q && !tail_q;
  assign wr_valid = pend_q;
  assign wr_addr  = waddr_q;
  assign wr_data  = wdata_q;
  assign wr_mask  = wmask_q;
  assign idle     = !pend_q && !tail_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; ptr_q <= '0; pend_q <= 1'b0; tail_q <= 1'b0;
      wdata_q <= '0; waddr_q <= '0; wmask_q <= '0; n_writes <= '0;
    end else if (start) begin
      buf_q <= '0; ptr_q <= '0; pend_q <= 1'b0; tail_q <= 1'b0; n_writes <= '0;
    end else begin
      if (pend_q && wr_ready) begin
        pend_q   <= 1'b0;
        n_writes <= n_writes + 1;
      end
      if (tail_q && !pend_q) begin
        // the partial line left after a line-crossing final group
        pend_q  <= 1'b1; tail_q <= 1'b0;
        wdata_q <= buf_q;
        waddr_q <= base + ADDR_W'(ptr_q >> 9);
        wmask_q <= upto(ptr_q[8:0]);
        buf_q   <= '0;
      end
      if (in_valid && in_ready) begin
        ptr_q <= nptr;
        if (crosses) begin
          pend_q  <= 1'b1;
          wdata_q <= comb[LINE_BITS-1:0];
          waddr_q <= base + ADDR_W'(ptr_q >> 9);
          wmask_q <= '1;
          buf_q   <= comb[2*LINE_BITS-1:LINE_BITS];
          tail_q  <= fin && (nptr[8:0] != 0);
        end else if (fin) begin
          pend_q  <= 1'b1;
          wdata_q <= comb[LINE_BITS-1:0];
          waddr_q <= base + ADDR_W'(ptr_q >> 9);
          wmask_q <= upto(nptr[8:0]);
          buf_q   <= '0;
        end else begin
          buf_q <= comb[LINE_BITS-1:0];
        end
      end
    end
  end

  // A pending write is held until the port takes it.
  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr));
endmodule
