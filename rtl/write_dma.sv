// write_dma: writes gradients back to DRAM, re-inserting the skipped zeros.
//
// The NFUs only produce gradients for the set bits of a bit-vector range
// (the filters that were collected), so they are not consecutive in the
// gradient map. A write job carries that range [seg_start, seg_end] of a
// bit-vector line, the element address of bit 0 of the line and the computed
// gradients in ascending bit order. The DMA expands the range: a set bit at
// position p takes the next computed gradient, a clear bit takes zero
// (e.g. bits 1101010 with g0 g1 g3 g5 are written as g0 g1 0 g3 0 g5 0).
// The expanded range is written as aligned 16-word DRAM lines with a word
// enable mask, so ranges that start or end inside a line leave the other
// words of that line untouched.
//
// Interface: job_valid/job_ready (accepted only when idle), then one
// wr_valid/wr_ready beat per DRAM line covered by the range. idle is high
// when no job is in progress. The zero insertion follows the document; the
// masked-line write format is this design's choice.
module write_dma
  import sgc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     job_valid,
  output logic                     job_ready,
  input  wr_job_t                  job,
  output logic                     wr_valid,
  input  logic                     wr_ready,
  output logic [ADDR_W-1:0]        wr_addr,
  output line_t                    wr_data,
  output logic [LINE_WORDS-1:0]    wr_mask,
  output logic                     idle,
  output logic [31:0]              n_zero_ins   // zero gradients inserted
);

  localparam int RW = $clog2(LINE_BITS) + 1;

  logic          busy_q;
  wr_job_t       job_q;
  logic [ADDR_W-1:0] line_q, line_end_q;

  // Rank (set bits below) of each bit of the job's line.
  logic [RW-1:0] rank [LINE_BITS];
  always_comb begin
    logic [RW-1:0] r;
    r = '0;
    for (int p = 0; p < LINE_BITS; p++) begin
      rank[p] = r;
      r = r + RW'(job_q.bits[p]);
    end
  end

  logic [EADDR_W-1:0] e_first, e_last;
  assign e_first = job_q.elem_base + EADDR_W'(job_q.seg_start);
  assign e_last  = job_q.elem_base + EADDR_W'(job_q.seg_end);

  logic [RW-1:0] rank0;
  assign rank0 = rank[job_q.seg_start[$clog2(LINE_BITS)-1:0]];

  logic [4:0] nz;   // zeros inserted in this line
  always_comb begin
    nz = '0;
    for (int l = 0; l < LINE_WORDS; l++) begin
      logic [EADDR_W-1:0] e;
      logic [EADDR_W-1:0] p;
      logic [RW-1:0]      gi;
      e  = {line_q, 4'(l)};
      p  = e - job_q.elem_base;
      wr_mask[l] = (e >= e_first) && (e <= e_last);
      wr_data[l*DATA_W +: DATA_W] = '0;
      gi = '0;
      if (wr_mask[l]) begin
        if (job_q.bits[p[$clog2(LINE_BITS)-1:0]]) begin
          gi = rank[p[$clog2(LINE_BITS)-1:0]] - rank0;
          wr_data[l*DATA_W +: DATA_W] = job_q.grad[gi[$clog2(NFU_N)-1:0]];
        end else begin
          nz = nz + 5'd1;
        end
      end
    end
  end

  assign job_ready = !busy_q;
  assign wr_valid  = busy_q;
  assign wr_addr   = line_q;
  assign idle      = !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; job_q <= '0; line_q <= '0; line_end_q <= '0; n_zero_ins <= '0;
    end else if (!busy_q) begin
      if (job_valid) begin
        busy_q     <= 1'b1;
        job_q      <= job;
        line_q     <= ADDR_W'((job.elem_base + EADDR_W'(job.seg_start)) >> 4);
        line_end_q <= ADDR_W'((job.elem_base + EADDR_W'(job.seg_end)) >> 4);
      end
    end else if (wr_ready) begin
      n_zero_ins <= n_zero_ins + 32'(nz);
      if (line_q == line_end_q) busy_q <= 1'b0;
      line_q <= line_q + 1'b1;
    end
  end

endmodule
