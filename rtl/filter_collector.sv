// filter_collector: picks, from one bit-vector line, the filters whose
// gradients must be computed, sixteen at a time.
//
// A bit-vector line holds one bit per channel of the input-side gradient map
// at one (x, y) position: 1 where the ReLU output was positive, 0 where it
// was zero (that gradient is zero and its whole convolution is skipped). The
// collector cuts the line into consecutive groups, each ending at its 16th
// set bit, and reports for every group the positions of its set bits (the
// filters to load, one per NFU), their number and the bit range the group
// covers. The last group ends at the end of the line and may hold fewer than
// 16 (or no) set bits; the collector never borrows bits from the next line.
// Example: a 64-bit line with 35 ones gives groups [0..27], [28..53], [54..63].
//
// How: when a line is accepted, its bits beyond line_len are cleared and the
// rank of every bit (number of set bits below it) is computed and registered
// with it. Group g is then simply the set bits of rank 16g .. 16g+15, so one
// group is produced per cycle without a loop from one group to the next.
//
// Interface: line_valid/line_ready loads a line (accepted only when idle);
// grp_valid/grp_ready hands out groups; grp_last marks the last group of the
// line. Timing: the first group is valid the cycle after the line is
// accepted, and then one group per cycle while grp_ready is high.
// The grouping rule follows the document; the rank-based circuit is this
// design's own.
module filter_collector
  import sgc_pkg::*;
#(
  parameter int LB    = LINE_BITS,  // bits in a line
  parameter int GROUP = NFU_N       // filters per group
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   line_valid,
  output logic                   line_ready,
  input  logic [LB-1:0]          line,
  input  logic [$clog2(LB):0]    line_len,    // 1..LB valid bits
  output logic                   grp_valid,
  input  logic                   grp_ready,
  output logic [GROUP-1:0][$clog2(LB)-1:0] grp_pos,
  output logic [$clog2(GROUP):0] grp_cnt,
  output logic [$clog2(LB)-1:0]  grp_start,
  output logic [$clog2(LB)-1:0]  grp_end,
  output logic [LB-1:0]          grp_bits,
  output logic                   grp_last
);

  localparam int PW = $clog2(LB);      // position width
  localparam int RW = $clog2(LB) + 1;  // rank width

  logic              busy_q;
  logic [LB-1:0]     vec_q;
  logic [RW-1:0]     rank_q [LB];
  logic [RW-1:0]     total_q;
  logic [PW-1:0]     lastpos_q;        // line_len - 1
  logic [RW-1:0]     gbase_q;          // 16 * group index
  logic [PW-1:0]     start_q;

  // Rank of every bit of the incoming line.
  logic [LB-1:0]     vec_in;
  logic [RW-1:0]     rank_in [LB];
  logic [RW-1:0]     total_in;
  always_comb begin
    for (int p = 0; p < LB; p++) vec_in[p] = line[p] && (p < int'(line_len));
    total_in = '0;
    for (int p = 0; p < LB; p++) begin
      rank_in[p] = total_in;
      total_in   = total_in + RW'(vec_in[p]);
    end
  end

  assign line_ready = !busy_q;

  // Positions of the set bits of rank gbase .. gbase+GROUP-1.
  logic [GROUP-1:0][PW-1:0] pos;
  logic [RW-1:0]            remaining;
  // Each set bit whose rank falls in the group writes its position into the
  // slot (rank - gbase); exactly one bit matches each filled slot.
  always_comb begin
    pos = '0;
    for (int p = 0; p < LB; p++) begin
      logic [RW-1:0] d;
      d = rank_q[p] - gbase_q;
      if (vec_q[p] && d < RW'(GROUP)) pos[d[$clog2(GROUP)-1:0]] |= PW'(p);
    end
    remaining = total_q - gbase_q;
  end

  assign grp_valid = busy_q;
  assign grp_pos   = pos;
  assign grp_cnt   = (remaining >= RW'(GROUP)) ? ($clog2(GROUP)+1)'(GROUP)
                                               : ($clog2(GROUP)+1)'(remaining);
  assign grp_start = start_q;
  assign grp_end   = (remaining >= RW'(GROUP)) ? pos[GROUP-1] : lastpos_q;
  assign grp_bits  = vec_q;
  assign grp_last  = (grp_end == lastpos_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; vec_q <= '0; total_q <= '0; lastpos_q <= '0;
      gbase_q <= '0; start_q <= '0;
      for (int p = 0; p < LB; p++) rank_q[p] <= '0;
    end else if (!busy_q) begin
      if (line_valid) begin
        busy_q    <= 1'b1;
        vec_q     <= vec_in;
        total_q   <= total_in;
        lastpos_q <= PW'(line_len - 1'b1);
        gbase_q   <= '0;
        start_q   <= '0;
        for (int p = 0; p < LB; p++) rank_q[p] <= rank_in[p];
      end
    end else if (grp_ready) begin
      if (grp_last) busy_q <= 1'b0;
      gbase_q <= gbase_q + RW'(GROUP);
      start_q <= grp_end + 1'b1;
    end
  end

endmodule
