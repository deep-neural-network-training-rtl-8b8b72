// dram_model: behavioural model of the off-chip DRAM used by the testbenches.
//
// Lines of 512 bits, addressed by line number, stored sparsely (unwritten
// lines read as zero). One request is accepted per cycle while ready is high;
// with STALL_PCT > 0, ready drops at random in that percentage of cycles.
// Reads return in order LAT cycles after acceptance. Writes honour the
// 16-bit word mask. Not synthesizable.
module dram_model
  import sgc_pkg::*;
#(
  parameter int LAT       = 8,
  parameter int STALL_PCT = 0
) (
  input  logic                  clk,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic [ADDR_W-1:0]     req_addr,
  input  line_t                 req_wdata,
  input  logic [LINE_WORDS-1:0] req_wmask,
  output logic                  rsp_valid,
  output line_t                 rsp_data
);

  line_t mem [logic [ADDR_W-1:0]];
  logic  pv [LAT];
  line_t pd [LAT];
  int    n_stalls = 0;
  int    n_reqs = 0;

  initial begin
    req_ready = 1'b1;
    for (int i = 0; i < LAT; i++) begin pv[i] = 1'b0; pd[i] = '0; end
  end

  function automatic line_t rd(logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic word_t rdw(logic [EADDR_W-1:0] e);
    line_t l;
    l = rd(ADDR_W'(e >> 4));
    return word_t'(l[e[3:0]*DATA_W +: DATA_W]);
  endfunction

  function automatic void wrw(logic [EADDR_W-1:0] e, word_t v);
    line_t l;
    l = rd(ADDR_W'(e >> 4));
    l[e[3:0]*DATA_W +: DATA_W] = v;
    mem[ADDR_W'(e >> 4)] = l;
  endfunction

  function automatic void wrbit(longint unsigned b, logic v);
    line_t l;
    l = rd(ADDR_W'(b >> 9));
    l[b[8:0]] = v;
    mem[ADDR_W'(b >> 9)] = l;
  endfunction

  assign rsp_valid = pv[LAT-1];
  assign rsp_data  = pd[LAT-1];

  always @(posedge clk) begin
    logic  nv;
    line_t nd;
    nv = 1'b0; nd = '0;
    if (req_valid && req_ready) begin
      n_reqs++;
      if (req_we) begin
        line_t l;
        l = rd(req_addr);
        for (int w = 0; w < LINE_WORDS; w++)
          if (req_wmask[w]) l[w*DATA_W +: DATA_W] = req_wdata[w*DATA_W +: DATA_W];
        mem[req_addr] = l;
      end else begin
        nv = 1'b1; nd = rd(req_addr);
      end
    end
    for (int i = LAT-1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= nv; pd[0] <= nd;
    if (STALL_PCT > 0) begin
      req_ready <= ($urandom_range(99) >= STALL_PCT);
      if (req_valid && !req_ready) n_stalls++;
    end
  end

endmodule
