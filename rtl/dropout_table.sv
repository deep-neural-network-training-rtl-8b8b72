// dropout_table: the filter dropper's table of non-dropped neuron indices.
//
// During the backward pass every neuron that was kept in the forward pass
// has its index pushed here. The table holds 16 entries of 16 bits, one per
// NFU, so the gradients of 16 kept neurons are computed together; when it is
// full its entries are handed to the read DMA (which loads the matching
// weight rows) and it is cleared.
//
// Interface: 'push' with 'idx' appends an entry (ignored when full); 'clear'
// empties it (a push in the same cycle becomes the first new entry);
// 'entries' and 'count' are the registered contents.
module dropout_table #(
  parameter int DEPTH = 16,   // entries
  parameter int IW    = 16    // bits per entry (neuron index)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      push,
  input  logic [IW-1:0]             idx,
  output logic [DEPTH-1:0][IW-1:0]  entries,
  output logic [$clog2(DEPTH):0]    count,
  output logic                      full
);

  assign full = (count == ($clog2(DEPTH)+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entries <= '0; count <= '0;
    end else if (clear) begin
      if (push) begin entries[0] <= idx; count <= 1; end
      else count <= '0;
    end else if (push && !full) begin
      entries[count[$clog2(DEPTH)-1:0]] <= idx;
      count <= count + 1'b1;
    end
  end

endmodule
