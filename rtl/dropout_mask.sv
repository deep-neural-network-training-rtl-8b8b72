// dropout_mask: masks and scales 16 NFU outputs before they are written back.
//
// out[i] = bits[i] ? in[i] * scale : 0, with 'scale' a Q16.16 fixed-point
// factor (normally 1/(1-rate), inverted dropout). In the forward pass 'bits'
// is the freshly generated dropout bit-vector, so dropped activations reach
// DRAM as zeros; in the backward pass all bits are 1 and only the scale is
// applied to the computed gradients of kept neurons. The multiply by bit and
// scale follows the document; the fixed-point format is this design's.
//
// Timing: registered, out_valid one cycle after in_valid.
module dropout_mask
  import sgc_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [NFU_N-1:0]             bits,
  input  word_t                        scale,
  input  logic [NFU_N-1:0][DATA_W-1:0] in,
  output logic                         out_valid,
  output logic [NFU_N-1:0][DATA_W-1:0] out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < NFU_N; i++)
          out[i] <= bits[i] ? fx_mul(word_t'(in[i]), scale) : '0;
    end
  end

endmodule
