// nfu: one neural functional unit.
//
// Sixteen multipliers feed an adder tree; the tree output is accumulated over
// successive inputs and the finished sum goes through the activation stage.
// The three pipeline stages (multiply, add/accumulate, activation) follow the
// DianNao NFU the accelerator is built on; the 32-bit fixed-point format
// (Q16.16, products truncated) and the first/last accumulate control are this
// design's choices.
//
// Timing: a valid input with 'first' restarts the sum, a valid input with
// 'last' produces out_valid three cycles after it enters (in at cycle t,
// products registered at t+1, sum at t+2, out at t+3). 'en' gates the whole
// unit (power gating of an unused slot): a disabled NFU multiplies zero.
module nfu
  import sgc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      en,
  input  logic                      first,
  input  logic                      last,
  input  act_e                      act,
  input  logic [NFU_IN-1:0][DATA_W-1:0] a,   // activations / dCout pixels
  input  logic [NFU_IN-1:0][DATA_W-1:0] w,   // weights
  output logic                      out_valid,
  output word_t                     out
);

  // stage 1: multiply
  word_t              prod_q [NFU_IN];
  logic               v1_q, f1_q, l1_q;
  act_e               act1_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0; f1_q <= 1'b0; l1_q <= 1'b0; act1_q <= ACT_NONE;
      for (int i = 0; i < NFU_IN; i++) prod_q[i] <= '0;
    end else begin
      v1_q <= in_valid; f1_q <= first; l1_q <= last; act1_q <= act;
      for (int i = 0; i < NFU_IN; i++)
        prod_q[i] <= en ? fx_mul(word_t'(a[i]), word_t'(w[i])) : '0;
    end
  end

  // stage 2: adder tree and accumulator
  word_t tree_sum;
  always_comb begin
    tree_sum = '0;
    for (int i = 0; i < NFU_IN; i++) tree_sum = tree_sum + prod_q[i];
  end

  word_t acc_q;
  logic  v2_q;
  act_e  act2_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0; v2_q <= 1'b0; act2_q <= ACT_NONE;
    end else begin
      v2_q   <= v1_q && l1_q;
      act2_q <= act1_q;
      if (v1_q) acc_q <= f1_q ? tree_sum : acc_q + tree_sum;
    end
  end

  // stage 3: activation function
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out <= '0;
    end else begin
      out_valid <= v2_q;
      if (v2_q) out <= (act2_q == ACT_RELU && acc_q < 0) ? '0 : acc_q;
    end
  end

endmodule
