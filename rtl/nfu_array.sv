// nfu_array: the sixteen NFUs (NFU0..NFU15) of the accelerator.
//
// All NFUs receive the same 16 activations (in BP: 16 dCout pixels of one
// position and channel block) and each its own line of 16 weights (the
// collected filter of its slot), so 16 x 16 = 256 MACs are done per cycle.
// Slots without a collected filter are disabled. The registered NFU outputs
// form the 16-word output vector (the NBout side of the datapath); the
// accelerator has no other on-chip neuron or synapse buffer.
//
// Timing: out_valid follows an input with 'last' by three cycles.
module nfu_array
  import sgc_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [NFU_N-1:0]                  slot_en,
  input  logic                              first,
  input  logic                              last,
  input  act_e                              act,
  input  logic [NFU_IN-1:0][DATA_W-1:0]     a,
  input  logic [NFU_N-1:0][NFU_IN-1:0][DATA_W-1:0] w,
  output logic                              out_valid,
  output logic [NFU_N-1:0][DATA_W-1:0]      out
);

  logic [NFU_N-1:0] v;

  for (genvar n = 0; n < NFU_N; n++) begin : g_nfu
    word_t o;
    nfu u_nfu (
      .clk, .rst_n, .in_valid, .en(slot_en[n]), .first, .last, .act,
      .a, .w(w[n]), .out_valid(v[n]), .out(o)
    );
    assign out[n] = o;
  end

  assign out_valid = v[0];

endmodule
