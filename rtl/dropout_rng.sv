// dropout_rng: seeded pseudo-random number generator of the filter dropper.
//
// Each 'step' advances a 32-bit xorshift generator (x ^= x<<13; x ^= x>>17;
// x ^= x<<5) and 'rnd' is its current state. Loading the same seed replays
// the same sequence, which is what lets the backward pass regenerate the
// forward pass's dropout mask instead of storing it. A zero seed (the one
// state xorshift never leaves) is replaced by a fixed non-zero constant.
// The document asks for a seeded RNG; the xorshift algorithm is this
// design's choice.
//
// Timing: 'load' takes effect at the next edge; after it, each cycle with
// 'step' high moves 'rnd' to the next number.
module dropout_rng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] seed,
  input  logic        step,
  output logic [31:0] rnd
);

  localparam logic [31:0] ZERO_SEED = 32'h2545_F491;

  function automatic logic [31:0] next(logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rnd <= ZERO_SEED;
    else if (load) rnd <= (seed == '0) ? ZERO_SEED : seed;
    else if (step) rnd <= next(rnd);
  end

endmodule
