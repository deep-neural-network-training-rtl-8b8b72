// sgc_pkg: constants and types shared by both accelerators.
//
// The datapath is 32-bit fixed point with 16 NFUs of 16 multipliers each, as
// in the DianNao-derived training accelerator (16 x 16 = 256 MACs per cycle).
// One DRAM access moves one 512-bit line, i.e. 16 data words or 512
// bit-vector bits. The number of fraction bits (16) is this design's choice.
package sgc_pkg;

  localparam int DATA_W    = 32;            // fixed-point word
  localparam int FRAC_W    = 16;            // fraction bits (Q16.16), own choice
  localparam int NFU_N     = 16;            // NFUs
  localparam int NFU_IN    = 16;            // multipliers per NFU
  localparam int LINE_BITS = 512;           // one DRAM access: 64 bytes
  localparam int LINE_WORDS = LINE_BITS / DATA_W;  // 16
  localparam int ADDR_W    = 32;            // DRAM line address
  localparam int EADDR_W   = ADDR_W + 4;    // word (element) address
  localparam int IDX_W     = 16;            // neuron / channel index

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic [LINE_BITS-1:0]     line_t;

  // Activation applied in the third NFU stage.
  typedef enum logic [0:0] {ACT_NONE = 1'b0, ACT_RELU = 1'b1} act_e;

  // One MAC job: one line of 16 activations / gradients broadcast to all
  // NFUs and, for each NFU slot, the address of one line of 16 weights.
  typedef struct packed {
    logic [ADDR_W-1:0]              act_addr;
    logic [NFU_N-1:0][ADDR_W-1:0]   w_addr;
    logic [NFU_N-1:0]               slot_valid;  // slot used (filter collected)
    logic                           first;       // first term of a sum
    logic                           last;        // last term: result is final
  } mac_job_t;

  // One write-back job: the bit range [seg_start, seg_end] of a bit-vector
  // line, element address of bit 0 of that line, and the gradients of the
  // set bits of the range in ascending order.
  typedef struct packed {
    logic [EADDR_W-1:0]             elem_base;
    line_t                          bits;
    logic [9:0]                     seg_start;
    logic [9:0]                     seg_end;
    logic [NFU_N-1:0][DATA_W-1:0]   grad;
  } wr_job_t;

  // Fixed-point multiply with truncation of the extra fraction bits.
  function automatic word_t fx_mul(word_t a, word_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return word_t'(p >>> FRAC_W);
  endfunction

endpackage
