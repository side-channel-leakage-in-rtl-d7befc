// fresh_mask_gen: pseudo-random source of fresh masks.
//
// A 32-bit Galois LFSR (polynomial x^32 + x^22 + x^2 + x + 1, maximal length)
// is advanced OUT_W steps each time `step` is high, so successive outputs
// share no state bits that were simply shifted along; the output is the low
// OUT_W bits of the state.  Reset loads SEED (must be non-zero).  The output
// is a register: a new value is visible the cycle after `step`.
// The document only states that the fresh mask is generated internally and is
// unbiased over the averaging window; the generator type is this design's
// choice.  An LFSR is a test-bench-grade source, not a cryptographic one.
module fresh_mask_gen #(
  parameter int unsigned    OUT_W = 12,
  parameter logic [31:0]    SEED  = 32'h1ACE_B00C
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  output logic [OUT_W-1:0] mask_o
);
  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] state, next_state;

  always_comb begin
    next_state = state;
    for (int unsigned i = 0; i < OUT_W; i++)
      next_state = next_state[0] ? ((next_state >> 1) ^ TAPS) : (next_state >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= next_state;
  end

  assign mask_o = state[OUT_W-1:0];

  initial assert (SEED != 32'd0) else $error("fresh_mask_gen: SEED must be non-zero");
  initial assert (OUT_W >= 1 && OUT_W <= 32) else $error("fresh_mask_gen: OUT_W out of range");
endmodule
