// swl_lfsr: Galois linear-feedback shift register, the random number source of SWL.
//
// The sampler draws one number per write from it to decide whether the write is sampled,
// and every bank draws a fresh secure key from its own instance when its running pointer
// wraps. The register shifts once per cycle in which `en` is high; `value` is the current
// state, which is never zero. Reset loads SEED (a zero seed is replaced by 1).
// The document only says that a linear shift register is used; the polynomial
// (x^32 + x^22 + x^2 + x + 1, maximal length) and the Galois form are this design's choice.
// STEPS > 1 advances the register STEPS single shifts per enable (leap-forward), so that
// successive values share no bits; the sampler uses this so its decisions are independent.
// Timing: `value` changes on the clock edge after `en`.
module swl_lfsr #(
  parameter int unsigned W    = 32,
  parameter logic [W-1:0] TAPS = W'(32'h8020_0003),
  parameter logic [W-1:0] SEED = W'(32'h1ACE_B00C),
  parameter int unsigned STEPS = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] value
);

  logic [W-1:0] state;

  logic [W-1:0] next;

  // STEPS single shifts per enable, unrolled into one XOR network
  always_comb begin
    next = state;
    for (int i = 0; i < STEPS; i++) next = next[0] ? ((next >> 1) ^ TAPS) : (next >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= (SEED == '0) ? W'(1) : SEED;
    else if (en)     state <= next;
  end

  assign value = state;

endmodule
