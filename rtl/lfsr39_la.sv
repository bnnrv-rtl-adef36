// lfsr39_la: 39-bit look-ahead LFSR, the random source of the extension's
// uniform RNG.
//
// Three parts, as in the uniform-RNG unit diagram: a seed generator that
// widens a 32-bit register value to the 39-bit state, the 39-bit state
// register, and a feedback network that applies the LFSR recurrence STEPS
// (32) times in one clock, so that every step yields 32 new bits instead of
// one. The 39-bit width and the 32-step look-ahead follow the extension's
// description. The rest is this design's choice:
//   * recurrence: Fibonacci form of x^39 + x^35 + 1 (a maximal-length
//     trinomial), shifting left, new bit = s[38] ^ s[34] entering at bit 0;
//     after 32 steps bits [31:0] are all new bits, so they are the sample;
//   * seed generator: state = {~seed[6:0], seed}, never all-zero, so no seed
//     can lock the LFSR;
//   * reset value RESET_STATE (non-zero).
//
// Interface / timing: `seed_load` (priority) loads the seeded state and
// `step` advances 32 steps, both on the rising clock edge. `sample` is the
// low 32 bits of the current state, combinational from the register, so the
// value read in a cycle is the one a `step` in that same cycle consumes.
module lfsr39_la #(
  parameter int unsigned            STATE_W     = 39,
  parameter int unsigned            STEPS       = 32,
  parameter int unsigned            OUT_W       = 32,
  parameter logic [STATE_W-1:0]     RESET_STATE = 39'h12_3456_789A
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               seed_load,
  input  logic [OUT_W-1:0]   seed,
  input  logic               step,
  output logic [OUT_W-1:0]   sample,
  output logic [STATE_W-1:0] state
);

  logic [STATE_W-1:0] seeded;
  logic [STATE_W-1:0] next_la;

  // Seed generator: pad the seed with its own inverted low bits.
  always_comb begin
    seeded = '0;
    seeded[OUT_W-1:0] = seed;
    for (int unsigned i = OUT_W; i < STATE_W; i++)
      seeded[i] = ~seed[i - OUT_W];
  end

  // Look-ahead feedback: STEPS applications of the recurrence, unrolled
  // into one XOR network.
  always_comb begin
    next_la = state;
    for (int unsigned k = 0; k < STEPS; k++)
      next_la = {next_la[STATE_W-2:0], next_la[STATE_W-1] ^ next_la[STATE_W-5]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= RESET_STATE;
    else if (seed_load) state <= seeded;
    else if (step)      state <= next_la;
  end

  assign sample = state[OUT_W-1:0];

endmodule
