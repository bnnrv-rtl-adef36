// fx_fused_fu: optimized extension unit that merges the uniform RNG and the
// fixed-point MAC (executes fxg.seed, fxg.unif and fx.madd).
//
// Instead of a multiplier of its own, the unit takes the low 32 bits of the
// signed product rs1*rs2 from the base core's existing multiplier. One
// signed shifter is shared: a multiplexer controlled by the decoder feeds it
// either that product (fx.madd) or the LFSR's 32-bit sample (fxg.unif). The
// shifter output is the `sample` result, and after the adder (+ rs3) the
// `fxmadd` result. All of this follows the optimized unit's diagram,
// including the shared shifter being signed, so here fxg.unif returns the
// sample shifted arithmetically: a value uniform in [-2^(31-I), 2^(31-I)),
// i.e. U(-0.5, 0.5) when I = 32 - F. (The modular urng_fu shifts logically
// and returns U(0, 1); software for this unit absorbs the 0.5 offset in the
// weight's constant term.) Seed generator, LFSR and reset value are those of
// lfsr39_la.
//
// Timing: outputs are combinational within the execute cycle; the LFSR is
// seeded or stepped on the rising clock edge when `seed_en`/`unif_en` is
// high, which must not happen while the stage is stalled. `sel_rng` only
// steers the multiplexer and may stay high through a stall.
module fx_fused_fu
  import bnnrv_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   seed_en,   // Ctrl: fxg.seed in execute
  input  logic   unif_en,   // Ctrl: fxg.unif in execute, step the LFSR
  input  logic   sel_rng,   // Ctrl: mux select, 1 = LFSR sample, 0 = product
  input  word_t  rs1,       // seed value
  input  word_t  mul_lo,    // low word of signed rs1*rs2 from the core
  input  word_t  rs3,       // addend
  input  shamt_t shamt,     // {funct2, funct3}
  output word_t  sample,    // shifter output (fxg.unif result)
  output word_t  fxmadd     // rs3 + shifter output (fx.madd result)
);

  word_t raw;
  word_t shin;
  word_t shout;

  lfsr39_la u_lfsr (
    .clk       (clk),
    .rst_n     (rst_n),
    .seed_load (seed_en),
    .seed      (rs1),
    .step      (unif_en),
    .sample    (raw),
    .state     ()
  );

  always_comb begin
    shin   = sel_rng ? raw : mul_lo;
    shout  = word_t'($signed(shin) >>> shamt);
    sample = shout;
    fxmadd = rs3 + shout;
  end

endmodule
