// urng_fu: uniform random number functional unit of the modular extension
// (executes fxg.seed and fxg.unif).
//
// fxg.seed loads the look-ahead LFSR from rs1 through its seed generator.
// fxg.unif returns the LFSR's current 32-bit sample shifted right by the
// 5-bit immediate I ({funct2, funct3}) and advances the LFSR by 32 steps, so
// the next fxg.unif sees 32 fresh bits. With I = 32 - F the result is a
// uniform value in [0, 1) in a fixed-point format with F fractional bits.
// The structure (seed generator, 39-bit register, 32-step feedback, shifter
// to 32-bit `sample`) follows the unit's diagram. The shift is logical
// because the diagram's shifter, unlike the MAC unit's, is not marked
// signed; this is this design's reading.
//
// Timing: `sample` is combinational from the state register (one execute
// cycle); `seed_en`/`unif_en` act at the rising clock edge and must be low
// while the pipeline stage is stalled.
module urng_fu
  import bnnrv_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   seed_en,   // Ctrl: fxg.seed in execute
  input  logic   unif_en,   // Ctrl: fxg.unif in execute
  input  word_t  rs1,       // seed value
  input  shamt_t shamt,     // {funct2, funct3}
  output word_t  sample
);

  word_t raw;

  lfsr39_la u_lfsr (
    .clk       (clk),
    .rst_n     (rst_n),
    .seed_load (seed_en),
    .seed      (rs1),
    .step      (unif_en),
    .sample    (raw),
    .state     ()
  );

  assign sample = raw >> shamt;

endmodule
