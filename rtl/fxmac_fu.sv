// fxmac_fu: fixed-point multiply-accumulate functional unit of the modular
// extension (executes fx.madd rd, rs3 + (rs1 * rs2) >> I).
//
// A signed 32x32 multiplier keeps the low 32 bits of the product, a signed
// (arithmetic) shifter divides it by 2^I to restore the fixed-point scale,
// and an adder adds the third operand. With both factors in a format with I
// fractional bits, the result is in that same format. Widths, signedness and
// the order multiply -> shift -> add follow the unit's diagram; keeping the
// low product word (no rounding, wrap-around on overflow) is what a 32-bit
// path between multiplier and shifter implies.
//
// Purely combinational: the result is ready in the execute cycle.
module fxmac_fu
  import bnnrv_pkg::*;
(
  input  word_t  rs1,     // factor
  input  word_t  rs2,     // factor
  input  word_t  rs3,     // addend
  input  shamt_t shamt,   // {funct2, funct3}
  output word_t  fxmadd
);

  word_t prod;
  word_t scaled;

  always_comb begin
    prod   = word_t'($signed(rs1) * $signed(rs2));
    scaled = word_t'($signed(prod) >>> shamt);
    fxmadd = rs3 + scaled;
  end

endmodule
