// ext_decoder: decode logic for the three BNN extension instructions.
//
// All three use the R4 layout of RISC-V:
//   [31:27] rs3  [26:25] funct2  [24:20] rs2  [19:15] rs1
//   [14:12] funct3  [11:7] rd  [6:0] opcode
// and {funct2, funct3} is the 5-bit fixed-point shift immediate I.
//   fx.madd  rd, rs3 + (rs1*rs2) >> I   opcode OPC_FX_MADD, writes rd
//   fxg.unif rd, urng() >> I            opcode OPC_FXG_UNIF, writes rd
//   fxg.seed rs1                        opcode OPC_FXG_SEED, no write
// The R4 layout and the funct2/funct3 immediate follow the extension's
// definition for fx.madd; the opcodes, and giving fxg.unif the same layout
// (its unit takes the same funct2/funct3 immediate), are this design's
// choice. Every other instruction decodes to EXT_NONE and is left to the
// base core. Purely combinational.
module ext_decoder
  import bnnrv_pkg::*;
(
  input  word_t     instr,
  output ext_ctrl_t ctrl,
  output logic      is_ext    // one of the three extension instructions
);

  always_comb begin
    ctrl.rd    = instr[11:7];
    ctrl.rs1   = instr[19:15];
    ctrl.rs2   = instr[24:20];
    ctrl.rs3   = instr[31:27];
    ctrl.shamt = {instr[26:25], instr[14:12]};
    unique case (instr[6:0])
      OPC_FX_MADD:  ctrl.op = EXT_MADD;
      OPC_FXG_UNIF: ctrl.op = EXT_UNIF;
      OPC_FXG_SEED: ctrl.op = EXT_SEED;
      default:      ctrl.op = EXT_NONE;
    endcase
    ctrl.rd_we = (ctrl.op == EXT_MADD) || (ctrl.op == EXT_UNIF);
    is_ext     = (ctrl.op != EXT_NONE);
  end

endmodule
