// bnnrv_pkg: types and constants shared by the BNN weight-sampling RISC-V
// extension (uniform RNG, fixed-point MAC and their decoder).
//
// The three custom instructions are fx.madd (fixed-point multiply-add),
// fxg.unif (uniform random sample, shifted) and fxg.seed (seed the RNG).
// fx.madd uses the R4 instruction layout, and funct2/funct3 together form the
// 5-bit shift immediate; both points follow the extension's definition.
// The major opcodes are this design's own choice: the three RISC-V
// "custom" opcode slots reserved for vendor extensions.
package bnnrv_pkg;

  localparam int unsigned XLEN    = 32;  // data path width
  localparam int unsigned SHAMT_W = 5;   // fixed-point scale immediate
  localparam int unsigned REG_AW  = 5;   // register index width

  // Major opcodes (bits [6:0]); chosen from the custom-0/1/2 slots.
  localparam logic [6:0] OPC_FXG_UNIF = 7'b0001011;  // custom-0
  localparam logic [6:0] OPC_FXG_SEED = 7'b0101011;  // custom-1
  localparam logic [6:0] OPC_FX_MADD  = 7'b1011011;  // custom-2

  typedef logic [XLEN-1:0]    word_t;
  typedef logic [SHAMT_W-1:0] shamt_t;
  typedef logic [REG_AW-1:0]  reg_idx_t;

  // Which extension operation the decoder found.
  typedef enum logic [1:0] {
    EXT_NONE = 2'd0,
    EXT_UNIF = 2'd1,
    EXT_SEED = 2'd2,
    EXT_MADD = 2'd3
  } ext_op_e;

  // Control bundle produced in decode and consumed in execute
  // (the "Ctrl" signals of the functional-unit diagrams).
  typedef struct packed {
    ext_op_e  op;       // operation, EXT_NONE for any other instruction
    reg_idx_t rd;       // destination register
    reg_idx_t rs1;      // multiplicand / seed source
    reg_idx_t rs2;      // multiplier
    reg_idx_t rs3;      // addend of fx.madd
    shamt_t   shamt;    // {funct2, funct3}: fixed-point shift
    logic     rd_we;    // result is written back to rd
  } ext_ctrl_t;

endpackage
