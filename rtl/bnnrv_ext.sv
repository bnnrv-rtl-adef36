// bnnrv_ext: the execute-stage slice that a small in-order RV32IM core gains
// from the BNN weight-sampling extension.
//
// A Bayesian neuron with uniform-distribution weights needs, per input,
//   u   = fxg.unif  I          (uniform sample in fixed point)
//   w   = fx.madd   a, b, u, I (weight  w = a + b*u)
//   acc = fx.madd   acc, w, x, I
// i.e. three single-cycle instructions. This module holds what those
// instructions need besides the base core: the decoder for them, the
// integer register file extended to three read ports, and the functional
// units, in either of two implementations:
//   OPTIMIZED = 1  fx_fused_fu: RNG and MAC share one signed shifter, and
//                  the product comes from the core's own multiplier through
//                  `mul_lo` (the core computes signed rs1_data*rs2_data);
//   OPTIMIZED = 0  urng_fu + fxmac_fu: two independent units, the MAC with
//                  a multiplier of its own; `mul_lo` is then unused.
// Both implementations are the extension's; the optimized one, which is the
// cheaper of the two and gives the best efficiency, is the default.
//
// Interface: `instr` is the instruction in the execute stage, `instr_valid`
// says it is real and `stall` holds the stage. The register file's read data
// for the rs1/rs2/rs3 fields of any instruction are given out (rs*_data) for
// the rest of the core. The core's own write-back enters through core_we/
// core_wa/core_wd; it must not coincide with an extension write (asserted),
// since an in-order core writes back one instruction per cycle.
//
// Timing: an extension instruction reads its operands and computes in the
// cycle it is valid and not stalled, and its result (ext_result, also
// written to rd at the rising edge) is visible to the next instruction:
// one instruction per cycle, no extra latency. The single-cycle write-back
// is this slice's simplification of the core's EX/MEM/WB pipeline.
module bnnrv_ext
  import bnnrv_pkg::*;
#(
  parameter bit OPTIMIZED = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  // execute stage
  input  word_t    instr,
  input  logic     instr_valid,
  input  logic     stall,
  // register file towards the base core
  output word_t    rs1_data,
  output word_t    rs2_data,
  output word_t    rs3_data,
  input  logic     core_we,
  input  reg_idx_t core_wa,
  input  word_t    core_wd,
  // base core multiplier: low word of signed rs1_data * rs2_data
  input  word_t    mul_lo,
  // extension results
  output logic     is_ext,
  output logic     ext_we,
  output reg_idx_t ext_rd,
  output word_t    ext_result
);

  ext_ctrl_t ctrl;
  logic      fire;
  logic      seed_en;
  logic      unif_en;
  logic      rf_we;
  reg_idx_t  rf_wa;
  word_t     rf_wd;
  word_t     sample;
  word_t     fxmadd;

  ext_decoder u_dec (
    .instr  (instr),
    .ctrl   (ctrl),
    .is_ext (is_ext)
  );

  assign fire    = instr_valid && !stall;
  assign seed_en = fire && (ctrl.op == EXT_SEED);
  assign unif_en = fire && (ctrl.op == EXT_UNIF);

  regfile_3r u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra1   (ctrl.rs1),
    .ra2   (ctrl.rs2),
    .ra3   (ctrl.rs3),
    .rd1   (rs1_data),
    .rd2   (rs2_data),
    .rd3   (rs3_data),
    .we    (rf_we),
    .wa    (rf_wa),
    .wd    (rf_wd)
  );

  if (OPTIMIZED) begin : g_opt
    fx_fused_fu u_fu (
      .clk     (clk),
      .rst_n   (rst_n),
      .seed_en (seed_en),
      .unif_en (unif_en),
      .sel_rng (ctrl.op == EXT_UNIF),
      .rs1     (rs1_data),
      .mul_lo  (mul_lo),
      .rs3     (rs3_data),
      .shamt   (ctrl.shamt),
      .sample  (sample),
      .fxmadd  (fxmadd)
    );
  end else begin : g_mod
    urng_fu u_urng (
      .clk     (clk),
      .rst_n   (rst_n),
      .seed_en (seed_en),
      .unif_en (unif_en),
      .rs1     (rs1_data),
      .shamt   (ctrl.shamt),
      .sample  (sample)
    );
    fxmac_fu u_mac (
      .rs1    (rs1_data),
      .rs2    (rs2_data),
      .rs3    (rs3_data),
      .shamt  (ctrl.shamt),
      .fxmadd (fxmadd)
    );
  end

  // Result selection and the single register-file write port.
  always_comb begin
    ext_result = (ctrl.op == EXT_UNIF) ? sample : fxmadd;
    ext_we     = fire && ctrl.rd_we;
    ext_rd     = ctrl.rd;
    rf_we      = ext_we || core_we;
    rf_wa      = ext_we ? ctrl.rd : core_wa;
    rf_wd      = ext_we ? ext_result : core_wd;
  end

  // An in-order core retires one write per cycle.
  a_one_writer : assert property (@(posedge clk) disable iff (!rst_n)
    !(ext_we && core_we))
    else $error("bnnrv_ext: extension and core write-back in the same cycle");

endmodule
