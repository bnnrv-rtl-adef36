// regfile_3r: integer register file with the third read port the
// fixed-point multiply-add needs (fx.madd reads rs1, rs2 and rs3).
//
// NREGS x XLEN registers, register 0 reads as zero and ignores writes, as in
// any RISC-V integer register file. Three combinational (asynchronous) read
// ports and one write port written on the rising clock edge. A read of the
// register being written in the same cycle returns the old value; a core
// with a separate write-back stage adds its own bypass. The third read port
// is what the extension requires; port style and reset to zero (so every
// register has a defined value) are this design's choices.
module regfile_3r
  import bnnrv_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t ra1,
  input  reg_idx_t ra2,
  input  reg_idx_t ra3,
  output word_t    rd1,
  output word_t    rd2,
  output word_t    rd3,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd
);

  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
  assign rd3 = (ra3 == '0) ? '0 : regs[ra3];

endmodule
