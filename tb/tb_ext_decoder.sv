// tb_ext_decoder: self-checking test of the extension decoder. Assembles
// random fx.madd / fxg.unif / fxg.seed words in the R4 layout and random
// other instructions, and checks the operation, register fields, the
// {funct2, funct3} shift immediate and the write enable.
module tb_ext_decoder;
  import bnnrv_pkg::*;
  word_t     instr;
  ext_ctrl_t ctrl;
  logic      is_ext;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  ext_decoder dut (.*);

  always #5 clk = ~clk;

  function automatic word_t r4(input logic [6:0] opc, input int rd, input int rs1,
                               input int rs2, input int rs3, input int imm);
    logic [4:0] i5;
    i5 = 5'(imm);
    return {5'(rs3), i5[4:3], 5'(rs2), 5'(rs1), i5[2:0], 5'(rd), opc};
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s instr=%h", what, instr); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int k, rd, a, b, c, imm;
      logic [6:0] opc;
      k = $urandom_range(0, 3);
      rd = $urandom_range(0, 31); a = $urandom_range(0, 31);
      b = $urandom_range(0, 31);  c = $urandom_range(0, 31);
      imm = $urandom_range(0, 31);
      case (k)
        0: opc = 7'b1011011;
        1: opc = 7'b0001011;
        2: opc = 7'b0101011;
        default: begin
          opc = 7'($urandom);
          if (opc == 7'b1011011 || opc == 7'b0001011 || opc == 7'b0101011) opc = 7'b0110011;
        end
      endcase
      instr = r4(opc, rd, a, b, c, imm);
      #1;
      chk(is_ext == (k != 3), "is_ext");
      chk(ctrl.op == ((k == 0) ? EXT_MADD : (k == 1) ? EXT_UNIF : (k == 2) ? EXT_SEED : EXT_NONE), "op");
      chk(ctrl.rd_we == (k < 2), "rd_we");
      chk(int'(ctrl.rd) == rd && int'(ctrl.rs1) == a && int'(ctrl.rs2) == b && int'(ctrl.rs3) == c, "fields");
      chk(int'(ctrl.shamt) == imm, "shamt");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
