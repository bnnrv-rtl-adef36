// tb_fxmac_fu: self-checking test of the fixed-point multiply-add unit.
// Directed cases in a 10-fractional-bit format plus random operands and
// shifts, against a 64-bit reference: rs3 + (low word of rs1*rs2) >>> I.
module tb_fxmac_fu;
  import bnnrv_pkg::*;
  word_t  rs1, rs2, rs3;
  shamt_t shamt;
  word_t  fxmadd;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fxmac_fu dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int a, input int b, input int c, input int sh);
    longint p;
    int     lo;
    int     exp;
    rs1 = a; rs2 = b; rs3 = c; shamt = shamt_t'(sh);
    p   = longint'(a) * longint'(b);
    lo  = int'(p);
    exp = c + (lo >>> sh);
    #1 checks++;
    if (fxmadd !== word_t'(exp)) begin
      failures++;
      $display("FAIL %0d*%0d>>%0d + %0d = %0d, expected %0d", a, b, sh, c,
               $signed(fxmadd), exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1.5 * -2.25 + 0.25 = -3.125 with 10 fractional bits
    run(1536, -2304, 256, 10);
    checks++;
    if ($signed(fxmadd) !== -3200) begin failures++; $display("FAIL directed"); end
    run(-1, 1, 0, 1);           // -1 >>> 1 stays -1 (arithmetic shift)
    checks++;
    if (fxmadd !== 32'hFFFF_FFFF) begin failures++; $display("FAIL sign"); end
    run(7, 9, 100, 0);          // no scaling
    run(32'h7FFF_FFFF, 2, 0, 0);// product wraps in the low word
    for (int i = 0; i < 5000; i++)
      run($urandom, $urandom, $urandom, $urandom_range(0, 31));
    for (int i = 0; i < 2000; i++)
      run($signed($urandom_range(0, 65535)) - 32768,
          $signed($urandom_range(0, 65535)) - 32768, $urandom, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
