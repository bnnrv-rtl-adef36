// tb_regfile_3r: self-checking test of the three-read-port register file:
// random writes against a reference array, all three ports read at random
// addresses every cycle, register 0 stays zero, reset clears every register.
module tb_regfile_3r;
  import bnnrv_pkg::*;
  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  reg_idx_t ra1 = '0, ra2 = '0, ra3 = '0, wa = '0;
  word_t    rd1, rd2, rd3, wd = '0;
  logic     we = 1'b0;
  word_t    model [32];
  int checks = 0, failures = 0;

  regfile_3r dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input word_t got, input reg_idx_t a, input string port);
    checks++;
    if (got !== model[a]) begin
      failures++;
      $display("FAIL %s x%0d = %h expected %h", port, a, got, model[a]);
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
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      ra1 = reg_idx_t'(i); #1 chk(rd1, ra1, "reset");
    end
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      we = $urandom_range(0, 1);
      wa = reg_idx_t'($urandom);
      wd = $urandom;
      ra1 = reg_idx_t'($urandom); ra2 = reg_idx_t'($urandom); ra3 = reg_idx_t'($urandom);
      #1 chk(rd1, ra1, "rd1"); chk(rd2, ra2, "rd2"); chk(rd3, ra3, "rd3");
      @(negedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    we = 1'b0;
    ra1 = '0; #1 chk(rd1, '0, "x0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
