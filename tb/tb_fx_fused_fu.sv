// tb_fx_fused_fu: self-checking test of the optimized shared-shifter unit.
// fx.madd mode: fxmadd = rs3 + (mul_lo >>> I). fxg.unif mode: sample = LFSR
// low word >>> I (signed), generator steps by 32 per fxg.unif; the mux must
// not advance the generator by itself, and fxg.seed must reload it.
module tb_fx_fused_fu;
  import bnnrv_pkg::*;
  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   seed_en = 1'b0;
  logic   unif_en = 1'b0;
  logic   sel_rng = 1'b0;
  word_t  rs1 = '0, mul_lo = '0, rs3 = '0;
  shamt_t shamt = '0;
  word_t  sample, fxmadd;
  int checks = 0, failures = 0;
  logic [38:0] ref_s;

  fx_fused_fu dut (.*);

  always #5 clk = ~clk;

  function automatic logic [38:0] serial32(input logic [38:0] s);
    for (int k = 0; k < 32; k++) s = {s[37:0], s[38] ^ s[34]};
    return s;
  endfunction

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); seed_en = 1'b1; rs1 = 32'hCAFE_F00D;
    @(negedge clk); seed_en = 1'b0;
    ref_s = {~7'h0D, 32'hCAFE_F00D};
    for (int i = 0; i < 1000; i++) begin
      int m;
      m = $urandom_range(0, 2);
      shamt  = shamt_t'($urandom);
      mul_lo = $urandom;
      rs3    = $urandom;
      if (m == 0) begin
        // fx.madd: product path
        sel_rng = 1'b0;
        #1 chk(fxmadd, rs3 + word_t'($signed(mul_lo) >>> shamt), "madd");
        chk(sample, word_t'($signed(mul_lo) >>> shamt), "shifter");
        @(negedge clk);
      end else if (m == 1) begin
        // fxg.unif: sample path, generator steps
        sel_rng = 1'b1; unif_en = 1'b1;
        #1 chk(sample, word_t'($signed(ref_s[31:0]) >>> shamt), "unif");
        @(negedge clk);
        unif_en = 1'b0;
        ref_s = serial32(ref_s);
      end else begin
        // stalled fxg.unif: mux selects the sample, no step
        sel_rng = 1'b1; unif_en = 1'b0;
        #1 chk(sample, word_t'($signed(ref_s[31:0]) >>> shamt), "stalled unif");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
