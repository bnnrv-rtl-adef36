// tb_urng_fu: self-checking test of the modular uniform-RNG unit.
// After fxg.seed, each fxg.unif must return the reference LFSR's low 32 bits
// shifted right logically by I, and advance the generator by 32 steps;
// cycles with neither enable must leave it unchanged. Also checks that a
// re-seed replays the same sequence and that I = 22 gives values in [0, 1024).
module tb_urng_fu;
  import bnnrv_pkg::*;
  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   seed_en = 1'b0;
  logic   unif_en = 1'b0;
  word_t  rs1 = '0;
  shamt_t shamt = '0;
  word_t  sample;
  int checks = 0, failures = 0;
  logic [38:0] ref_s;
  word_t first [8];

  urng_fu dut (.*);

  always #5 clk = ~clk;

  function automatic logic [38:0] serial32(input logic [38:0] s);
    for (int k = 0; k < 32; k++) s = {s[37:0], s[38] ^ s[34]};
    return s;
  endfunction

  task automatic expect_sample(input word_t exp, input string what);
    checks++;
    if (sample !== exp) begin
      failures++;
      $display("FAIL %s: sample=%h expected %h (I=%0d)", what, sample, exp, shamt);
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
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); seed_en = 1'b1; rs1 = 32'h1357_9BDF;
      @(negedge clk); seed_en = 1'b0; rs1 = $urandom;
      ref_s = {~7'h5F, 32'h1357_9BDF};
      for (int i = 0; i < 500; i++) begin
        shamt = shamt_t'($urandom);
        if (i < 8) shamt = '0;
        #1 expect_sample(ref_s[31:0] >> shamt, "unif");
        if (i < 8) begin
          if (pass == 0) first[i] = sample;
          else begin
            checks++;
            if (sample !== first[i]) begin
              failures++; $display("FAIL reseed replay %0d", i);
            end
          end
        end
        if ($urandom_range(0, 4) == 0) begin
          // idle cycle: no change
          @(negedge clk);
          #1 expect_sample(ref_s[31:0] >> shamt, "hold");
        end
        unif_en = 1'b1;
        @(negedge clk);
        unif_en = 1'b0;
        ref_s = serial32(ref_s);
      end
    end
    shamt = 5'd22;
    for (int i = 0; i < 50; i++) begin
      #1 checks++;
      if (sample >= 32'd1024) begin failures++; $display("FAIL range"); end
      unif_en = 1'b1; @(negedge clk); unif_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
