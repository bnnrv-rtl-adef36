// tb_lfsr39_la: self-checking test of the 39-bit, 32-step look-ahead LFSR.
// A bit-serial reference (one shift per loop iteration of x^39 + x^35 + 1)
// is run 32 times per DUT step and compared with the DUT's state and sample,
// after reset, after seeding (including the all-zero seed) and over many
// steps with random hold cycles. Also checks the bit balance of the samples.
module tb_lfsr39_la;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        seed_load = 1'b0;
  logic [31:0] seed = '0;
  logic        step = 1'b0;
  logic [31:0] sample;
  logic [38:0] state;
  int checks = 0, failures = 0;
  logic [38:0] ref_s;
  int unsigned ones;
  int unsigned nsteps;

  lfsr39_la dut (.*);

  always #5 clk = ~clk;

  function automatic logic [38:0] serial32(input logic [38:0] s);
    logic fb;
    for (int k = 0; k < 32; k++) begin
      fb = s[38] ^ s[34];
      s  = s << 1;
      s[0] = fb;
    end
    return s;
  endfunction

  task automatic check(input string what);
    checks++;
    if (state !== ref_s || sample !== ref_s[31:0]) begin
      failures++;
      $display("FAIL %s: state=%h expected %h", what, state, ref_s);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 ref_s = 39'h12_3456_789A;
    check("reset value");
    rst_n = 1'b1;
    // seed with zero: state must not be all-zero
    @(negedge clk); seed_load = 1'b1; seed = 32'h0;
    @(negedge clk); seed_load = 1'b0;
    ref_s = {7'h7F, 32'h0};
    check("zero seed");
    // seed with a value and walk
    @(negedge clk); seed_load = 1'b1; seed = 32'hDEAD_BEEF;
    @(negedge clk); seed_load = 1'b0;
    ref_s = {~7'h6F, 32'hDEAD_BEEF};
    check("seed");
    ones = 0;
    nsteps = 0;
    for (int i = 0; i < 2000; i++) begin
      logic do_step;
      do_step = ($urandom_range(0, 3) != 0);
      step = do_step;
      @(negedge clk);
      step = 1'b0;
      if (do_step) begin
        ref_s = serial32(ref_s);
        ones += $countones(sample);
        nsteps++;
      end
      check("walk");
    end
    // seed has priority over step
    seed_load = 1'b1; step = 1'b1; seed = 32'h0000_0001;
    @(negedge clk); seed_load = 1'b0; step = 1'b0;
    ref_s = {7'h7E, 32'h1};
    check("seed over step");
    // bit balance: about half of the sampled bits are ones (>1000 samples)
    checks++;
    if (ones * 100 < nsteps * 32 * 48 || ones * 100 > nsteps * 32 * 52) begin
      failures++;
      $display("FAIL bit balance ones=%0d", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
