// tb_bnnrv_ext_modular: the same end-to-end test as tb_bnnrv_ext, with the
// extension slice built from the modular units (OPTIMIZED = 0: separate
// uniform-RNG unit with a logical shift, MAC unit with its own multiplier).
//
// The testbench plays the base core: it writes operands into the register
// file through the core write port, issues the extension instructions in
// the execute stage and supplies the core multiplier's product
// (low word of signed rs1_data * rs2_data). Every instruction's result is
// compared with a reference model (bit-serial LFSR, 64-bit arithmetic,
// register array). Phases:
//   1. seeding, random instruction mix with stalls, bubbles, x0 writes and
//      back-to-back dependences;
//   2. one Bayesian neuron of NIN inputs in the 3-instruction inner loop
//      (fxg.unif, fx.madd weight, fx.madd accumulate), timed: it must take
//      exactly 3*NIN cycles;
//   3. re-seeding replays the same random sequence;
//   4. NPASS Monte-Carlo forward passes of that neuron: the mean and the
//      variance of the output must match the Gaussian weights the uniform
//      parameters (a, b) were derived from (mu = a + b/2 or a, sigma^2 =
//      b^2/12).
// Each mechanism is counted and a mechanism that never happened fails.
module tb_bnnrv_ext_modular;
  import bnnrv_pkg::*;

  localparam bit OPT   = 1'b0;   // configuration of the DUT below
  localparam int FRAC  = 10;     // fixed-point fractional bits
  localparam int IUNIF = 32 - FRAC;
  localparam int NIN   = 8;      // neuron inputs
  localparam int NPASS = 2000;   // Monte-Carlo passes

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  word_t    instr = '0;
  logic     instr_valid = 1'b0;
  logic     stall = 1'b0;
  word_t    rs1_data, rs2_data, rs3_data;
  logic     core_we = 1'b0;
  reg_idx_t core_wa = '0;
  word_t    core_wd = '0;
  word_t    mul_lo;
  logic     is_ext, ext_we;
  reg_idx_t ext_rd;
  word_t    ext_result;

  bnnrv_ext #(.OPTIMIZED(1'b0)) dut (.*);

  // base core multiplier (low word of the signed product)
  assign mul_lo = word_t'($signed(rs1_data) * $signed(rs2_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_seed = 0, n_unif = 0, n_madd = 0, n_stall = 0, n_bubble = 0;
  int n_x0 = 0, n_core_wr = 0, n_dep = 0, n_replay = 0, n_switch = 0;

  // reference model
  logic [38:0] ref_s;
  word_t       ref_r [32];
  reg_idx_t    last_rd;
  logic        last_wrote = 1'b0;
  ext_op_e     last_op = EXT_NONE;

  function automatic logic [38:0] serial32(input logic [38:0] s);
    for (int k = 0; k < 32; k++) s = {s[37:0], s[38] ^ s[34]};
    return s;
  endfunction

  function automatic word_t r4(input logic [6:0] opc, input int rd, input int rs1,
                               input int rs2, input int rs3, input int imm);
    logic [4:0] i5;
    i5 = 5'(imm);
    return {5'(rs3), i5[4:3], 5'(rs2), 5'(rs1), i5[2:0], 5'(rd), opc};
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  task automatic core_write(input int r, input word_t v);
    core_we = 1'b1; core_wa = reg_idx_t'(r); core_wd = v;
    @(negedge clk);
    core_we = 1'b0;
    if (r != 0) ref_r[r] = v;
    n_core_wr++;
    last_wrote = 1'b0;
  endtask

  function automatic word_t read_reg(input int r);
    return ref_r[r];
  endfunction

  // Read a register through read port 1 using a non-extension instruction.
  task automatic check_reg(input int r);
    instr = r4(7'b0110011, 0, r, 0, 0, 0);
    instr_valid = 1'b0;
    #1 chk(rs1_data === ref_r[r], $sformatf("x%0d = %h expected %h", r, rs1_data, ref_r[r]));
  endtask

  // Issue one extension instruction, optionally stalled first.
  task automatic exec(input word_t ins, input int nstall);
    ext_op_e op;
    int rd, a, b, c, sh;
    word_t exp;
    logic [38:0] s_before;
    op = (ins[6:0] == OPC_FX_MADD) ? EXT_MADD : (ins[6:0] == OPC_FXG_UNIF) ? EXT_UNIF : EXT_SEED;
    rd = int'(ins[11:7]); a = int'(ins[19:15]); b = int'(ins[24:20]); c = int'(ins[31:27]);
    sh = int'({ins[26:25], ins[14:12]});
    // expected result
    case (op)
      EXT_UNIF: exp = OPT ? word_t'($signed(ref_s[31:0]) >>> sh) : (ref_s[31:0] >> sh);
      EXT_MADD: exp = ref_r[c] + word_t'($signed(word_t'($signed(ref_r[a]) * $signed(ref_r[b]))) >>> sh);
      default:  exp = '0;
    endcase
    if (last_wrote && last_rd != 0 &&
        (((op == EXT_MADD) && (a == int'(last_rd) || b == int'(last_rd) || c == int'(last_rd))) ||
         ((op == EXT_SEED) && a == int'(last_rd))))
      n_dep++;
    if (OPT && last_op != EXT_NONE && op != last_op && op != EXT_SEED && last_op != EXT_SEED)
      n_switch++;
    instr = ins;
    instr_valid = 1'b1;
    s_before = ref_s;
    for (int i = 0; i < nstall; i++) begin
      stall = 1'b1;
      #1 chk(!ext_we, "no write while stalled");
      @(negedge clk);
      n_stall++;
    end
    stall = 1'b0;
    #1;
    chk(is_ext, "decoded as extension");
    if (op != EXT_SEED) begin
      chk(ext_result === exp, $sformatf("op %s result %h expected %h", op.name(), ext_result, exp));
      chk(ext_we && ext_rd == reg_idx_t'(rd), "write-back enable");
    end else begin
      chk(!ext_we, "fxg.seed writes nothing");
    end
    @(negedge clk);
    instr_valid = 1'b0;
    case (op)
      EXT_SEED: begin ref_s = {~ref_r[a][6:0], ref_r[a]}; n_seed++; end
      EXT_UNIF: begin ref_s = serial32(s_before); n_unif++; end
      default:  n_madd++;
    endcase
    if (op != EXT_SEED) begin
      if (rd == 0) n_x0++;
      else ref_r[rd] = exp;
    end
    last_op = op;
    last_rd = reg_idx_t'(rd);
    last_wrote = (op != EXT_SEED);
  endtask

  // A cycle with an extension instruction present but not valid: no effect.
  task automatic bubble();
    instr = r4(OPC_FXG_UNIF, 3, 0, 0, 0, 0);
    instr_valid = 1'b0;
    #1 chk(!ext_we, "bubble writes nothing");
    @(negedge clk);
    n_bubble++;
    last_wrote = 1'b0;
  endtask

  // Weights: mu and sigma per input, as reals, then the uniform parameters.
  real mu_w [NIN], sg_w [NIN], x_r [NIN];
  int  a_q [NIN], b_q [NIN], x_q [NIN];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    real sum, sum2, mean, var_y, mu_y, var_exp, y;
    for (int i = 0; i < 32; i++) ref_r[i] = '0;
    ref_s = 39'h12_3456_789A;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1. random instruction mix -------------------------------------
    for (int r = 1; r < 32; r++) core_write(r, $urandom);
    exec(r4(OPC_FXG_SEED, 0, 5, 0, 0, 0), 0);
    for (int i = 0; i < 3000; i++) begin
      int k;
      k = $urandom_range(0, 9);
      if (k == 0) bubble();
      else if (k == 1) core_write($urandom_range(1, 31), $urandom);
      else if (k == 2) exec(r4(OPC_FXG_SEED, 0, $urandom_range(0, 31), 0, 0, 0), 0);
      else if (k < 6)
        exec(r4(OPC_FXG_UNIF, $urandom_range(0, 31), 0, 0, 0, $urandom_range(0, 31)),
             ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0);
      else
        exec(r4(OPC_FX_MADD, $urandom_range(0, 31), $urandom_range(0, 31),
                $urandom_range(0, 31), $urandom_range(0, 31), $urandom_range(0, 31)),
             ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0);
    end
    for (int r = 0; r < 32; r++) check_reg(r);

    // ---- 2. one Bayesian neuron, timed ---------------------------------
    // registers: x_i in 1..8, a_i in 9..16, b_i in 17..24,
    // u in 25, w in 26, acc in 27, seed in 28
    for (int i = 0; i < NIN; i++) begin
      mu_w[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;   // [-1, 1]
      sg_w[i] = real'($urandom_range(50, 400)) / 1000.0;               // [0.05, 0.4]
      x_r[i]  = (real'($urandom_range(0, 4000)) - 2000.0) / 1000.0;    // [-2, 2]
      b_q[i]  = $rtoi(sg_w[i] * $sqrt(12.0) * 1024.0 + 0.5);
      a_q[i]  = OPT ? $rtoi($floor(mu_w[i] * 1024.0 + 0.5))
                    : $rtoi($floor((mu_w[i] - sg_w[i] * $sqrt(12.0) / 2.0) * 1024.0 + 0.5));
      x_q[i]  = $rtoi($floor(x_r[i] * 1024.0 + 0.5));
      core_write(1 + i, word_t'(x_q[i]));
      core_write(9 + i, word_t'(a_q[i]));
      core_write(17 + i, word_t'(b_q[i]));
    end
    core_write(28, 32'h0BAD_5EED);
    exec(r4(OPC_FXG_SEED, 0, 28, 0, 0, 0), 0);
    core_write(27, '0);
    t0 = cycle;
    for (int i = 0; i < NIN; i++) begin
      exec(r4(OPC_FXG_UNIF, 25, 0, 0, 0, IUNIF), 0);
      exec(r4(OPC_FX_MADD, 26, 17 + i, 25, 9 + i, FRAC), 0);
      exec(r4(OPC_FX_MADD, 27, 26, 1 + i, 27, FRAC), 0);
    end
    t1 = cycle;
    chk(t1 - t0 == 3 * NIN, $sformatf("neuron took %0d cycles, expected %0d", t1 - t0, 3 * NIN));
    check_reg(27);

    // ---- 3. re-seed replays the sequence -------------------------------
    begin
      word_t first_acc;
      first_acc = ref_r[27];
      exec(r4(OPC_FXG_SEED, 0, 28, 0, 0, 0), 0);
      core_write(27, '0);
      for (int i = 0; i < NIN; i++) begin
        exec(r4(OPC_FXG_UNIF, 25, 0, 0, 0, IUNIF), 0);
        exec(r4(OPC_FX_MADD, 26, 17 + i, 25, 9 + i, FRAC), 0);
        exec(r4(OPC_FX_MADD, 27, 26, 1 + i, 27, FRAC), 0);
      end
      chk(ref_r[27] === first_acc, "replay after re-seed");
      check_reg(27);
      n_replay++;
    end

    // ---- 4. Monte-Carlo passes: output statistics ----------------------
    sum = 0.0; sum2 = 0.0;
    for (int p = 0; p < NPASS; p++) begin
      core_write(27, '0);
      for (int i = 0; i < NIN; i++) begin
        exec(r4(OPC_FXG_UNIF, 25, 0, 0, 0, IUNIF), 0);
        exec(r4(OPC_FX_MADD, 26, 17 + i, 25, 9 + i, FRAC), 0);
        exec(r4(OPC_FX_MADD, 27, 26, 1 + i, 27, FRAC), 0);
      end
      y = real'($signed(ref_r[27])) / 1024.0;
      check_reg(27);
      sum += y; sum2 += y * y;
    end
    mean  = sum / NPASS;
    var_y = sum2 / NPASS - mean * mean;
    mu_y = 0.0; var_exp = 0.0;
    for (int i = 0; i < NIN; i++) begin
      mu_y    += mu_w[i] * x_r[i];
      var_exp += sg_w[i] * sg_w[i] * x_r[i] * x_r[i];
    end
    $display("neuron output: mean %f (expected %f), variance %f (expected %f)",
             mean, mu_y, var_y, var_exp);
    // 5 standard errors plus fixed-point truncation slack
    chk((mean - mu_y) < 5.0 * $sqrt(var_exp / NPASS) + 0.03 &&
        (mu_y - mean) < 5.0 * $sqrt(var_exp / NPASS) + 0.03, "output mean");
    chk(var_y > 0.8 * var_exp - 0.002 && var_y < 1.2 * var_exp + 0.002, "output variance");

    // ---- mechanism coverage ---------------------------------------------
    $display("seed %0d unif %0d madd %0d stall %0d bubble %0d x0 %0d core_wr %0d dep %0d replay %0d switch %0d",
             n_seed, n_unif, n_madd, n_stall, n_bubble, n_x0, n_core_wr, n_dep, n_replay, n_switch);
    chk(n_seed > 0, "seed happened");
    chk(n_unif > 0, "unif happened");
    chk(n_madd > 0, "madd happened");
    chk(n_stall > 0, "stall happened");
    chk(n_bubble > 0, "bubble happened");
    chk(n_x0 > 0, "x0 destination happened");
    chk(n_core_wr > 0, "core write happened");
    chk(n_dep > 0, "back-to-back dependence happened");
    chk(n_replay > 0, "re-seed replay happened");
    if (OPT) chk(n_switch > 0, "shared-shifter switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
