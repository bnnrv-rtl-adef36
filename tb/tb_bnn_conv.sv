// tb_bnn_conv: first convolution layer of three CIFAR-10 Bayesian CNNs run
// through the extension slice on one 32x32x3 image.
//
// Per forward pass every filter weight and bias is sampled once (fxg.unif,
// then fx.madd w = a + (b*u)>>10) and reused at every output position, as
// a convolution shares its weights; the base core, played by the testbench,
// keeps the samples in its memory. Each output is then accumulated with one
// fx.madd per tap, the core writing the weight and the pixel into registers
// before it, as its loads would. Every output is compared bit-exactly with
// a reference model, and the number of extension cycles must equal
// 2 per sampled parameter + 1 per tap.
//
// Layer shapes (public model definitions, not measured here):
//   LeNet-5     : 5x5, 3 -> 6 channels,  valid padding (28x28 outputs)
//   TinyResNet  : 3x3, 3 -> 16 channels, same padding (32x32 outputs)
//   VGG-like    : 3x3, 3 -> 128 channels, same padding (32x32 outputs)
module tb_bnn_conv;
  import bnnrv_pkg::*;

  localparam int FRAC  = 10;
  localparam int IUNIF = 32 - FRAC;
  localparam int NNET  = 3;
  localparam int IMG   = 32;
  localparam int CIN   = 3;

  int    ksz  [NNET] = '{5, 3, 3};
  int    cout [NNET] = '{6, 16, 128};
  int    pad  [NNET] = '{0, 1, 1};
  string nm   [NNET] = '{"LeNet-5 conv1", "TinyResNet conv1", "VGG-like conv1"};

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

  bnnrv_ext dut (.*);

  assign mul_lo = word_t'($signed(rs1_data) * $signed(rs2_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint ext_cycles = 0;
  always @(posedge clk) if (instr_valid && !stall && is_ext) ext_cycles++;

  logic [38:0] ref_s;
  int img [CIN][IMG][IMG];
  int wgt [];      // sampled weights of the current layer
  int bias [];

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

  function automatic int fxmul(input int a, input int b, input int sh);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p) >>> sh;
  endfunction

  task automatic core_write(input int r, input int v);
    core_we = 1'b1; core_wa = reg_idx_t'(r); core_wd = word_t'(v);
    @(negedge clk);
    core_we = 1'b0;
  endtask

  task automatic issue(input word_t ins);
    instr = ins; instr_valid = 1'b1;
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  // Sample one parameter a + b*U through the slice; return the DUT's value
  // after checking it against the reference.
  task automatic sample_param(input int a, input int b, output int w);
    int u, exp;
    core_write(9, a); core_write(17, b);
    issue(r4(OPC_FXG_UNIF, 25, 0, 0, 0, IUNIF));
    instr = r4(OPC_FX_MADD, 26, 17, 25, 9, FRAC); instr_valid = 1'b1;
    u = $signed(ref_s[31:0]) >>> IUNIF;
    ref_s = serial32(ref_s);
    exp = a + fxmul(b, u, FRAC);
    #1 w = $signed(ext_result);
    checks++;
    if (w != exp) begin
      failures++;
      $display("FAIL weight sample %0d expected %0d", w, exp);
    end
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_s = 39'h12_3456_789A;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CIN; c++)
      for (int y = 0; y < IMG; y++)
        for (int x = 0; x < IMG; x++)
          img[c][y][x] = int'($urandom_range(0, 1024));
    for (int n = 0; n < NNET; n++) begin
      int k, nw, osz;
      longint c0, taps, nout_bad;
      k = ksz[n];
      nw = cout[n] * CIN * k * k;
      osz = IMG + 2 * pad[n] - k + 1;
      core_write(28, 32'hC0DE_0000 + n);
      issue(r4(OPC_FXG_SEED, 0, 28, 0, 0, 0));
      ref_s = {~7'(n), 32'hC0DE_0000 + n};
      c0 = ext_cycles; taps = 0; nout_bad = 0;
      wgt = new[nw];
      bias = new[cout[n]];
      for (int i = 0; i < nw; i++)
        sample_param(int'($urandom_range(0, 300)) - 150, int'($urandom_range(0, 100)), wgt[i]);
      for (int o = 0; o < cout[n]; o++)
        sample_param(int'($urandom_range(0, 200)) - 100, int'($urandom_range(0, 40)), bias[o]);
      for (int o = 0; o < cout[n]; o++)
        for (int oy = 0; oy < osz; oy++)
          for (int ox = 0; ox < osz; ox++) begin
            int acc;
            acc = bias[o];
            core_write(27, acc);
            for (int ci = 0; ci < CIN; ci++)
              for (int ky = 0; ky < k; ky++)
                for (int kx = 0; kx < k; kx++) begin
                  int iy, ix, w;
                  iy = oy + ky - pad[n]; ix = ox + kx - pad[n];
                  if (iy >= 0 && iy < IMG && ix >= 0 && ix < IMG) begin
                    w = wgt[((o * CIN + ci) * k + ky) * k + kx];
                    core_write(26, w); core_write(1, img[ci][iy][ix]);
                    issue(r4(OPC_FX_MADD, 27, 26, 1, 27, FRAC));
                    acc = acc + fxmul(w, img[ci][iy][ix], FRAC);
                    taps++;
                  end
                end
            instr = r4(7'b0110011, 0, 27, 0, 0, 0);
            #1 checks++;
            if ($signed(rs1_data) != acc) begin
              failures++; nout_bad++;
              if (nout_bad < 5)
                $display("FAIL %s out[%0d][%0d][%0d] = %0d expected %0d",
                         nm[n], o, oy, ox, $signed(rs1_data), acc);
            end
          end
      checks++;
      if (ext_cycles - c0 != 2 * (nw + cout[n]) + taps) begin
        failures++;
        $display("FAIL %s: %0d extension cycles, expected %0d", nm[n],
                 ext_cycles - c0, 2 * (nw + cout[n]) + taps);
      end
      $display("%s: %0d outputs, %0d sampled parameters, %0d MACs, %0d extension cycles",
               nm[n], cout[n] * osz * osz, nw + cout[n], taps, ext_cycles - c0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
