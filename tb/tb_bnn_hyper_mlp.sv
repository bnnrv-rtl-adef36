// tb_bnn_hyper_mlp: forward passes of small Bayesian MLPs (three fully
// connected layers) executed through the extension slice, instruction by
// instruction, the way compiled inference code would drive it.
//
// For each weight the testbench, acting as the base core, writes the
// operands (a, b of the uniform weight and the input x) into the register
// file, as its load instructions would, and issues the three-instruction
// Bayesian operation:
//   fxg.unif u, 22 ; fx.madd w = a + (b*u)>>10 ; fx.madd acc = acc + (w*x)>>10
// Each neuron starts from a sampled bias, and the core applies ReLU between
// layers. Every neuron output is compared with a reference model of the
// same fixed-point arithmetic and LFSR; the test also checks that the
// extension spends exactly three cycles per Bayesian operation.
//
// Layer sizes: inputs = spectral bands and outputs = classes of five
// hyperspectral scenes (Botswana 145/14, Indian Pines 200/16, Kennedy Space
// Center 176/13, Pavia University 103/9, Salinas 204/16); the two hidden
// layers have HID neurons. These sizes are public dataset facts and an
// assumed hidden width, not measured model dimensions.
module tb_bnn_hyper_mlp;
  import bnnrv_pkg::*;

  localparam int FRAC  = 10;
  localparam int IUNIF = 32 - FRAC;
  localparam int HID   = 32;
  localparam int NMOD  = 5;
  localparam int MAXN  = 256;

  int    n_in  [NMOD] = '{145, 200, 176, 103, 204};
  int    n_out [NMOD] = '{14, 16, 13, 9, 16};
  string nm    [NMOD] = '{"BO", "IP", "KSC", "PU", "SV"};

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
  longint ext_cycles = 0, bops = 0;
  always @(posedge clk) if (instr_valid && !stall && is_ext) ext_cycles++;

  logic [38:0] ref_s;
  int          act_in [MAXN];
  int          act_out [MAXN];

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

  // Sample u (reference) and issue fxg.unif into x25.
  function automatic int ref_unif();
    int u;
    u = $signed(ref_s[31:0]) >>> IUNIF;   // optimized unit: signed shift
    ref_s = serial32(ref_s);
    return u;
  endfunction

  // One fully connected Bayesian layer. Weight parameters (a, b) are drawn
  // at random as the layer runs, so they need no storage.
  task automatic layer(input int lid, input int nin, input int nout, input bit relu);
    for (int j = 0; j < nout; j++) begin
      int acc, u, w, ab, bb;
      // bias: acc = a_b + b_b*u
      ab = int'($urandom_range(0, 200)) - 100;
      bb = int'($urandom_range(0, 60));
      core_write(9, ab); core_write(17, bb);
      issue(r4(OPC_FXG_UNIF, 25, 0, 0, 0, IUNIF));
      issue(r4(OPC_FX_MADD, 27, 17, 25, 9, FRAC));
      u = ref_unif();
      acc = ab + fxmul(bb, u, FRAC);
      for (int i = 0; i < nin; i++) begin
        int a, b;
        a = int'($urandom_range(0, 400)) - 200;   // mean about [-0.2, 0.2]
        b = int'($urandom_range(0, 120));         // sigma*sqrt(12) up to 0.12
        core_write(9, a); core_write(17, b); core_write(1, act_in[i]);
        issue(r4(OPC_FXG_UNIF, 25, 0, 0, 0, IUNIF));
        issue(r4(OPC_FX_MADD, 26, 17, 25, 9, FRAC));
        issue(r4(OPC_FX_MADD, 27, 26, 1, 27, FRAC));
        u = ref_unif();
        w = a + fxmul(b, u, FRAC);
        acc = acc + fxmul(w, act_in[i], FRAC);
        bops++;
      end
      // read the neuron output through read port 1
      instr = r4(7'b0110011, 0, 27, 0, 0, 0);
      #1 checks++;
      if ($signed(rs1_data) != acc) begin
        failures++;
        $display("FAIL layer %0d neuron %0d: %0d expected %0d", lid, j, $signed(rs1_data), acc);
      end
      act_out[j] = (relu && acc < 0) ? 0 : acc;
    end
    for (int j = 0; j < nout; j++) act_in[j] = act_out[j];
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_s = 39'h12_3456_789A;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMOD; m++) begin
      longint c0, b0;
      int best;
      core_write(28, 32'h5EED_0000 + m);
      issue(r4(OPC_FXG_SEED, 0, 28, 0, 0, 0));
      ref_s = {~7'(m), 32'h5EED_0000 + m};
      for (int i = 0; i < n_in[m]; i++)
        act_in[i] = int'($urandom_range(0, 1024));   // normalised reflectance in [0, 1]
      c0 = ext_cycles; b0 = bops;
      layer(0, n_in[m], HID, 1'b1);
      layer(1, HID, HID, 1'b1);
      layer(2, HID, n_out[m], 1'b0);
      best = 0;
      for (int j = 1; j < n_out[m]; j++) if (act_in[j] > act_in[best]) best = j;
      // bias operations take 2 extension cycles, weight operations 3
      checks++;
      if (ext_cycles - c0 != 3 * (bops - b0) + 2 * (2 * HID + n_out[m])) begin
        failures++;
        $display("FAIL %s: %0d extension cycles for %0d Bayesian operations",
                 nm[m], ext_cycles - c0, bops - b0);
      end
      $display("%s: %0d Bayesian operations, %0d extension cycles, class %0d",
               nm[m], bops - b0, ext_cycles - c0, best);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
