// tb_rns_power_workload: runs a weight vector with a fixed residue sparsity
// through the accelerator at its default size and estimates, from how long
// each channel stays active, the power saved by switching finished channels
// off.
//
// Weights are drawn by residue: the residue modulo 7 is zero with
// probability 0.80 and the residue modulo 33 with probability 0.14,
// independently.  Each residue pair is mapped back to its signed value in
// -115..115.  Per-channel MAC power for the base {5, 7, 31, 32, 33} is
// 5, 14, 37, 16 and 49 uW.  Without skipping, all five channels run for the
// whole vector (121 uW).  With skipping, each channel's power is weighted
// by its active cycles over the dense channels' cycles.  Expected: about
// 102.8 uW, a saving of about 15 %; accepted within 1.5 points.  The
// testbench also checks every result and measures the mean code length
// per weight against 11 - 3*a7 - 6*a33 bits.
module tb_rns_power_workload;
  import rns_tb_pkg::*;
  localparam int P = 16, LEN = 4096;
  localparam real PWR [5] = '{14.0, 49.0, 5.0, 37.0, 16.0};   // order 7, 33, 5, 31, 32
  localparam int MODS [5] = '{7, 33, 5, 31, 32};

  logic clk = 0, rst_n = 0;
  logic ld_we = 0;
  logic [1:0] ld_sel = 0;
  logic [11:0] ld_addr = 0;
  logic [95:0] ld_wdata = 0;
  logic start = 0;
  logic [12:0] vec_len = 0;
  logic [9:0] w7_addr = 0, w33_addr = 0;
  logic [11:0] fmap_base = 0;
  logic busy, done;
  logic [4:0] ch_active;
  logic [4:0][15:0][5:0] result;
  int checks = 0, failures = 0;
  int act_cyc [5];

  always #5 clk = ~clk;

  rns_cnn_accel dut (.clk, .rst_n, .ld_we, .ld_sel, .ld_addr, .ld_wdata, .start, .vec_len,
                     .w7_addr, .w33_addr, .fmap_base, .busy, .done, .ch_active, .result);

  always @(posedge clk) if (rst_n)
    for (int k = 0; k < 5; k++) if (busy && ch_active[k]) act_cyc[k]++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int sel, input int addr, input logic [95:0] data);
    @(negedge clk);
    ld_we = 1; ld_sel = 2'(sel); ld_addr = 12'(addr); ld_wdata = data;
    @(negedge clk);
    ld_we = 0;
  endtask

  // signed value in -115..115 with the given residues modulo 7 and 33
  function automatic int from_residues(input int r7, input int r33);
    for (int v = -115; v <= 115; v++)
      if (smod(v, 7) == r7 && smod(v, 33) == r33) return v;
    return 0;
  endfunction

  initial begin
    int w [LEN];
    int a [LEN][P];
    int r7 [], r33 [];
    logic [31:0] words [];
    int z7, z33, nb7, nb33;
    real a7, a33, p_before, p_after, saving, bits_per_w, bits_model;
    longint dot;
    r7 = new[LEN];
    r33 = new[LEN];
    z7 = 0; z33 = 0;
    for (int i = 0; i < LEN; i++) begin
      r7[i]  = ($urandom_range(0, 99) < 80) ? 0 : $urandom_range(1, 6);
      r33[i] = ($urandom_range(0, 99) < 14) ? 0 : $urandom_range(1, 32);
      w[i] = from_residues(r7[i], r33[i]);
      if (r7[i] == 0) z7++;
      if (r33[i] == 0) z33++;
      for (int p = 0; p < P; p++) a[i][p] = $urandom_range(0, 230) - 115;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    nb7 = encode_words(r7, 3, words);
    foreach (words[j]) load(0, j, 96'(words[j]));
    nb33 = encode_words(r33, 6, words);
    foreach (words[j]) load(1, j, 96'(words[j]));
    for (int i = 0; i < LEN; i++) begin
      logic [47:0] f7;
      logic [95:0] f33;
      for (int p = 0; p < P; p++) begin
        f7[p*3 +: 3]  = 3'(smod(a[i][p], 7));
        f33[p*6 +: 6] = 6'(smod(a[i][p], 33));
      end
      load(2, i, 96'(f7));
      load(3, i, f33);
    end
    foreach (act_cyc[k]) act_cyc[k] = 0;
    @(negedge clk);
    vec_len = 13'(LEN); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);

    for (int k = 0; k < 5; k++)
      for (int p = 0; p < P; p++) begin
        dot = 0;
        for (int i = 0; i < LEN; i++) dot += longint'(w[i]) * longint'(a[i][p]);
        checks++;
        if (int'(result[k][p]) != int'(((dot % MODS[k]) + MODS[k]) % MODS[k])) failures++;
      end

    a7 = real'(z7) / LEN;
    a33 = real'(z33) / LEN;
    p_before = 0.0;
    p_after = 0.0;
    for (int k = 0; k < 5; k++) begin
      p_before += PWR[k];
      p_after  += PWR[k] * real'(act_cyc[k]) / real'(act_cyc[2]);
    end
    saving = 100.0 * (1.0 - p_after / p_before);
    bits_per_w = real'(nb7 + nb33) / LEN;
    bits_model = 11.0 - 3.0 * a7 - 6.0 * a33;
    $display("sparsity: mod7 %0.3f mod33 %0.3f", a7, a33);
    $display("active cycles: ch7 %0d ch33 %0d dense %0d", act_cyc[0], act_cyc[1], act_cyc[2]);
    $display("power: %0.1f uW -> %0.1f uW, saving %0.1f %%", p_before, p_after, saving);
    $display("code: %0.3f bits per weight (model %0.3f), %0.1f %% below 9 bits",
             bits_per_w, bits_model, 100.0 * (1.0 - bits_per_w / 9.0));
    checks += 2;
    if (saving < 13.5 || saving > 16.5) begin failures++; $display("FAIL saving %0.1f", saving); end
    if (bits_per_w < bits_model - 0.01 || bits_per_w > bits_model + 0.01) begin
      failures++; $display("FAIL code length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
