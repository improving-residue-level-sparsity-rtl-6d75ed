// tb_rns_cnn_accel: end-to-end test of the accelerator at its default size
// (4x4 PE arrays, vectors up to 4096 weights).
//
// Each run draws a weight vector shaped like a regularized layer (many
// weights are multiples of 7 or of 33, so one of their two stored residues
// is zero) and a signed feature-map window for each of the 16 PEs, codes the
// two weight residue streams, loads all four banks through the load port and
// starts the accelerator.  Every PE of all five channels is compared with the
// dot product computed here in plain integers and reduced modulo its
// channel's modulus.  It also checks that each zero-skipping channel takes
// no more than (non-zero residues + 8) cycles and the dense channels no
// more than (length + 8), and counts the mechanisms of the design:
// zero skipping in each skipping channel, channels switched off while others
// still run, negative values through base extension, and decoder refills.
module tb_rns_cnn_accel;
  import rns_tb_pkg::*;
  localparam int P = 16, WDEPTH = 1024, FDEPTH = 4096;
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

  always #5 clk = ~clk;

  rns_cnn_accel dut (.clk, .rst_n, .ld_we, .ld_sel, .ld_addr, .ld_wdata, .start, .vec_len,
                     .w7_addr, .w33_addr, .fmap_base, .busy, .done, .ch_active, .result);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters
  int n_skip7 = 0, n_skip33 = 0, n_gated = 0, n_neg_be = 0, n_refill = 0;
  int last7 = -1, last33 = -1;
  int act_cyc [5];
  always @(posedge clk) if (rst_n) begin
    if (dut.ch_start) begin last7 = -1; last33 = -1; end
    if (dut.z7_valid) begin
      if (int'(dut.z7_idx) > last7 + 1) n_skip7++;
      last7 = int'(dut.z7_idx);
    end
    if (dut.z33_valid) begin
      if (int'(dut.z33_idx) > last33 + 1) n_skip33++;
      last33 = int'(dut.z33_idx);
    end
    if (busy && ch_active != '0 && ch_active != '1) n_gated++;
    if (dut.d_s1_v && dut.w_neg) n_neg_be++;
    if (busy && (dut.w7_dec_en || dut.w33_dec_en)) n_refill++;
    for (int k = 0; k < 5; k++) if (busy && ch_active[k]) act_cyc[k]++;
  end

  task automatic load(input int sel, input int addr, input logic [95:0] data);
    @(negedge clk);
    ld_we = 1; ld_sel = 2'(sel); ld_addr = 12'(addr); ld_wdata = data;
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic run(input int len, input int wbase7, input int wbase33, input int fbase,
                     input int style);
    int w [];
    int a [][];
    int r7 [], r33 [];
    logic [31:0] words [];
    int nnz7, nnz33;
    longint dot;
    w = new[len];
    a = new[len];
    r7 = new[len];
    r33 = new[len];
    nnz7 = 0; nnz33 = 0;
    for (int i = 0; i < len; i++) begin
      int c, s;
      c = $urandom_range(0, 99);
      s = $urandom_range(0, 1) ? 1 : -1;
      case (style)
        1:       w[i] = s * 33 * $urandom_range(0, 3);           // channel 33 all zero
        default: w[i] = (c < 20) ? 0 :
                        (c < 55) ? s * 33 * $urandom_range(1, 3) :
                        (c < 85) ? s * 7 * $urandom_range(1, 16) :
                                   $urandom_range(0, 230) - 115;
      endcase
      r7[i] = smod(w[i], 7);
      r33[i] = smod(w[i], 33);
      if (r7[i] != 0) nnz7++;
      if (r33[i] != 0) nnz33++;
      a[i] = new[P];
      for (int p = 0; p < P; p++) a[i][p] = $urandom_range(0, 230) - 115;
    end
    // weight banks
    void'(encode_words(r7, 3, words));
    foreach (words[j]) load(0, (wbase7 + j) % WDEPTH, 96'(words[j]));
    void'(encode_words(r33, 6, words));
    foreach (words[j]) load(1, (wbase33 + j) % WDEPTH, 96'(words[j]));
    // feature-map banks
    for (int i = 0; i < len; i++) begin
      logic [47:0] f7;
      logic [95:0] f33;
      for (int p = 0; p < P; p++) begin
        f7[p*3 +: 3]  = 3'(smod(a[i][p], 7));
        f33[p*6 +: 6] = 6'(smod(a[i][p], 33));
      end
      load(2, (fbase + i) % FDEPTH, 96'(f7));
      load(3, (fbase + i) % FDEPTH, f33);
    end
    foreach (act_cyc[k]) act_cyc[k] = 0;
    @(negedge clk);
    vec_len = 13'(len); w7_addr = 10'(wbase7); w33_addr = 10'(wbase33);
    fmap_base = 12'(fbase); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int k = 0; k < 5; k++)
      for (int p = 0; p < P; p++) begin
        dot = 0;
        for (int i = 0; i < len; i++) dot += longint'(w[i]) * longint'(a[i][p]);
        checks++;
        if (int'(result[k][p]) != int'(((dot % MODS[k]) + MODS[k]) % MODS[k])) begin
          failures++;
          if (failures < 10)
            $display("FAIL len=%0d ch=%0d pe=%0d got=%0d exp=%0d", len, MODS[k], p,
                     result[k][p], ((dot % MODS[k]) + MODS[k]) % MODS[k]);
        end
      end
    // latency: a skipping channel costs about one cycle per non-zero residue
    checks += 3;
    if (act_cyc[0] > nnz7 + 8)  begin failures++; $display("FAIL ch7 took %0d cycles for %0d non-zeros", act_cyc[0], nnz7); end
    if (act_cyc[1] > nnz33 + 8) begin failures++; $display("FAIL ch33 took %0d cycles for %0d non-zeros", act_cyc[1], nnz33); end
    if (act_cyc[2] > len + 8 || act_cyc[2] < len) begin failures++; $display("FAIL dense took %0d cycles for %0d", act_cyc[2], len); end
    $display("run len=%0d: nonzero7=%0d (%0d cycles) nonzero33=%0d (%0d cycles) dense %0d cycles",
             len, nnz7, act_cyc[0], nnz33, act_cyc[1], act_cyc[2]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(4096, 0, 100, 0, 0);     // VGG-16 last FC layer (4096x1000): one output neuron
    run(1024, 900, 17, 3000, 0); // CIFAR-10 CNN FC 1024x64: one output neuron, banks wrap
    run(576, 200, 517, 300, 0);  // 3x3x64 convolution window
    run(288, 40, 700, 77, 0);    // 3x3x32 convolution window
    run(27, 9, 90, 4090, 0);     // 3x3x3 first convolution, fmap address wraps
    run(64, 30, 60, 5, 1);       // FC 64x10; channel 33 holds only zero residues
    checks += 5;
    if (n_skip7 == 0)  begin failures++; $display("FAIL no zero skip in channel 7"); end
    if (n_skip33 == 0) begin failures++; $display("FAIL no zero skip in channel 33"); end
    if (n_gated == 0)  begin failures++; $display("FAIL no channel switched off early"); end
    if (n_neg_be == 0) begin failures++; $display("FAIL no negative weight extended"); end
    if (n_refill == 0) begin failures++; $display("FAIL no decoder refill"); end
    $display("mechanisms: skip7=%0d skip33=%0d gated_cycles=%0d neg_extended=%0d refills=%0d",
             n_skip7, n_skip33, n_gated, n_neg_be, n_refill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
