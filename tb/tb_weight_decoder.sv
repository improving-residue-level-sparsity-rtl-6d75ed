// tb_weight_decoder: two decoders (modulo-33 residues, 6-bit codes) read
// the same coded stream from a testbench memory with one-cycle read
// latency.  The zero-skipping one must return exactly the non-zero
// residues with their indices, at one per cycle once its buffer is primed;
// the dense one must return every residue in order under random
// back-pressure.  Streams of several lengths and sparsity levels are run,
// including all-zero and all-non-zero vectors.
module tb_weight_decoder;
  import rns_tb_pkg::*;
  localparam int RW = 6, MOD = 33, WW = 32, IW = 11, AW = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] vec_len;
  logic [AW-1:0] start_addr;
  logic          s_en, d_en;
  logic [AW-1:0] s_addr, d_addr;
  logic [WW-1:0] s_rdata, d_rdata;
  logic          s_valid, d_valid, d_ready, s_busy, d_busy, s_done, d_done;
  logic [IW-1:0] s_idx, d_idx;
  logic [RW-1:0] s_res, d_res;
  logic [WW-1:0] mem [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (s_en) s_rdata <= mem[s_addr];
    if (d_en) d_rdata <= mem[d_addr];
  end

  weight_decoder #(.RES_W(RW), .WORD_W(WW), .IDX_W(IW), .ADDR_W(AW), .SKIP_ZEROS(1'b1)) u_skip (
    .clk, .rst_n, .start, .vec_len, .start_addr, .mem_en(s_en), .mem_addr(s_addr),
    .mem_rdata(s_rdata), .out_valid(s_valid), .out_ready(1'b1), .out_idx(s_idx),
    .out_res(s_res), .busy(s_busy), .done(s_done));

  weight_decoder #(.RES_W(RW), .WORD_W(WW), .IDX_W(IW), .ADDR_W(AW), .SKIP_ZEROS(1'b0)) u_dense (
    .clk, .rst_n, .start, .vec_len, .start_addr, .mem_en(d_en), .mem_addr(d_addr),
    .mem_rdata(d_rdata), .out_valid(d_valid), .out_ready(d_ready), .out_idx(d_idx),
    .out_res(d_res), .busy(d_busy), .done(d_done));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int res [];
  int nz_idx [$];
  int s_got, d_got, cyc, first_out, last_out;

  // collect outputs
  always @(posedge clk) if (rst_n && !start) begin
    if (s_valid) begin
      checks++;
      if (s_got >= nz_idx.size() || int'(s_idx) != nz_idx[s_got] ||
          int'(s_res) != res[nz_idx[s_got]]) begin
        failures++;
        if (failures < 10) $display("FAIL skip #%0d idx=%0d res=%0d", s_got, s_idx, s_res);
      end
      if (s_got == 0) first_out = cyc;
      last_out = cyc;
      s_got++;
    end
    if (d_valid && d_ready) begin
      checks++;
      if (int'(d_idx) != d_got || d_got >= res.size() || int'(d_res) != res[d_got]) begin
        failures++;
        if (failures < 10) $display("FAIL dense #%0d idx=%0d res=%0d", d_got, d_idx, d_res);
      end
      d_got++;
    end
  end

  always @(negedge clk) d_ready = ($urandom_range(0, 3) != 0);

  initial begin
    logic [31:0] words [];
    int lens [6] = '{1, 40, 300, 1024, 200, 77};
    int zpct [6] = '{0, 80, 80, 60, 100, 0};
    int base, nb;
    vec_len = 0; start_addr = 0;
    foreach (mem[i]) mem[i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      res = new[lens[r]];
      nz_idx = {};
      foreach (res[i]) begin
        res[i] = ($urandom_range(1, 100) <= zpct[r]) ? 0 : $urandom_range(1, MOD - 1);
        if (res[i] != 0) nz_idx.push_back(i);
      end
      nb = encode_words(res, RW, words);
      base = $urandom_range(0, 255 - words.size());
      foreach (words[i]) mem[base + i] = words[i];
      @(negedge clk);
      vec_len = IW'(lens[r]); start_addr = AW'(base); start = 1;
      s_got = 0; d_got = 0; cyc = 0; first_out = -1; last_out = -1;
      @(negedge clk);
      start = 0;
      while (!(s_done && d_done)) begin
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (s_got != nz_idx.size()) begin
        failures++;
        $display("FAIL run %0d: skip decoder gave %0d of %0d", r, s_got, nz_idx.size());
      end
      if (d_got != lens[r]) begin
        failures++;
        $display("FAIL run %0d: dense decoder gave %0d of %0d", r, d_got, lens[r]);
      end
      // rate: once started, the zero-skipping decoder returns one non-zero
      // residue per cycle unless its buffer runs dry; the code supplies at
      // most 32 bits per cycle, so the span is bounded by bits/32 extra.
      if (nz_idx.size() > 1) begin
        checks++;
        if (last_out - first_out + 1 > nz_idx.size() + nb / 32 + 2) begin
          failures++;
          $display("FAIL run %0d: %0d non-zeros took %0d cycles", r, nz_idx.size(),
                   last_out - first_out + 1);
        end
      end
      $display("run %0d: len=%0d nonzero=%0d bits=%0d skip span=%0d cycles",
               r, lens[r], nz_idx.size(), nb, last_out - first_out + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
