// tb_pe_array: a 4x4 array modulo 31 accumulates random dot products with a
// shared weight per step; every PE is compared with its own reference dot
// product after each run.  Also checks that `en` low freezes the array.
module tb_pe_array;
  localparam int MOD = 31, M = 4, P = M * M, RW = 5;
  logic clk = 0, rst_n = 0;
  logic en, clear, valid;
  logic [RW-1:0] w;
  logic [P-1:0][RW-1:0] a, acc;
  int ref_acc [P];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_array #(.MODULUS(MOD), .M(M)) dut (.clk, .rst_n, .en, .clear, .valid, .w, .a, .acc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; clear = 0; valid = 0; w = 0; a = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      foreach (ref_acc[p]) ref_acc[p] = 0;
      for (int t = 0; t < 50; t++) begin
        valid = 1'($urandom);
        w = RW'($urandom_range(0, MOD - 1));
        for (int p = 0; p < P; p++) a[p] = RW'($urandom_range(0, MOD - 1));
        if (valid)
          for (int p = 0; p < P; p++) ref_acc[p] = (ref_acc[p] + int'(w) * int'(a[p])) % MOD;
        @(negedge clk);
      end
      valid = 0;
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        checks++;
        if (int'(acc[p]) != ref_acc[p]) begin
          failures++;
          $display("FAIL run=%0d pe=%0d acc=%0d exp=%0d", run, p, acc[p], ref_acc[p]);
        end
      end
      // frozen array ignores valid data
      en = 0; valid = 1; w = 1; a = '1;
      @(negedge clk);
      en = 1; valid = 0;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (int'(acc[p]) != ref_acc[p]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
