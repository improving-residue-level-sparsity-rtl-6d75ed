// tb_mod_mac_pe: one PE per modulus of the base {5, 7, 31, 32, 33}, all fed
// random residues with random valid, clear and enable; each accumulator is
// compared every cycle with a reference kept in integer arithmetic.  Also
// checks that the result appears one cycle after the operands.
module tb_mod_mac_pe;
  localparam int NM = 5;
  localparam int MODS [NM] = '{5, 7, 31, 32, 33};

  logic clk = 0, rst_n = 0;
  logic en, clear, valid;
  logic [5:0] w [NM];
  logic [5:0] a [NM];
  logic [5:0] acc [NM];
  int ref_acc [NM];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < NM; k++) begin : g_pe
    localparam int RW = rns_pkg::res_width(MODS[k]);
    logic [RW-1:0] acc_k;
    mod_mac_pe #(.MODULUS(MODS[k])) u_pe (
      .clk, .rst_n, .en, .clear, .valid,
      .w(w[k][RW-1:0]), .a(a[k][RW-1:0]), .acc(acc_k));
    assign acc[k] = 6'(acc_k);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; clear = 0; valid = 0;
    for (int k = 0; k < NM; k++) begin w[k] = 0; a[k] = 0; ref_acc[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 9) != 0);
      clear = ($urandom_range(0, 49) == 0);
      valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < NM; k++) begin
        w[k] = 6'($urandom_range(0, MODS[k] - 1));
        a[k] = 6'($urandom_range(0, MODS[k] - 1));
      end
      @(posedge clk);
      for (int k = 0; k < NM; k++)
        if (en) begin
          if (clear) ref_acc[k] = 0;
          else if (valid) ref_acc[k] = (ref_acc[k] + int'(w[k]) * int'(a[k])) % MODS[k];
        end
      #1;
      for (int k = 0; k < NM; k++) begin
        checks++;
        if (int'(acc[k]) != ref_acc[k]) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d acc=%0d exp=%0d", MODS[k], acc[k], ref_acc[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
