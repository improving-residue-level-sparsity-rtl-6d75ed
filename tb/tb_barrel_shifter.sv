// tb_barrel_shifter: checks every shift amount 0..64 on random 64-bit
// data against the language's own shift operator.
module tb_barrel_shifter;
  localparam int W = 64;
  logic [W-1:0] din, dout, expect_v;
  logic [6:0]   amount;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(W)) dut (.din, .amount, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1300; n++) begin
      din    = {$urandom, $urandom};
      amount = 7'(n % (W + 1));
      #1;
      expect_v = (amount >= 7'(W)) ? '0 : din << amount;
      checks++;
      if (dout !== expect_v) begin
        failures++;
        $display("FAIL amount=%0d", amount);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
