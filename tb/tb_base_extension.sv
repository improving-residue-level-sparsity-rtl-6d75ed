// tb_base_extension: exhaustive check over every signed value -115..115
// that B_weight = {7, 33} represents: the residues modulo 5, 31 and 32 and
// the sign flag must match the value's own residues.
module tb_base_extension;
  import rns_tb_pkg::*;
  logic [2:0] r7, r5;
  logic [5:0] r33;
  logic [4:0] r31, r32;
  logic       neg;
  int checks = 0, failures = 0;

  base_extension dut (.r7, .r33, .r5, .r31, .r32, .neg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -115; v <= 115; v++) begin
      r7  = 3'(smod(v, 7));
      r33 = 6'(smod(v, 33));
      #1;
      checks++;
      if (int'(r5) != smod(v, 5) || int'(r31) != smod(v, 31) ||
          int'(r32) != smod(v, 32) || neg != (v < 0)) begin
        failures++;
        $display("FAIL v=%0d r5=%0d r31=%0d r32=%0d neg=%b", v, r5, r31, r32, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
