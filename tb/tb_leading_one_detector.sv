// tb_leading_one_detector: checks the leading-one position of random
// 64-bit vectors with a chosen number of leading zeros, and the all-zero
// vector, against the position the vector was built with.
module tb_leading_one_detector;
  localparam int W = 64;
  logic [W-1:0] vec;
  logic         found;
  logic [6:0]   pos;
  int checks = 0, failures = 0;

  leading_one_detector #(.W(W)) dut (.vec, .found, .pos);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int lz;
      lz  = (n < W) ? n : int'($urandom_range(0, W - 1));
      vec = {$urandom, $urandom};
      vec = vec >> lz;
      vec[W-1-lz] = 1'b1;
      #1;
      checks++;
      if (!found || pos != 7'(lz)) begin
        failures++;
        $display("FAIL lz=%0d found=%b pos=%0d", lz, found, pos);
      end
    end
    vec = '0;
    #1;
    checks++;
    if (found || pos != 7'(W)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
