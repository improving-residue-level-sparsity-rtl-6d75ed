// tb_fmap_addr_gen: random base addresses and nz-indices; the read address
// must be their sum modulo the bank depth and the enable must follow the
// index valid.
module tb_fmap_addr_gen;
  logic        idx_valid, rd_en;
  logic [10:0] nz_index;
  logic [9:0]  base, rd_addr;
  int checks = 0, failures = 0;

  fmap_addr_gen #(.IDX_W(11), .ADDR_W(10)) dut (.idx_valid, .nz_index, .base,
                                                .rd_en, .rd_addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      idx_valid = 1'($urandom);
      nz_index  = 11'($urandom_range(0, 1023));
      base      = 10'($urandom);
      #1;
      checks++;
      if (rd_en != idx_valid || int'(rd_addr) != (int'(base) + int'(nz_index)) % 1024) begin
        failures++;
        $display("FAIL base=%0d idx=%0d addr=%0d", base, nz_index, rd_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
