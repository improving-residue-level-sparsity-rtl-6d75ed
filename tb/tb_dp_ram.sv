// tb_dp_ram: writes random words through both ports, then reads them back
// through both ports at once; checks the data and the one-cycle read
// latency against a reference array.
module tb_dp_ram;
  localparam int DW = 32, D = 64, AW = 6;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [DW-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_ram #(.DATA_W(DW), .DEPTH(D)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                        .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(negedge clk);
    // fill: even addresses through A, odd through B, same cycle
    for (int i = 0; i < D; i += 2) begin
      a_en = 1; a_we = 1; a_addr = AW'(i);     a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wdata = $urandom;
      ref_mem[i] = a_wdata; ref_mem[i+1] = b_wdata;
      @(negedge clk);
    end
    a_we = 0; b_we = 0;
    for (int n = 0; n < 500; n++) begin
      int ia, ib;
      ia = $urandom_range(0, D - 1);
      ib = $urandom_range(0, D - 1);
      a_addr = AW'(ia); b_addr = AW'(ib);
      @(posedge clk);
      #1;
      a_addr = AW'($urandom); b_addr = AW'($urandom);   // must not matter now
      checks += 2;
      if (a_rdata != ref_mem[ia]) failures++;
      if (b_rdata != ref_mem[ib]) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
