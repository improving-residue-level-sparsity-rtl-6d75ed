// tb_channel_ctrl: five channels report completion at random, different
// times; each ch_active bit must fall exactly one cycle after its ch_done,
// the others must stay up, and done must rise once all have finished.
// A stale ch_done during the start pulse must be ignored.
module tb_channel_ctrl;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] ch_done, ch_active;
  logic ch_start, busy, done;
  int fin [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  channel_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .ch_done, .ch_start, .ch_active, .busy, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last;
    ch_done = '1;   // stale completion from an earlier run
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      last = 0;
      for (int k = 0; k < N; k++) begin
        fin[k] = $urandom_range(1, 40);
        if (fin[k] > last) last = fin[k];
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!ch_start || ch_active != '1 || !busy) failures++;
      // cycle t = 0 is the start pulse (ch_done still stale = 1)
      for (int t = 1; t <= last + 2; t++) begin
        @(negedge clk);
        for (int k = 0; k < N; k++) ch_done[k] = (t >= fin[k]);
        #1;
        for (int k = 0; k < N; k++) begin
          checks++;
          if (ch_active[k] != (t <= fin[k])) begin
            failures++;
            $display("FAIL run=%0d t=%0d ch=%0d active=%b fin=%0d", run, t, k, ch_active[k], fin[k]);
          end
        end
      end
      checks++;
      if (!done || busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
