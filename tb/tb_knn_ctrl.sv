// tb_knn_ctrl - self-checking test of the sequencer.
// Runs several queries with a small E and F, models the memory read latency
// and the downstream delays, and checks: every address 0..E*F-1 read once, in
// order; the aligned first/last/feature-index/element-index signals; the
// single vote_start; done exactly E*F + 5 clocks after start; start ignored
// while busy.
module tb_knn_ctrl;
  localparam int unsigned E = 7, F = 3, TW = 16, AW = $clog2(E * F), FW = 2;
  logic clk = 0, rst_n = 0, start = 0, vote_done;
  logic busy, done, sel_clear, mem_re, d_valid, d_first, d_last, vote_start;
  logic [AW-1:0] mem_raddr;
  logic [FW-1:0] d_fidx;
  logic [TW-1:0] d_tag;
  int checks = 0, failures = 0;
  int cyc = 0, t_start = 0, n_reads = 0, n_data = 0, n_votes = 0, n_clear = 0;
  logic vote_d1 = 0;

  knn_ctrl #(.E(E), .F(F), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // The vote answers one clock after vote_start, as knn_vote does.
  always_ff @(posedge clk) vote_d1 <= vote_start;
  assign vote_done = vote_d1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (mem_re) begin
        chk(int'(mem_raddr) == n_reads, $sformatf("read address %0d", n_reads));
        n_reads <= n_reads + 1;
      end
      if (d_valid) begin
        chk(int'(d_fidx) == n_data % F, "feature index aligned");
        chk(int'(d_tag) == n_data / F, "element index aligned");
        chk(d_first == (n_data % F == 0), "first flag");
        chk(d_last == (n_data % F == F - 1), "last flag");
        n_data <= n_data + 1;
      end
      if (vote_start) begin
        chk(n_data == E * F, "vote after all data");
        n_votes <= n_votes + 1;
      end
      if (sel_clear) n_clear <= n_clear + 1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int q = 0; q < 4; q++) begin
      @(negedge clk);
      n_reads = 0; n_data = 0; n_votes = 0; n_clear = 0;
      start = 1; t_start = cyc;
      @(negedge clk); start = 0;
      chk(busy, "busy after start");
      // a start while busy must be ignored
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      chk(cyc - t_start == E * F + 5, $sformatf("latency %0d expected %0d", cyc - t_start, E * F + 5));
      chk(n_reads == E * F, "all words read once");
      chk(n_votes == 1, "one vote");
      chk(n_clear == 1, "one clear");
      @(negedge clk);
      chk(!busy && !done, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
