// tb_knn_vote - self-checking test of the majority vote.
// Checks the two worked examples of the scheme (k = 5: two votes for A and
// three for B gives B; with three classes, a 2-2-1 split between B and C is
// decided by the nearest of the tied neighbours) and then random neighbour
// lists, partly filled ones included, against a reference vote. Also checks
// the one-clock latency and the `tie` flag.
module tb_knn_vote;
  localparam int unsigned K = 5, NC = 3, CW = 2;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [CW-1:0] nb_cls [K];
  logic nb_valid [K];
  logic out_valid, tie;
  logic [CW-1:0] out_cls;
  int checks = 0, failures = 0, n_ties = 0;

  knn_vote #(.K(K), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vote(input int cls [K], input int nvalid, input int exp_cls, input bit exp_tie,
                      input string what);
    for (int i = 0; i < K; i++) begin
      nb_cls[i] = CW'(cls[i]);
      nb_valid[i] = (i < nvalid);
    end
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || int'(out_cls) != exp_cls || tie != exp_tie) begin
      failures++;
      $display("FAIL %s: valid %b cls %0d tie %b expected cls %0d tie %b", what, out_valid,
               out_cls, tie, exp_cls, exp_tie);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL %s: out_valid longer than one clock", what);
    end
  endtask

  initial begin
    int c [K];
    for (int i = 0; i < K; i++) begin nb_cls[i] = '0; nb_valid[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // A = 0, B = 1, C = 2; list ordered nearest first
    c = '{1, 0, 1, 0, 1};
    vote(c, 5, 1, 0, "two classes, 3 B vs 2 A");
    c = '{0, 2, 1, 1, 2};
    vote(c, 5, 2, 1, "tie B/C, nearest majority neighbour is C");
    c = '{1, 2, 1, 0, 2};
    vote(c, 5, 1, 1, "tie B/C, nearest majority neighbour is B");
    c = '{0, 1, 2, 0, 0};
    vote(c, 3, 0, 1, "partly filled list, three-way tie");
    for (int t = 0; t < 2000; t++) begin
      int cnt [NC];
      int best, ec, ties, nv;
      best = 0; ec = 0; ties = 0;
      nv = (t % 7 == 0) ? $urandom_range(1, K) : K;
      for (int k = 0; k < NC; k++) cnt[k] = 0;
      for (int i = 0; i < K; i++) begin
        c[i] = $urandom_range(NC - 1);
        if (i < nv) cnt[c[i]]++;
      end
      for (int k = 0; k < NC; k++) if (cnt[k] > best) best = cnt[k];
      for (int k = 0; k < NC; k++) if (cnt[k] == best) ties++;
      for (int i = nv - 1; i >= 0; i--) if (cnt[c[i]] == best) ec = c[i];
      if (ties > 1) n_ties++;
      vote(c, nv, ec, ties > 1, $sformatf("random %0d", t));
    end
    $display("ties exercised: %0d", n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
