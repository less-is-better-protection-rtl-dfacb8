// tb_lbp_error_position - impact of a bit flip by bit position, LBP design at
// its default (Iris-sized) parameters.
//
// Repeats the error-injection experiment used to motivate the scheme: pick a
// stored element at random, flip one bit of one of its feature words, classify
// a fixed set of test queries (chosen near a class boundary, where the vote
// is won by at most one vote, so that a single moved element can matter), count the results that differ from the
// error-free ones, then undo the flip. This is done for every bit position
// 15..0 of the 16-bit sign-magnitude word. Every classification is also
// compared with a reference classifier over the same (corrupted) contents.
// Since LBP stores no label, the feature words are the only target. The bench
// prints the fraction of changed results per bit and checks the expected
// trend: flips in the four upper magnitude bits (14..11) change results, and
// change more of them than flips in the four lowest bits (3..0).
module tb_lbp_error_position;
  localparam int unsigned W = 16, E = 150, F = 4, NC = 3, K = 5;
  localparam int unsigned AW = $clog2(E * F), FW = 2, PW = 1, CW = 2, DW = 2 * W + 2;
  localparam int NQ = 12, R = 60;

  logic clk = 0, rst_n = 0;
  logic mem_we = 0, ptr_we = 0, q_we = 0, start = 0;
  logic [AW-1:0] mem_waddr = '0;
  logic [W-1:0] mem_wdata = '0, ptr_wdata = '0, q_wdata = '0;
  logic [1:0] ptr_copy = '0;
  logic [PW-1:0] ptr_idx = '0;
  logic [FW-1:0] q_idx = '0;
  logic busy, done, result_tie, ptr_disagree;
  logic [CW-1:0] result_cls;
  logic [DW-1:0] nn_dist [K];
  logic [W-1:0] nn_idx [K];
  logic nn_valid [K];

  lbp_knn_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] mem_model [E * F];
  int ptr_model [NC - 1] = '{50, 100};
  logic [W-1:0] queries [NQ][F];
  int clean [NQ];
  int changed [W];

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint sm(input logic [W-1:0] v);
    longint m = longint'(v[W-2:0]);
    return v[W-1] ? -m : m;
  endfunction

  function automatic logic [W-1:0] to_sm(input int v);
    return (v < 0) ? {1'b1, 15'(-v)} : {1'b0, 15'(v)};
  endfunction

  function automatic int class_of(input int e);
    int c = 0;
    for (int k = 0; k < NC - 1; k++) if (e >= ptr_model[k]) c = k + 1;
    return c;
  endfunction

  // Reference: k smallest squared distances (earlier element first on equal
  // distance), majority vote, tie to the nearest neighbour of a tied class.
  function automatic int ref_cls(input logic [W-1:0] q [F]);
    int m;
    return ref_vote(q, m);
  endfunction

  // Also returns the vote margin: top count minus the runner-up count.
  function automatic int ref_vote(input logic [W-1:0] q [F], output int margin);
    longint bd [K];
    int bi [K];
    int n = 0, best = 0, cls = -1;
    int cnt [NC];
    for (int e = 0; e < E; e++) begin
      longint d = 0;
      int p;
      for (int j = 0; j < F; j++) begin
        longint df = sm(mem_model[e * F + j]) - sm(q[j]);
        d += df * df;
      end
      p = n;
      while (p > 0 && bd[p - 1] > d) p--;
      if (p < K) begin
        for (int i = K - 1; i > p; i--) begin bd[i] = bd[i - 1]; bi[i] = bi[i - 1]; end
        bd[p] = d; bi[p] = e;
        if (n < K) n++;
      end
    end
    for (int c = 0; c < NC; c++) cnt[c] = 0;
    for (int i = 0; i < K; i++) cnt[class_of(bi[i])]++;
    for (int c = 0; c < NC; c++) if (cnt[c] > best) best = cnt[c];
    margin = best;
    begin
      int second = 0;
      bit seen = 0;
      for (int c = 0; c < NC; c++)
        if (cnt[c] == best && !seen) seen = 1;
        else if (cnt[c] > second) second = cnt[c];
      margin = best - second;
    end
    for (int i = 0; i < K && cls < 0; i++) if (cnt[class_of(bi[i])] == best) cls = class_of(bi[i]);
    return cls;
  endfunction

  task automatic write_word(input int a, input logic [W-1:0] v);
    @(negedge clk); mem_we = 1; mem_waddr = AW'(a); mem_wdata = v;
    @(negedge clk); mem_we = 0;
    mem_model[a] = v;
  endtask

  task automatic classify(input int t, output int cls);
    for (int j = 0; j < F; j++) begin
      @(negedge clk); q_we = 1; q_idx = FW'(j); q_wdata = queries[t][j];
    end
    @(negedge clk); q_we = 0; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cls = int'(result_cls);
    chk(cls == ref_cls(queries[t]), $sformatf("query %0d: class %0d expected %0d", t, cls,
                                              ref_cls(queries[t])));
  endtask

  // Overlapping clusters, so that some neighbourhoods are mixed.
  int centre [NC][F] = '{'{-6000, 3000, -6000, 1000},
                         '{    0, 1000,     0, -500},
                         '{ 6000, -2000, 6000, 2000}};

  initial begin
    int cls, lo, hi;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < E; e++) begin
      automatic int c = class_of(e);
      for (int j = 0; j < F; j++)
        write_word(e * F + j, to_sm(centre[c][j] + $urandom_range(10000) - 5000));
    end
    for (int cp = 0; cp < 3; cp++)
      for (int i = 0; i < NC - 1; i++) begin
        @(negedge clk); ptr_we = 1; ptr_copy = 2'(cp); ptr_idx = PW'(i); ptr_wdata = W'(ptr_model[i]);
      end
    @(negedge clk); ptr_we = 0;
    // Test queries near a class boundary: midway between two cluster centres,
    // kept only if their error-free vote is won by at most one vote.
    for (int t = 0, tries = 0; t < NQ; tries++) begin
      automatic int c0 = tries % NC, c1 = (tries + 1) % NC;
      int m;
      for (int j = 0; j < F; j++)
        queries[t][j] = to_sm((centre[c0][j] + centre[c1][j]) / 2 + $urandom_range(3000) - 1500);
      void'(ref_vote(queries[t], m));
      if (m <= 1 || tries > 5000) begin
        classify(t, clean[t]);
        t++;
      end
    end
    for (int b = W - 1; b >= 0; b--) begin
      changed[b] = 0;
      for (int r = 0; r < R; r++) begin
        int a;
        logic [W-1:0] old;
        a = $urandom_range(E * F - 1);
        old = mem_model[a];
        write_word(a, old ^ (W'(1) << b));
        for (int t = 0; t < NQ; t++) begin
          classify(t, cls);
          if (cls != clean[t]) changed[b]++;
        end
        write_word(a, old);
      end
      $display("bit %2d: %0d of %0d classifications changed (%0.3f%%)", b, changed[b], R * NQ,
               100.0 * changed[b] / (R * NQ));
    end
    lo = changed[0] + changed[1] + changed[2] + changed[3];
    hi = changed[14] + changed[13] + changed[12] + changed[11];
    chk(hi > 0, "upper-bit flips changed some classifications");
    chk(hi > lo, "upper-bit flips matter more than lower-bit flips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
