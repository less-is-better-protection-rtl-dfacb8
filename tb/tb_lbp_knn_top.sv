// tb_lbp_knn_top - end-to-end test of the LBP kNN classifier at its default
// size (Iris-sized: 150 elements, 4 features, 3 classes, k = 5).
//
// A synthetic three-class data set (one cluster per class, 16-bit
// sign-magnitude features) is written grouped by class, with the two class
// pointers loaded in all three copies. Queries are classified by the design
// and by a reference model in this bench (exact squared distances, stable
// sort, majority vote with nearest-neighbour tie-break); class, tie flag and
// neighbour indices must agree, and `done` must come E*F + 5 clocks after
// start. The bench then repeats the error-injection experiment the scheme is
// evaluated with: single, double-adjacent and double-random bit flips in
// feature words, and corruption of one copy of a class pointer. The design
// must still match the model of the corrupted memory, a pointer error must be
// outvoted (same results as without it), and the number of classifications
// that a memory error changed is reported. A forced case places five
// elements of classes 2, 1, 2, 1, 0 nearest to a query: the vote ties 2-2 and
// goes to class 2, and an upper-bit flip in the nearest of them must turn
// the result into class 1. Each mechanism (a vote tie, a masked pointer
// error, a feature error that changed a result) is counted and must occur at
// least once; candidates rejected by the neighbour list occur in every query
// and are covered by the neighbour-index checks. Since most random errors
// leave every result unchanged, a final pass searches (with the reference
// model) for upper-bit flips in a neighbour's features that do change a
// result and applies those.
module tb_lbp_knn_top;
  localparam int unsigned W = 16, E = 150, F = 4, NC = 3, K = 5;
  localparam int unsigned AW = $clog2(E * F), FW = 2, PW = 1, CW = 2, DW = 2 * W + 2;

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

  int checks = 0, failures = 0, cyc = 0;
  int n_ties = 0, n_masked = 0, n_changed = 0, n_injected = 0, n_queries = 0;
  logic [W-1:0] mem_model [E * F];
  int ptr_model [NC - 1];
  logic [W-1:0] queries [40][F];
  int clean_cls [40];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  task automatic write_word(input int a, input logic [W-1:0] v);
    @(negedge clk); mem_we = 1; mem_waddr = AW'(a); mem_wdata = v;
    @(negedge clk); mem_we = 0;
    mem_model[a] = v;
  endtask

  task automatic write_ptr(input int c, input int i, input int v);
    @(negedge clk); ptr_we = 1; ptr_copy = 2'(c); ptr_idx = PW'(i); ptr_wdata = W'(v);
    @(negedge clk); ptr_we = 0;
  endtask

  // Reference classifier over the model memory and the intended pointers.
  task automatic ref_classify(input logic [W-1:0] q [F], output int cls, output bit tie,
                              output int idx [K]);
    longint d [E];
    int order [$];
    int cnt [NC];
    int best;
    int nties;
    for (int e = 0; e < E; e++) begin
      d[e] = 0;
      for (int j = 0; j < F; j++)
        d[e] += (sm(mem_model[e * F + j]) - sm(q[j])) * (sm(mem_model[e * F + j]) - sm(q[j]));
    end
    // stable selection of the K smallest distances
    for (int e = 0; e < E; e++) begin
      int p = 0;
      while (p < order.size() && d[order[p]] <= d[e]) p++;
      order.insert(p, e);
    end
    for (int c = 0; c < NC; c++) cnt[c] = 0;
    for (int i = 0; i < K; i++) begin
      int c = 0;
      for (int k = 0; k < NC - 1; k++) if (order[i] >= ptr_model[k]) c = k + 1;
      cnt[c]++;
      idx[i] = order[i];
    end
    best = 0;
    for (int c = 0; c < NC; c++) if (cnt[c] > best) best = cnt[c];
    nties = 0;
    for (int c = 0; c < NC; c++) if (cnt[c] == best) nties++;
    tie = (nties > 1);
    cls = -1;
    for (int i = 0; i < K && cls < 0; i++) begin
      int c = 0;
      for (int k = 0; k < NC - 1; k++) if (order[i] >= ptr_model[k]) c = k + 1;
      if (cnt[c] == best) cls = c;
    end
  endtask

  task automatic classify(input logic [W-1:0] q [F], output int cls, input string what);
    int ec, ei [K], t0;
    bit et;
    for (int j = 0; j < F; j++) begin
      @(negedge clk); q_we = 1; q_idx = FW'(j); q_wdata = q[j];
    end
    @(negedge clk); q_we = 0; start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    chk(cyc - t0 == E * F + 5, $sformatf("%s: latency %0d", what, cyc - t0));
    ref_classify(q, ec, et, ei);
    chk(int'(result_cls) == ec, $sformatf("%s: class %0d expected %0d", what, result_cls, ec));
    chk(result_tie == et, $sformatf("%s: tie %b expected %b", what, result_tie, et));
    for (int i = 0; i < K; i++)
      chk(nn_valid[i] && int'(nn_idx[i]) == ei[i],
          $sformatf("%s: neighbour %0d is %0d expected %0d", what, i, nn_idx[i], ei[i]));
    if (result_tie) n_ties++;
    n_queries++;
    cls = int'(result_cls);
  endtask

  // Cluster centres per class and feature (sign-magnitude values).
  // Cluster centres per class and feature, overlapping so that queries
  // between two clusters have mixed neighbourhoods.
  int centre [NC][F] = '{'{-6000, 3000, -6000, 1000},
                         '{    0, 1000,     0, -500},
                         '{ 6000, -2000, 6000, 2000}};

  initial begin
    int cls, spread, e_err, bit0, bit1, a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Training set: 50 elements per class, stored by class.
    for (int e = 0; e < E; e++) begin
      automatic int c = e / 50;
      for (int j = 0; j < F; j++)
        write_word(e * F + j, to_sm(centre[c][j] + $urandom_range(10000) - 5000));
    end
    ptr_model[0] = 50; ptr_model[1] = 100;
    for (int cp = 0; cp < 3; cp++) for (int i = 0; i < NC - 1; i++) write_ptr(cp, i, ptr_model[i]);
    chk(!ptr_disagree, "pointers agree after load");

    // Error-free classification of test queries around and between clusters.
    for (int t = 0; t < 40; t++) begin
      automatic int c0 = t % NC, c1 = (t + 1) % NC;
      spread = $urandom_range(100);
      for (int j = 0; j < F; j++)
        queries[t][j] = to_sm((centre[c0][j] * (100 - spread) + centre[c1][j] * spread) / 100
                              + $urandom_range(4000) - 2000);
      classify(queries[t], clean_cls[t], $sformatf("query %0d", t));
    end

    // A forced tie: query at the origin, two class-1 elements, two class-2
    // elements and one class-0 element placed closest, class 2 nearest.
    begin
      logic [W-1:0] qz [F];
      logic [W-1:0] save [20];
      int pos [5] = '{100, 50, 101, 51, 0};
      int off [5] = '{10, 20, 30, 40, 50};
      for (int j = 0; j < F; j++) qz[j] = '0;
      for (int n = 0; n < 5; n++)
        for (int j = 0; j < F; j++) begin
          save[n * F + j] = mem_model[pos[n] * F + j];
          write_word(pos[n] * F + j, to_sm(off[n]));
        end
      classify(qz, cls, "forced tie");
      chk(cls == 2, "forced tie resolved to the nearest tied class");
      // An upper-bit flip in the nearest neighbour moves it out of the
      // neighbourhood: class 1 now has the majority or the nearest tied vote.
      write_word(pos[0] * F, to_sm(off[0]) ^ 16'h4000);
      n_injected++;
      classify(qz, cls, "forced tie, nearest neighbour moved away");
      chk(cls == 1, "moved neighbour changes the result to class 1");
      if (cls != 2) n_changed++;
      for (int n = 0; n < 5; n++)
        for (int j = 0; j < F; j++) write_word(pos[n] * F + j, save[n * F + j]);
    end

    // Pointer errors: corrupt one copy; results must not change.
    for (int r = 0; r < 6; r++) begin
      automatic int cp = r % 3, pi = r % 2;
      write_ptr(cp, pi, ptr_model[pi] ^ (1 << $urandom_range(W - 1)));
      chk(ptr_disagree, "pointer error visible");
      for (int t = 0; t < 3; t++) begin
        classify(queries[t * 7 + r], cls, $sformatf("pointer error %0d query %0d", r, t * 7 + r));
        chk(cls == clean_cls[t * 7 + r], "pointer error masked by the vote");
        n_masked++;
      end
      write_ptr(cp, pi, ptr_model[pi]);
      chk(!ptr_disagree, "pointer repaired");
    end

    // Feature errors: single, double adjacent and double random bit flips in
    // one word, mostly in the upper bits so that some of them move an element.
    for (int r = 0; r < 36; r++) begin
      logic [W-1:0] old;
      automatic int kind = r % 3;
      e_err = (r % 2) ? $urandom_range(E - 1) : 0;
      a = (e_err == 0) ? int'(nn_idx[0]) * F + $urandom_range(F - 1)
                       : e_err * F + $urandom_range(F - 1);
      bit0 = $urandom_range(W - 2, 9);
      bit1 = (kind == 1) ? bit0 + 1 : (kind == 2 ? $urandom_range(W - 1) : bit0);
      old = mem_model[a];
      write_word(a, old ^ (W'(1) << bit0) ^ ((kind != 0 && bit1 != bit0) ? (W'(1) << bit1) : '0));
      n_injected++;
      for (int t = 0; t < 40; t += 5) begin
        int tq;
        tq = (t + r) % 40;
        classify(queries[tq], cls, $sformatf("feature error %0d query %0d", r, tq));
        if (cls != clean_cls[tq]) n_changed++;
      end
      write_word(a, old);
    end

    // Targeted errors: for a few queries, search the flips of an upper bit of
    // a neighbour's feature that the reference says change the result, and
    // apply the first one found to the design.
    for (int tq = 0; tq < 40 && n_changed < 4; tq++) begin
      int rc, ri [K], found_a;
      bit rt;
      logic [W-1:0] old, flip;
      found_a = -1;
      ref_classify(queries[tq], rc, rt, ri);
      for (int i = 0; i < K && found_a < 0; i++)
        for (int j = 0; j < F && found_a < 0; j++)
          for (int b = W - 1; b >= 4 && found_a < 0; b--) begin
            int c2, i2 [K];
            bit t2;
            a = ri[i] * F + j;
            old = mem_model[a];
            mem_model[a] = old ^ (W'(1) << b);
            ref_classify(queries[tq], c2, t2, i2);
            if (c2 != rc) begin found_a = a; flip = mem_model[a]; end
            mem_model[a] = old;
          end
      if (found_a >= 0) begin
        old = mem_model[found_a];
        write_word(found_a, flip);
        n_injected++;
        classify(queries[tq], cls, $sformatf("targeted error query %0d", tq));
        if (cls != clean_cls[tq]) n_changed++;
        write_word(found_a, old);
      end
    end

    $display("queries %0d, ties %0d, pointer errors masked %0d, feature errors %0d, changed results %0d",
             n_queries, n_ties, n_masked, n_injected, n_changed);
    chk(n_ties > 0, "a vote tie occurred");
    chk(n_masked > 0, "a pointer error was masked");
    chk(n_changed > 0, "a feature error changed a classification");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
