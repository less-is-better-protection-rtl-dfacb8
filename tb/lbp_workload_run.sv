// lbp_workload_run - runs the LBP kNN classifier at the size of one data set.
//
// Instantiates lbp_knn_top with E elements, F features, NC classes and k = K,
// fills it with a synthetic class-sorted training set (one random cluster
// centre per class and feature, elements spread around it, classes of nearly
// equal size), loads the NC-1 pointers in all three copies and classifies
// NQ random queries. Every result (class, tie flag, neighbour indices) is
// compared with a reference computed here, and the latency must be E*F + 5
// clocks. `finished` rises when all queries are done; checks and failures
// are counted on the outputs.
module lbp_workload_run #(
  parameter string       NAME = "set",
  parameter int unsigned E    = 150,
  parameter int unsigned F    = 4,
  parameter int unsigned NC   = 3,
  parameter int unsigned K    = 5,
  parameter int unsigned NQ   = 2
) (
  output bit finished,
  output int checks,
  output int failures
);
  localparam int unsigned W = 16;
  localparam int unsigned AW = (E * F > 1) ? $clog2(E * F) : 1;
  localparam int unsigned FW = (F > 1) ? $clog2(F) : 1;
  localparam int unsigned NP = NC - 1;
  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1;
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1;
  localparam int unsigned DW = 2 * W + FW;

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

  lbp_knn_top #(.W(W), .E(E), .F(F), .NC(NC), .K(K)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [W-1:0] mem_model [E * F];
  int ptr_model [NP];
  int centre [NC][F];

  function automatic longint sm(input logic [W-1:0] v);
    longint m = longint'(v[W-2:0]);
    return v[W-1] ? -m : m;
  endfunction

  function automatic logic [W-1:0] to_sm(input int v);
    if (v > 32767) v = 32767;
    if (v < -32767) v = -32767;
    return (v < 0) ? {1'b1, 15'(-v)} : {1'b0, 15'(v)};
  endfunction

  function automatic int class_of(input int e);
    int c = 0;
    for (int k = 0; k < NP; k++) if (e >= ptr_model[k]) c = k + 1;
    return c;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s %s", NAME, what); end
  endtask

  // Reference: K smallest distances, earlier element first on equal distance,
  // majority vote, ties to the nearest neighbour of a tied class.
  task automatic ref_classify(input logic [W-1:0] q [F], output int cls, output bit tie,
                              output int idx [K]);
    longint bd [K];
    int bi [K];
    int n = 0;
    int cnt [NC];
    int best, nties;
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
    for (int i = 0; i < K; i++) begin cnt[class_of(bi[i])]++; idx[i] = bi[i]; end
    best = 0;
    for (int c = 0; c < NC; c++) if (cnt[c] > best) best = cnt[c];
    nties = 0;
    for (int c = 0; c < NC; c++) if (cnt[c] == best) nties++;
    tie = nties > 1;
    cls = -1;
    for (int i = 0; i < K && cls < 0; i++) if (cnt[class_of(bi[i])] == best) cls = class_of(bi[i]);
  endtask

  initial begin
    logic [W-1:0] q [F];
    int ec, ei [K], t0;
    bit et;
    finished = 0; checks = 0; failures = 0;
    for (int c = 0; c < NC; c++)
      for (int j = 0; j < F; j++) centre[c][j] = $urandom_range(24000) - 12000;
    for (int k = 0; k < NP; k++) ptr_model[k] = ((k + 1) * E) / NC;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one word per clock
    for (int e = 0; e < E; e++) begin
      automatic int c = class_of(e);
      for (int j = 0; j < F; j++) begin
        @(negedge clk);
        mem_we = 1; mem_waddr = AW'(e * F + j);
        mem_wdata = to_sm(centre[c][j] + $urandom_range(16000) - 8000);
        mem_model[e * F + j] = mem_wdata;
      end
    end
    @(negedge clk); mem_we = 0;
    for (int cp = 0; cp < 3; cp++)
      for (int k = 0; k < NP; k++) begin
        @(negedge clk); ptr_we = 1; ptr_copy = 2'(cp); ptr_idx = PW'(k); ptr_wdata = W'(ptr_model[k]);
      end
    @(negedge clk); ptr_we = 0;
    for (int t = 0; t < NQ; t++) begin
      automatic int c0 = $urandom_range(NC - 1);
      for (int j = 0; j < F; j++) begin
        q[j] = to_sm(centre[c0][j] + $urandom_range(20000) - 10000);
        @(negedge clk); q_we = 1; q_idx = FW'(j); q_wdata = q[j];
      end
      @(negedge clk); q_we = 0; start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      chk(cyc - t0 == E * F + 5, $sformatf("latency %0d", cyc - t0));
      ref_classify(q, ec, et, ei);
      chk(int'(result_cls) == ec, $sformatf("query %0d class %0d expected %0d", t, result_cls, ec));
      chk(result_tie == et, $sformatf("query %0d tie", t));
      for (int i = 0; i < K; i++)
        chk(nn_valid[i] && int'(nn_idx[i]) == ei[i], $sformatf("query %0d neighbour %0d", t, i));
    end
    $display("%s: E=%0d F=%0d classes=%0d k=%0d, %0d queries, %0d failures", NAME, E, F, NC, K,
             NQ, failures);
    finished = 1;
  end
endmodule
