// tb_knn_select - self-checking test of the k-nearest list.
// Offers random candidates (many with equal distances) and compares the list
// after every candidate with a reference that keeps all candidates and
// sorts them by (distance, arrival order). Also checks `accepted`, `clear`,
// and a partly filled list.
module tb_knn_select;
  localparam int unsigned K = 5, DW = 34, CW = 2, TW = 16;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, accepted;
  logic [DW-1:0] in_dist = '0;
  logic [CW-1:0] in_cls = '0;
  logic [TW-1:0] in_tag = '0;
  logic [DW-1:0] nb_dist [K];
  logic [CW-1:0] nb_cls [K];
  logic [TW-1:0] nb_tag [K];
  logic nb_valid [K];
  int checks = 0, failures = 0;
  longint rd [$];
  int rt [$];
  int rc [$];

  knn_select #(.K(K), .DW(DW), .CW(CW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: insert after all entries with distance <= d (stable order).
  function automatic int ref_insert(input longint d, input int t, input int c);
    int p = 0;
    while (p < rd.size() && rd[p] <= d) p++;
    rd.insert(p, d); rt.insert(p, t); rc.insert(p, c);
    return p;
  endfunction

  task automatic compare(input string what);
    for (int i = 0; i < K; i++) begin
      checks++;
      if (i < rd.size()) begin
        if (!nb_valid[i] || longint'(nb_dist[i]) != rd[i] || int'(nb_tag[i]) != rt[i] ||
            int'(nb_cls[i]) != rc[i]) begin
          failures++;
          $display("FAIL %s entry %0d: v%b d%0d t%0d c%0d expected d%0d t%0d c%0d", what, i,
                   nb_valid[i], nb_dist[i], nb_tag[i], nb_cls[i], rd[i], rt[i], rc[i]);
        end
      end else if (nb_valid[i]) begin
        failures++;
        $display("FAIL %s entry %0d should be empty", what, i);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int q = 0; q < 30; q++) begin
      automatic int n = (q % 4 == 0) ? 3 : 150;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      rd.delete(); rt.delete(); rc.delete();
      compare("after clear");
      for (int e = 0; e < n; e++) begin
        int p;
        longint d;
        d = (q % 2) ? longint'($urandom_range(20)) : longint'({$urandom, $urandom}) & 64'h3_FFFF_FFFF;
        in_valid = 1; in_dist = DW'(d); in_tag = TW'(e); in_cls = CW'($urandom_range(2));
        p = ref_insert(d, e, int'(in_cls));
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (accepted !== (p < K)) begin
          failures++;
          $display("FAIL accepted=%b for position %0d", accepted, p);
        end
        compare($sformatf("query %0d cand %0d", q, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
