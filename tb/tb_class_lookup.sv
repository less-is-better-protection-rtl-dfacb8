// tb_class_lookup - self-checking test of the index-to-class lookup.
// For random non-decreasing pointer sets (including empty classes and
// pointers at 0 and at the end) every index is checked against the class
// found by a linear scan of the class ranges.
module tb_class_lookup;
  localparam int unsigned W = 16, NC = 5, NP = NC - 1, CW = 3;
  logic [W-1:0] idx;
  logic [W-1:0] ptr [NP];
  logic [CW-1:0] cls;
  int checks = 0, failures = 0;

  class_lookup #(.W(W), .NC(NC)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_cls(input int i, input int p [NP]);
    int c = 0;
    // class c spans [p[c-1], p[c]) with p[-1] = 0 and p[NP] = infinity
    for (int k = 0; k < NP; k++) if (i >= p[k]) c = k + 1; else break;
    return c;
  endfunction

  initial begin
    int p [NP];
    for (int t = 0; t < 40; t++) begin
      int last;
      last = 0;
      for (int k = 0; k < NP; k++) begin
        last = last + $urandom_range(t % 3 == 0 ? 0 : 1, 40);
        p[k] = last;
        ptr[k] = W'(last);
      end
      for (int i = 0; i < 200; i++) begin
        idx = W'(i);
        #1;
        checks++;
        if (int'(cls) != ref_cls(i, p)) begin
          failures++;
          $display("FAIL idx %0d: cls %0d expected %0d", i, cls, ref_cls(i, p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
