// tb_dist_unit - self-checking test of the squared-distance unit.
// Streams random elements (with idle gaps, extreme values and negative zero)
// and checks each distance against sum((a-b)^2) computed in 64-bit integer
// arithmetic from the sign-magnitude words, the carried tag, and that
// out_valid rises exactly one clock after the last feature.
module tb_dist_unit;
  localparam int unsigned W = 16, F = 4, TW = 16, DW = 2 * W + 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [TW-1:0] in_tag = '0;
  logic [W-1:0] a = '0, b = '0;
  logic out_valid;
  logic [DW-1:0] out_dist;
  logic [TW-1:0] out_tag;
  int checks = 0, failures = 0, n_out = 0;

  dist_unit #(.W(W), .F(F), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sm(input logic [W-1:0] v);
    longint m = longint'(v[W-2:0]);
    return v[W-1] ? -m : m;
  endfunction

  function automatic logic [W-1:0] pick(input int mode);
    case (mode)
      0: return 16'h7FFF;
      1: return 16'hFFFF;
      2: return 16'h8000;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 400; e++) begin
      longint exp_d;
      exp_d = 0;
      for (int j = 0; j < F; j++) begin
        @(negedge clk);
        in_valid = 1; in_first = (j == 0); in_last = (j == F - 1); in_tag = TW'(e);
        a = pick(e < 8 ? (e + j) % 3 : 3 + $urandom_range(5));
        b = pick(e < 8 ? (e + j + 1) % 3 : 3 + $urandom_range(5));
        exp_d += (sm(a) - sm(b)) * (sm(a) - sm(b));
        @(posedge clk);
        #1;
        if (j == F - 1) begin
          checks++;
          if (!out_valid || longint'(out_dist) != exp_d || out_tag != TW'(e)) begin
            failures++;
            $display("FAIL element %0d: valid %b dist %0d expected %0d tag %0d",
                     e, out_valid, out_dist, exp_d, out_tag);
          end
        end else begin
          checks++;
          if (out_valid) begin
            failures++;
            $display("FAIL element %0d: out_valid mid-element", e);
          end
        end
      end
      @(negedge clk); in_valid = 0;
      if (e % 5 == 0) repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
