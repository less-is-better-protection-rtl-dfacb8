// tb_class_ptr_tmr - self-checking test of the triplicated class pointers.
// Loads all copies, then corrupts one copy of one pointer at a time (single
// bits, whole words, each copy in turn) and checks that the voted pointers
// are unchanged and that `disagree` rises; a second corrupted copy with the
// same value must win the vote (the limit of TMR). Reset value is checked too.
module tb_class_ptr_tmr;
  localparam int unsigned W = 16, NC = 3, NP = NC - 1, PW = 1;
  logic clk = 0, rst_n = 0, we = 0, disagree;
  logic [1:0] wcopy = '0;
  logic [PW-1:0] widx = '0;
  logic [W-1:0] wdata = '0;
  logic [W-1:0] ptr [NP];
  logic [W-1:0] golden [NP];
  int checks = 0, failures = 0;

  class_ptr_tmr #(.W(W), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int c, input int i, input logic [W-1:0] v);
    @(negedge clk); we = 1; wcopy = 2'(c); widx = PW'(i); wdata = v;
    @(negedge clk); we = 0;
  endtask

  task automatic expect_ptrs(input logic exp_dis, input string what);
    for (int i = 0; i < NP; i++) begin
      checks++;
      if (ptr[i] !== golden[i]) begin
        failures++;
        $display("FAIL %s: ptr[%0d]=%0d expected %0d", what, i, ptr[i], golden[i]);
      end
    end
    checks++;
    if (disagree !== exp_dis) begin
      failures++;
      $display("FAIL %s: disagree=%b", what, disagree);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    golden[0] = '0; golden[1] = '0;
    expect_ptrs(1'b0, "reset");
    golden[0] = 16'd50; golden[1] = 16'd100;
    for (int c = 0; c < 3; c++) for (int i = 0; i < NP; i++) wr(c, i, golden[i]);
    expect_ptrs(1'b0, "loaded");
    for (int n = 0; n < 60; n++) begin
      int c, i, b;
      c = $urandom_range(2); i = $urandom_range(NP - 1); b = $urandom_range(W - 1);
      wr(c, i, golden[i] ^ (W'(1) << b));
      expect_ptrs(1'b1, $sformatf("flip copy %0d ptr %0d bit %0d", c, i, b));
      wr(c, i, golden[i]);
      expect_ptrs(1'b0, "repaired");
    end
    // whole-word corruption of one copy
    wr(1, 0, 16'hFFFF);
    expect_ptrs(1'b1, "word corrupted");
    // same corruption in a second copy: the vote follows the majority
    wr(2, 0, 16'hFFFF);
    golden[0] = 16'hFFFF;
    expect_ptrs(1'b1, "two copies corrupted");
    // writes to copy index 3 are ignored
    @(negedge clk); we = 1; wcopy = 2'd3; widx = '0; wdata = 16'h1234;
    @(negedge clk); we = 0;
    expect_ptrs(1'b1, "copy 3 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
