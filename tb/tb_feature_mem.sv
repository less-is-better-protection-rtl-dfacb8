// tb_feature_mem - self-checking test of the feature memory.
// Fills the whole memory with pseudo-random words, reads every word back in
// random order and checks the one-cycle read latency, that rdata holds when
// re is low, read-during-write returning the old word, and that a single-bit
// flip written into one word (a soft error) shows up only in that word.
module tb_feature_mem;
  localparam int unsigned W = 16, DEPTH = 600, AW = $clog2(DEPTH);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  feature_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic rd(input int a);
    @(negedge clk); re = 1; raddr = AW'(a);
    @(negedge clk); re = 0;
    check(rdata, model[a], $sformatf("read %0d", a));
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) rd($urandom_range(DEPTH - 1));
    for (int a = 0; a < DEPTH; a += 37) rd(a);
    // rdata holds while re is low
    rd(5);
    @(negedge clk); raddr = AW'(6);
    @(negedge clk);
    check(rdata, model[5], "hold with re low");
    // read during write returns the old word
    @(negedge clk); we = 1; waddr = AW'(9); wdata = ~model[9]; re = 1; raddr = AW'(9);
    @(negedge clk); we = 0; re = 0;
    check(rdata, model[9], "read during write");
    model[9] = ~model[9];
    rd(9);
    // single bit error in word 100, bit 14
    @(negedge clk); we = 1; waddr = AW'(100); wdata = model[100] ^ 16'h4000;
    model[100] = wdata;
    @(negedge clk); we = 0;
    rd(100); rd(99); rd(101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
