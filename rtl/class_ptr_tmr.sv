// class_ptr_tmr - the class pointers of the LBP scheme, kept in triplicate.
//
// With the training elements stored grouped by class, NC-1 pointers mark
// where each class range begins: pointer i holds the index of the first
// element of class i+1 (class 0 starts at element 0). The pointers are the
// only place where class information lives, so each one is stored three
// times (3*(NC-1) words of W bits) and read through a bitwise two-out-of-
// three majority vote, which masks any error confined to one copy.
//
// Interface: a write port (we, wcopy, widx, wdata) loads copy `wcopy` of
// pointer `widx`; test benches use the same port to corrupt a single copy.
// ptr[] is the voted value of every pointer, combinational from the stored
// copies. disagree is high while any bit of any pointer differs between its
// copies (the vote is then masking an error); this flag is an addition of
// this implementation. All copies reset to zero.
module class_ptr_tmr #(
  parameter int unsigned W  = 16,
  parameter int unsigned NC = 3,
  parameter int unsigned NP = (NC > 1) ? NC - 1 : 1,
  parameter int unsigned PW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [1:0]    wcopy,
  input  logic [PW-1:0] widx,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  ptr [NP],
  output logic          disagree
);

  logic [W-1:0] copy_q [3][NP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 3; c++)
        for (int i = 0; i < NP; i++)
          copy_q[c][i] <= '0;
    end else if (we && wcopy != 2'd3 && int'(widx) < int'(NP)) begin
      copy_q[wcopy][widx] <= wdata;
    end
  end

  always_comb begin
    disagree = 1'b0;
    for (int i = 0; i < NP; i++) begin
      ptr[i] = (copy_q[0][i] & copy_q[1][i]) |
               (copy_q[0][i] & copy_q[2][i]) |
               (copy_q[1][i] & copy_q[2][i]);
      if (copy_q[0][i] != copy_q[1][i] || copy_q[0][i] != copy_q[2][i])
        disagree = 1'b1;
    end
  end

endmodule
