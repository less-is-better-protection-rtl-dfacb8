// lbp_knn_top - kNN classifier whose training memory is protected by
// Less-is-Better Protection (LBP).
//
// The training set is kept as E elements of F features, W bits per feature,
// in a plain memory with no parity or ECC bits and no label words. Elements
// are stored grouped by class; NC-1 class pointers mark where each class
// begins, and those pointers, being few, are held in three copies and read
// through a majority vote. A query is classified by streaming the whole
// memory through a squared-distance unit, keeping the K nearest elements in a
// sorted list, and taking a majority vote among their classes (ties go to the
// nearest neighbour of a tied class). The class of each candidate comes from
// its element index and the voted pointers, never from a stored label, so a
// memory error can only move an element, never relabel it.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   mem_we/mem_waddr/mem_wdata  write one feature word, address e*F + j
//   ptr_we/ptr_copy/ptr_idx/ptr_wdata  write one copy of class pointer idx
//                               (pointer i = index of the first element of
//                               class i+1); all three copies must be written
//   q_we/q_idx/q_wdata          write query feature j
//   start -> busy ... done      one classification; result_cls and result_tie
//                               are valid from done until the next start
//   ptr_disagree                a pointer copy differs from the others (the
//                               vote is masking it)
//   nn_dist/nn_idx/nn_valid     the K nearest neighbours of the last query,
//                               nearest first (squared distance, element index)
// Timing: done is high E*F + 5 clocks after start; one word per clock.
// Assertions check, at each start, that the voted pointers are non-decreasing
// and do not exceed E.
// Memory layout, pointer scheme, TMR of the pointers and the vote rule follow
// the LBP scheme; the sign-magnitude arithmetic, the squared distance and
// the cycle schedule are this implementation's choices. The defaults are
// the sizes of the Iris data set with k = 5.
module lbp_knn_top #(
  parameter int unsigned W  = lbp_pkg::W_DEF,
  parameter int unsigned E  = lbp_pkg::E_DEF,
  parameter int unsigned F  = lbp_pkg::F_DEF,
  parameter int unsigned NC = lbp_pkg::NC_DEF,
  parameter int unsigned K  = lbp_pkg::K_DEF,
  localparam int unsigned DEPTH = E * F,
  localparam int unsigned AW = lbp_pkg::idx_w(DEPTH),
  localparam int unsigned FW = lbp_pkg::idx_w(F),
  localparam int unsigned NP = (NC > 1) ? NC - 1 : 1,
  localparam int unsigned PW = lbp_pkg::idx_w(NP),
  localparam int unsigned CW = lbp_pkg::idx_w(NC),
  localparam int unsigned DW = 2 * W + lbp_pkg::idx_w(F)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_waddr,
  input  logic [W-1:0]  mem_wdata,
  input  logic          ptr_we,
  input  logic [1:0]    ptr_copy,
  input  logic [PW-1:0] ptr_idx,
  input  logic [W-1:0]  ptr_wdata,
  input  logic          q_we,
  input  logic [FW-1:0] q_idx,
  input  logic [W-1:0]  q_wdata,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] result_cls,
  output logic          result_tie,
  output logic          ptr_disagree,
  output logic [DW-1:0] nn_dist [K],
  output logic [W-1:0]  nn_idx  [K],
  output logic          nn_valid [K]
);

  // Query feature registers.
  logic [W-1:0] q_q [F];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < F; j++) q_q[j] <= '0;
    end else if (q_we && int'(q_idx) < F) begin
      q_q[q_idx] <= q_wdata;
    end
  end

  // Sequencer.
  logic          sel_clear, mem_re, d_valid, d_first, d_last, vote_start;
  logic          vote_valid;
  logic [AW-1:0] mem_raddr;
  logic [FW-1:0] d_fidx;
  logic [W-1:0]  d_tag;

  knn_ctrl #(.E(E), .F(F), .TW(W), .AW(AW), .FW(FW)) u_ctrl (
    .clk, .rst_n, .start, .vote_done(vote_valid), .busy, .done, .sel_clear,
    .mem_re, .mem_raddr, .d_valid, .d_first, .d_last, .d_fidx, .d_tag,
    .vote_start
  );

  // Feature memory (no labels, no check bits).
  logic [W-1:0] mem_rdata;
  feature_mem #(.W(W), .DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  // Class pointers in triplicate.
  logic [W-1:0] ptr [NP];
  class_ptr_tmr #(.W(W), .NC(NC), .NP(NP), .PW(PW)) u_ptr (
    .clk, .rst_n, .we(ptr_we), .wcopy(ptr_copy), .widx(ptr_idx),
    .wdata(ptr_wdata), .ptr, .disagree(ptr_disagree)
  );

  // Distance.
  logic          dist_valid;
  logic [DW-1:0] cand_dist;
  logic [W-1:0]  dist_tag;
  dist_unit #(.W(W), .F(F), .TW(W), .DW(DW)) u_dist (
    .clk, .rst_n, .in_valid(d_valid), .in_first(d_first), .in_last(d_last),
    .in_tag(d_tag), .a(mem_rdata), .b(q_q[d_fidx]),
    .out_valid(dist_valid), .out_dist(cand_dist), .out_tag(dist_tag)
  );

  // Class of the candidate from its index.
  logic [CW-1:0] cand_cls;
  class_lookup #(.W(W), .NC(NC), .NP(NP), .CW(CW)) u_lookup (
    .idx(dist_tag), .ptr, .cls(cand_cls)
  );

  // k nearest neighbours.
  logic [CW-1:0] nb_cls   [K];
  knn_select #(.K(K), .DW(DW), .CW(CW), .TW(W)) u_sel (
    .clk, .rst_n, .clear(sel_clear), .in_valid(dist_valid), .in_dist(cand_dist),
    .in_cls(cand_cls), .in_tag(dist_tag), .nb_dist(nn_dist), .nb_cls,
    .nb_tag(nn_idx), .nb_valid(nn_valid), .accepted()
  );

  // Vote.
  knn_vote #(.K(K), .NC(NC), .CW(CW)) u_vote (
    .clk, .rst_n, .in_valid(vote_start), .nb_cls, .nb_valid(nn_valid),
    .out_valid(vote_valid), .out_cls(result_cls), .tie(result_tie)
  );

  // The class ranges must be well formed when a query starts: the voted
  // pointers non-decreasing and inside the memory.
  for (genvar i = 0; i < NP; i++) begin : g_ptr_chk
    if (i > 0) begin : g_order
      a_ptr_order: assert property (@(posedge clk) disable iff (!rst_n)
        (start && !busy) |-> (ptr[i-1] <= ptr[i]))
        else $error("class pointer %0d below pointer %0d", i, i - 1);
    end
    a_ptr_range: assert property (@(posedge clk) disable iff (!rst_n)
      (start && !busy) |-> (ptr[i] <= W'(E)))
      else $error("class pointer %0d beyond the last element", i);
  end

endmodule
