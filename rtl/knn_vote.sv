// knn_vote - majority vote among the k nearest neighbours.
//
// Counts how many of the valid neighbours belong to each of the NC classes and
// takes the class with the most votes. When two or more classes share the
// largest count (a tie), the winner is the class of the nearest neighbour that
// belongs to one of those classes: the list is scanned from the nearest entry
// and the first whose class has the maximum count decides. With two classes
// and an odd k a tie cannot occur. The counting and the tie-break rule are
// the ones the kNN scheme uses; the single-cycle structure is this
// implementation's.
//
// Interface: nb_cls/nb_valid is the neighbour list, nearest first, as kept by
// knn_select. in_valid starts a vote; one clock later out_valid pulses with
// out_cls and `tie`, which is high when the result came from the tie-break.
module knn_vote #(
  parameter int unsigned K  = 5,
  parameter int unsigned NC = 3,
  parameter int unsigned CW = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [CW-1:0] nb_cls   [K],
  input  logic          nb_valid [K],
  output logic          out_valid,
  output logic [CW-1:0] out_cls,
  output logic          tie
);

  localparam int unsigned NW = $clog2(K + 1);

  logic [NW-1:0] cnt [NC];
  logic [NW-1:0] best;
  logic [NC-1:0] at_max;
  logic [CW-1:0] win;
  logic          found;
  logic          n_tie;

  always_comb begin
    for (int c = 0; c < NC; c++) cnt[c] = '0;
    for (int i = 0; i < K; i++)
      if (nb_valid[i] && int'(nb_cls[i]) < NC)
        cnt[nb_cls[i]] = cnt[nb_cls[i]] + NW'(1);

    best = '0;
    for (int c = 0; c < NC; c++)
      if (cnt[c] > best) best = cnt[c];

    for (int c = 0; c < NC; c++) at_max[c] = (cnt[c] == best) && (best != '0);
    n_tie = ($countones(at_max) > 1);

    win   = '0;
    found = 1'b0;
    for (int i = 0; i < K; i++)
      if (!found && nb_valid[i] && int'(nb_cls[i]) < NC && at_max[nb_cls[i]]) begin
        win   = nb_cls[i];
        found = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cls   <= '0;
      tie       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_cls <= win;
        tie     <= n_tie;
      end
    end
  end

endmodule
