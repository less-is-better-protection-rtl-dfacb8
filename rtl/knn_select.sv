// knn_select - keeps the k nearest elements seen so far.
//
// A sorted list of K entries (distance, class, element index), nearest first.
// Each incoming candidate is compared with every entry in parallel; its
// position is the number of valid entries whose distance is less than or
// equal to its own, so among equal distances the element seen first stays
// ahead. If that position is inside the list, the entries from there on move
// down one place (the last one drops out) and the candidate is written in.
// Candidates farther than the K-th entry are ignored.
//
// Interface: `clear` empties the list (all entries invalid) before a new
// query; in_valid offers one candidate per cycle. The list outputs are the
// registered state, updated one clock after the candidate. `accepted` pulses
// one clock after a candidate entered the list. The parallel compare-and-
// shift structure and the tie order are choices of this implementation; the
// function (the k nearest neighbours) is the kNN algorithm's. An assertion
// checks that the list stays sorted and filled from the front.
module knn_select #(
  parameter int unsigned K  = 5,
  parameter int unsigned DW = 34,
  parameter int unsigned CW = 2,
  parameter int unsigned TW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic [DW-1:0] in_dist,
  input  logic [CW-1:0] in_cls,
  input  logic [TW-1:0] in_tag,
  output logic [DW-1:0] nb_dist  [K],
  output logic [CW-1:0] nb_cls   [K],
  output logic [TW-1:0] nb_tag   [K],
  output logic          nb_valid [K],
  output logic          accepted
);

  localparam int unsigned PW = $clog2(K + 1);

  logic [PW-1:0] pos;

  always_comb begin
    pos = '0;
    for (int i = 0; i < K; i++)
      if (nb_valid[i] && nb_dist[i] <= in_dist) pos = pos + PW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      accepted <= 1'b0;
      for (int i = 0; i < K; i++) begin
        nb_dist[i]  <= '0;
        nb_cls[i]   <= '0;
        nb_tag[i]   <= '0;
        nb_valid[i] <= 1'b0;
      end
    end else if (clear) begin
      accepted <= 1'b0;
      for (int i = 0; i < K; i++) nb_valid[i] <= 1'b0;
    end else begin
      accepted <= in_valid && (pos < PW'(K));
      if (in_valid && pos < PW'(K)) begin
        for (int i = 1; i < K; i++) begin
          if (PW'(i) > pos) begin
            nb_dist[i]  <= nb_dist[i-1];
            nb_cls[i]   <= nb_cls[i-1];
            nb_tag[i]   <= nb_tag[i-1];
            nb_valid[i] <= nb_valid[i-1];
          end
        end
        for (int i = 0; i < K; i++) begin
          if (PW'(i) == pos) begin
            nb_dist[i]  <= in_dist;
            nb_cls[i]   <= in_cls;
            nb_tag[i]   <= in_tag;
            nb_valid[i] <= 1'b1;
          end
        end
      end
    end
  end

  // The list stays sorted and filled from the front.
  for (genvar i = 1; i < K; i++) begin : g_sorted
    a_sorted: assert property (@(posedge clk) disable iff (!rst_n)
      nb_valid[i] |-> (nb_valid[i-1] && nb_dist[i-1] <= nb_dist[i]))
      else $error("neighbour list out of order at entry %0d", i);
  end

endmodule
