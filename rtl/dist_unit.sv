// dist_unit - squared Euclidean distance between the query and one element.
//
// The classifier ranks neighbours by Euclidean distance over all features.
// Since only the order of distances matters, the square root is left out and
// the unit accumulates sum_j (x_j - q_j)^2. It takes one feature pair per
// cycle: `a` is the stored word, `b` the query word, both W-bit sign-magnitude
// (MSB = sign). in_first marks the first feature of an element and clears the
// sum, in_last the final one; in_tag (the element index) is carried along.
//
// Timing: one clock from the last feature to out_valid; out_valid is a
// single-cycle pulse with out_dist and out_tag valid during it. The
// accumulator is DW bits wide, enough for F features of full-range
// differences, so the sum never wraps. Squaring instead of the square root is
// a choice of this implementation; it does not change which neighbours are
// nearest.
module dist_unit #(
  parameter int unsigned W  = 16,
  parameter int unsigned F  = 4,
  parameter int unsigned TW = 16,
  parameter int unsigned DW = 2 * W + ((F > 1) ? $clog2(F) : 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [TW-1:0] in_tag,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic          out_valid,
  output logic [DW-1:0] out_dist,
  output logic [TW-1:0] out_tag
);

  logic signed [W:0]   a_s, b_s, diff;
  logic        [W-1:0]  mag;
  logic        [2*W-1:0] sq;
  logic        [DW-1:0] acc_q, sum;

  // Sign-magnitude to two's complement, one bit wider.
  function automatic logic signed [W:0] sm2s(input logic [W-1:0] v);
    logic signed [W:0] m;
    m = signed'({2'b00, v[W-2:0]});
    return v[W-1] ? -m : m;
  endfunction

  always_comb begin
    a_s  = sm2s(a);
    b_s  = sm2s(b);
    diff = a_s - b_s;
    // |diff| < 2^W, so its square fits in 2W bits.
    // |diff| <= 2^W - 2, so the magnitude fits in W bits.
    mag  = (diff < 0) ? W'(-diff) : W'(diff);
    sq   = {{W{1'b0}}, mag} * {{W{1'b0}}, mag};
    sum  = (in_first ? '0 : acc_q) + {{(DW-2*W){1'b0}}, sq};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_dist  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc_q <= sum;
        if (in_last) begin
          out_dist <= sum;
          out_tag  <= in_tag;
        end
      end
    end
  end

endmodule
