// class_lookup - recovers the class of a stored element from its index.
//
// Because the elements are stored grouped by class, in class order, the class
// of element `idx` is the number of class pointers that are less than or
// equal to idx: pointer i holds the first index of class i+1. The pointers
// must be loaded in non-decreasing order; an empty class has a pointer equal
// to the next one. Purely combinational: one comparator per pointer and a
// population count.
//
// The grouping and the use of NC-1 pointers follow the LBP scheme; the
// "first index of the next class" meaning of a pointer is a choice of this
// implementation.
module class_lookup #(
  parameter int unsigned W  = 16,
  parameter int unsigned NC = 3,
  parameter int unsigned NP = (NC > 1) ? NC - 1 : 1,
  parameter int unsigned CW = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic [W-1:0]  idx,
  input  logic [W-1:0]  ptr [NP],
  output logic [CW-1:0] cls
);

  always_comb begin
    cls = '0;
    for (int i = 0; i < NP; i++)
      if (idx >= ptr[i]) cls = cls + CW'(1);
  end

endmodule
