// feature_mem - the unprotected memory that holds the training elements.
//
// Under LBP the memory holds only feature words: element e, feature j sits at
// address e*F + j, and the elements are stored grouped by class, so no label
// word is kept (the class follows from the address and the class pointers).
// No parity or ECC bits are added: every word is a plain W-bit word, and a
// soft error simply changes the stored value.
//
// Interface: one synchronous write port (used to load the training set, and
// by test benches to plant errors) and one synchronous read port. Timing:
// rdata holds the word addressed when re was high one clock cycle earlier and
// keeps its value otherwise. Write and read of the same address in one cycle
// return the old word. The array has no reset; every word must be written
// before it is read.
module feature_mem #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 600,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
