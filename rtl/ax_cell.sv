// ax_cell: the AND-XOR (AX) node, a U^D b = a + D.b over GF(2).
//
// It folds one product term D.b into a running GF(2) sum a. It is the only
// operator node of the prefix trees of the parallel LFSR: with d tied high it
// is a plain XOR that merges two partial sums. Purely combinational: one AND
// gate followed by one XOR gate. The node is the AX operation of the source
// method; using it with d tied high as the merge node is this design's choice.
module ax_cell (
  input  logic a,   // running sum
  input  logic d,   // generating-sequence bit (enable of the product)
  input  logic b,   // value multiplied by d
  output logic y    // a ^ (d & b)
);
  assign y = a ^ (d & b);
endmodule
