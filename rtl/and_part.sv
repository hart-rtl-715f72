// and_part: AND gate part of a hardware tautology checker.
//
// A W-input AND over the latch outputs: it is one exactly when every minterm
// has been covered, i.e. when the applied expression is a tautology.  Written
// as a reduction; a gate-level build is a balanced tree of W-1 two-input ANDs.
// Purely combinational.
module and_part #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in,
  output logic         all_one
);

  assign all_one = &in;

endmodule
