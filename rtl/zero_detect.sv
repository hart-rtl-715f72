// zero_detect: zero-detection part of the test-generation hardware.
//
// Looks at the latch outputs y[0..W-1] and reports the position of the first
// latch, counted from y0, that is still zero, as a binary code Y.  A zero
// latch is a minterm that no applied cube covers, i.e. an input vector a with
// F(a) = 0, which is a test.  When every latch is one the function is a
// tautology, there is no test, T is one and Y is zero.  For W = 8 this is the
// eight-input PLA truth table of the design (Y weights 4, 2, 1); entries to the
// right of the first zero are treated as don't-cares, which is this design's
// reading of that table.  Purely combinational.
module zero_detect #(
  parameter int unsigned N = 3,               // address bits
  parameter int unsigned W = 1 << N           // latches watched
) (
  input  logic [W-1:0] y,
  output logic         t,
  output logic [N-1:0] code
);

  always_comb begin
    t    = 1'b1;
    code = '0;
    for (int i = W - 1; i >= 0; i--) begin
      if (!y[i]) begin
        t    = 1'b0;
        code = N'(i);
      end
    end
  end

endmodule
