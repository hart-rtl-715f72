// tgen: hardware for test generation.
//
// Finds an input vector a with F(a) = 0 for a sum-of-products expression F.
// The minterm generator and latch part are those of the tautology checker:
// after clearing, the cubes of F are applied one per cycle and the latches
// record the truth table.  The zero-detection part then names the first
// uncovered minterm as a binary code: its bits are the values of x1..xN of a
// test vector.  T = 1 means F is a tautology and has no test.
//
// Structure and the zero-detection truth table follow the design's
// three-variable test-generation circuit; the clocking is this design's choice.
//
// Interface: as hart_basic (clr, apply, cube); t and code are valid the cycle
// after the last apply.  code bit N-1 is x1.
module tgen #(
  parameter int unsigned N = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 apply,
  input  logic [N-1:0][1:0]    cube,
  output logic [(1<<N)-1:0]    y,
  output logic                 t,
  output logic [N-1:0]         code
);

  logic [(1<<N)-1:0] line;

  minterm_gen #(.N(N)) u_mg (
    .cube (cube),
    .line (line)
  );

  latch_part #(.W(1 << N)) u_lp (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .apply (apply),
    .set   (line),
    .r     (y)
  );

  zero_detect #(.N(N)) u_zd (
    .y    (y),
    .t    (t),
    .code (code)
  );

endmodule
