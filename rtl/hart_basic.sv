// hart_basic: hardware tautology checker for an N-variable switching function.
//
// The checker builds the truth table of a sum-of-products expression and tests
// it for tautology.  All latches are cleared first; then the cubes of the
// expression are applied one per clock cycle.  The minterm generator raises the
// line of every minterm of the applied cube and the latch part sets those
// latches.  After the last cube the AND gate part outputs one exactly when
// every latch is set, i.e. when the expression equals 1 everywhere.
//
// The three parts and their sizes (2^N N-input ANDs, 2^N latches, one 2^N-input
// AND) follow the design; N = 3 is its worked three-variable example.  The
// cycle-by-cycle protocol is this design's choice.
//
// Interface: clr clears all latches at the next rising edge; apply with cube
// applies one positional cube at the next rising edge; taut and r reflect the
// latches, so taut is valid the cycle after the last apply.
module hart_basic #(
  parameter int unsigned N = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 apply,
  input  logic [N-1:0][1:0]    cube,
  output logic [(1<<N)-1:0]    r,
  output logic                 taut
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
    .r     (r)
  );

  and_part #(.W(1 << N)) u_ap (
    .in      (r),
    .all_one (taut)
  );

endmodule
