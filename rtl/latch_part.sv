// latch_part: latch part of a hardware tautology checker.
//
// One set-only storage cell per minterm.  Every cell starts at zero (after
// reset or a clear command); while `apply` is high, each cell whose minterm
// line is high is set to one.  Cells never fall back to zero except by clear,
// so after all cubes of an expression have been applied one by one, cell m is
// one exactly when some cube covers minterm m: the cells hold the truth table
// of the expression.
//
// The cells are clocked flip-flops rather than level-sensitive latches, and
// clear takes priority over a cube applied in the same cycle: both are choices
// of this design.  Interface: rst_n is an asynchronous active-low reset; clr,
// apply and set are sampled at the rising edge of clk; r shows the cells.
module latch_part #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         apply,
  input  logic [W-1:0] set,
  output logic [W-1:0] r
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      r <= '0;
    else if (clr)    r <= '0;
    else if (apply)  r <= r | set;
  end

endmodule
