// hart_latch_module: one latch module of the 256-latch checker.
//
// Each module is a small three-variable tautology checker: eight minterm AND
// gates, eight latches and an eight-input AND.  The 256-latch checker uses 32
// of them; the AND modules choose which one a cube reaches (`sel`), so a module
// only records minterms whose upper five variables lie inside the cube.
//
// The three local variables are x6 (a binary part) and the lowest two
// minterm-number bits, which arrive already decoded from the control module
// as four lines q[3:0]: in the 8-input configuration q[2b+c] = x7^b & x8^c, in
// the 6-input 4-output configuration q[v] is output v of the cube's output
// part.  Latch l of the module (l = 4a + v) is therefore set when
// apply & sel & x6^a & q[v].  Pre-decoding the lower pair in the control
// module is this design's way of switching the configuration; with the
// 8-input decoding the module is exactly the three-variable checker.
//
// Interface: clr/apply sampled at the rising clock edge; r shows the eight
// latches, all_one is their AND.
module hart_latch_module (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        apply,
  input  logic        sel,
  input  logic [1:0]  p_hi,   // positional part of the upper local variable (x6)
  input  logic [3:0]  q,      // decoded lower two minterm bits
  output logic [7:0]  r,
  output logic        all_one
);

  logic [7:0] line;

  always_comb begin
    for (int unsigned l = 0; l < 8; l++) begin
      line[l] = sel & p_hi[l[2]] & q[l[1:0]];
    end
  end

  latch_part #(.W(8)) u_lp (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .apply (apply),
    .set   (line),
    .r     (r)
  );

  and_part #(.W(8)) u_ap (
    .in      (r),
    .all_one (all_one)
  );

endmodule
