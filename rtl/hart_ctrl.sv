// hart_ctrl: control module of the 256-latch checker.
//
// Switches the checker between its two configurations by decoding the last
// four bits of the cube in two ways:
//   8 inputs, 1 output: the bits are the parts of x7 and x8, and
//                       q[2b+c] = x7^b & x8^c (two binary variables);
//   6 inputs, 4 outputs: the bits are one four-valued output part, and
//                       q[v] = bit v of that part.
// The two configurations are the design's; the decoding is
// this design's.  Purely combinational.
module hart_ctrl
  import hart_pkg::*;
(
  input  hart_mode_e  mode,
  input  logic [1:0]  p7,   // part x7 (8-in mode) / output bits 1:0 (6x4 mode)
  input  logic [1:0]  p8,   // part x8 (8-in mode) / output bits 3:2 (6x4 mode)
  output logic [3:0]  q
);

  always_comb begin
    if (mode == MODE_6IN_4OUT) begin
      q = {p8, p7};
    end else begin
      for (int unsigned v = 0; v < 4; v++) begin
        q[v] = p7[v[1]] & p8[v[0]];
      end
    end
  end

endmodule
