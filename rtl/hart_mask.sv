// hart_mask: mask module, lets the checker test an implication directly.
//
// To decide whether a cube c is contained in an expression F, F is restricted
// to c and the result is tested for tautology.  The mask module holds c and,
// when enabled, rewrites every incoming cube d of F on its way to the minterm
// generator:
//   1. intersect: t = d & c; if some part of t is empty, d does not meet c and
//      is dropped (out_valid stays low);
//   2. widen: every part becomes t | ~c, i.e. the literals outside c are
//      added back, which frees the variables that c fixes.
// The latches then fill up exactly when F restricted to c is 1 everywhere,
// which holds exactly when c lies inside F.  When disabled the cube passes
// unchanged.  The restriction rule is the design's; the module's register,
// enable and timing are this design's choices.
//
// Part boundaries depend on the configuration: in 6-in/4-out mode the top
// four bits form one four-valued part, empty only when all four are zero.
//
// Interface: load copies load_cube into the mask register at the rising edge;
// the data path from in_cube/in_valid to out_cube/out_valid is combinational.
module hart_mask
  import hart_pkg::*;
#(
  parameter int unsigned N = HART_N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  hart_mode_e          mode,
  input  logic                en,
  input  logic                load,
  input  logic [N-1:0][1:0]   load_cube,
  input  logic                in_valid,
  input  logic [N-1:0][1:0]   in_cube,
  output logic                out_valid,
  output logic [N-1:0][1:0]   out_cube
);

  logic [N-1:0][1:0] mask_cube;
  logic [N-1:0][1:0] isect;
  logic              empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mask_cube <= '1;   // universal cube: restriction changes nothing
    else if (load)  mask_cube <= load_cube;
  end

  always_comb begin
    isect = in_cube & mask_cube;
    empty = 1'b0;
    for (int unsigned i = 0; i < N - 2; i++) begin
      if (isect[i] == 2'b00) empty = 1'b1;
    end
    if (mode == MODE_6IN_4OUT) begin
      if ({isect[N-1], isect[N-2]} == 4'b0000) empty = 1'b1;
    end else begin
      if (isect[N-1] == 2'b00 || isect[N-2] == 2'b00) empty = 1'b1;
    end
    if (en) begin
      out_cube  = isect | ~mask_cube;
      out_valid = in_valid & ~empty;
    end else begin
      out_cube  = in_cube;
      out_valid = in_valid;
    end
  end

endmodule
