// hart_and_module: the AND modules of the 256-latch checker.
//
// Two jobs.  First, choosing latch modules: the upper NSEL variables of the
// applied cube go through a minterm generator, and select line k is high when
// minterm k of those variables lies inside the cube, so the cube reaches latch
// module k.  Second, the wide AND: the checker output is the AND of the 32
// latch modules' own eight-input ANDs, i.e. of all 256 latches.
//
// The design names these modules and their choosing role; putting the final
// AND in the same block is this design's choice.  Purely combinational.
module hart_and_module #(
  parameter int unsigned NSEL = 5
) (
  input  logic [NSEL-1:0][1:0]   cube_hi,   // parts x1..x_NSEL
  input  logic [(1<<NSEL)-1:0]   mod_all,   // all_one of each latch module
  output logic [(1<<NSEL)-1:0]   sel,
  output logic                   taut
);

  minterm_gen #(.N(NSEL)) u_mg (
    .cube (cube_hi),
    .line (sel)
  );

  and_part #(.W(1 << NSEL)) u_ap (
    .in      (mod_all),
    .all_one (taut)
  );

endmodule
