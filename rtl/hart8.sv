// hart8: the 256-latch hardware tautology checker with its host port.
//
// Checks whether a sum-of-products expression of eight binary variables (or
// of six binary inputs and a four-valued output part) is 1 everywhere.  The
// host clears the latches, sends the expression cube by cube through the
// byte-wide port and reads the tautology bit.  Inside, the 256 latches are
// split into 32 latch modules of eight: the AND modules decode x1..x5 of each
// cube into one select line per latch module, the control module decodes the
// last four cube bits according to the configuration, and every latch module
// sets the latches of the minterms it holds.  Latch l of module k stands for
// minterm 8k + l, i.e. x1..x5 = k, x6 = l[2] and the lowest two bits are
// x7 x8 (8-input configuration) or the output number (6-in/4-out).
// With the mask enabled, the mask module restricts each cube to the mask cube
// first, so the result answers "is the mask cube contained in the expression".
//
// Following the design: 32 latch modules, AND modules that choose them, a
// control module for the two configurations and a mask module.  The host
// register map, the clocked latches and the one-cube-per-write rate are this
// design's choices.
//
// Timing: a write of REG_CUBE1 sampled at one rising edge puts its cube into
// the latches at the following rising edge; status shows it from then on.
module hart8
  import hart_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              addr,
  input  logic                    wr,
  input  logic [7:0]              wdata,
  output logic [7:0]              rdata,
  output logic                    taut,
  output logic [(1<<HART_N)-1:0]  latches
);

  localparam int unsigned NSEL = HART_N - LM_VARS;
  localparam int unsigned NMOD = 1 << NSEL;

  logic [HART_N-1:0][1:0] host_cube, mcube;
  logic                   host_apply, mapply, clr, mask_en, mask_load;
  hart_mode_e             mode;
  logic [3:0]             q;
  logic [NMOD-1:0]        sel, mod_all;

  hart_host_if u_host (
    .clk       (clk),
    .rst_n     (rst_n),
    .addr      (addr),
    .wr        (wr),
    .wdata     (wdata),
    .rdata     (rdata),
    .cube      (host_cube),
    .apply     (host_apply),
    .clr       (clr),
    .mode      (mode),
    .mask_en   (mask_en),
    .mask_load (mask_load),
    .taut      (taut)
  );

  hart_mask #(.N(HART_N)) u_mask (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .en        (mask_en),
    .load      (mask_load),
    .load_cube (host_cube),
    .in_valid  (host_apply),
    .in_cube   (host_cube),
    .out_valid (mapply),
    .out_cube  (mcube)
  );

  hart_ctrl u_ctrl (
    .mode (mode),
    .p7   (mcube[HART_N-2]),
    .p8   (mcube[HART_N-1]),
    .q    (q)
  );

  hart_and_module #(.NSEL(NSEL)) u_and (
    .cube_hi (mcube[NSEL-1:0]),
    .mod_all (mod_all),
    .sel     (sel),
    .taut    (taut)
  );

  for (genvar k = 0; k < NMOD; k++) begin : g_lm
    hart_latch_module u_lm (
      .clk     (clk),
      .rst_n   (rst_n),
      .clr     (clr),
      .apply   (mapply),
      .sel     (sel[k]),
      .p_hi    (mcube[NSEL]),
      .q       (q),
      .r       (latches[k*LM_LATCHES +: LM_LATCHES]),
      .all_one (mod_all[k])
    );
  end

endmodule
