// hart_pkg: shared types and constants of the hardware tautology checker (HART).
//
// A cube is written in positional notation: every binary variable x_i owns a
// two-bit "part" whose bit 0 is the literal x_i^0 (the complemented variable)
// and whose bit 1 is the literal x_i^1 (the true variable).  "01" (bit 1 set
// only) therefore stands for x_i, "10" for ~x_i and "11" for a missing
// variable.  Part 0 holds x1, part 1 holds x2, and so on; minterm numbers use
// x1 as their most significant bit, so latch r5 of a three-variable checker is
// the minterm x1 ~x2 x3.  The part layout and minterm numbering follow the
// three-variable example of the checker; the bit order inside a part and the
// byte layout of the host port are this design's choices.
package hart_pkg;

  // Configurations of the 256-latch checker (control module).
  typedef enum logic {
    MODE_8IN_1OUT = 1'b0,  // eight binary input parts
    MODE_6IN_4OUT = 1'b1   // six binary input parts and one four-valued output part
  } hart_mode_e;

  // Size of the assembled checker.
  localparam int unsigned HART_N     = 8;               // binary variables
  localparam int unsigned LM_VARS    = 3;               // variables decoded inside a latch module
  localparam int unsigned LM_LATCHES = 1 << LM_VARS;    // latches per latch module

  // Host port register map (byte-wide I/O port).
  localparam logic [2:0] REG_CUBE0  = 3'd0;  // cube bits  7:0 (parts x1..x4)
  localparam logic [2:0] REG_CUBE1  = 3'd1;  // cube bits 15:8 (parts x5..x8); writing it applies the cube
  localparam logic [2:0] REG_CMD    = 3'd2;  // command / configuration register
  localparam logic [2:0] REG_STATUS = 3'd3;  // read: status

  // Bits of the command register.
  localparam int unsigned CMD_CLEAR     = 0;  // reset every latch to zero (self-clearing)
  localparam int unsigned CMD_MODE      = 1;  // configuration: 0 = 8 in/1 out, 1 = 6 in/4 out
  localparam int unsigned CMD_MASK_EN   = 2;  // restrict every applied cube to the mask cube
  localparam int unsigned CMD_MASK_LOAD = 3;  // copy the cube register into the mask cube (self-clearing)

endpackage
