// hart_host_if: host port of the 256-latch checker.
//
// The host computer reaches the checker through a byte-wide I/O port.  This
// block decodes that port into the checker's controls:
//   REG_CUBE0  (write) cube bits 7:0, parts x1..x4;
//   REG_CUBE1  (write) cube bits 15:8, parts x5..x8; the write also applies the
//              assembled cube to the checker in the next cycle;
//   REG_CMD    (write) bit 0 clear all latches, bit 1 configuration
//              (0 = 8 inputs/1 output, 1 = 6 inputs/4 outputs), bit 2 enable
//              the mask, bit 3 load the cube register into the mask;
//              bits 0 and 3 act once and are not stored;
//   REG_STATUS (read)  bit 0 tautology, bit 1 configuration, bit 2 mask enable.
// Reads of REG_CUBE0/1 and REG_CMD return what was written (commands read 0).
// The design only says that sub-problems travel over the host's I/O port
// through interface logic; the register map and timing here are this design's.
//
// Timing: wr, addr and wdata are sampled at the rising edge; apply, clr and
// mask_load are one-cycle pulses in the following cycle, with cube stable
// while apply is high; rdata is combinational from addr.
module hart_host_if
  import hart_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // host I/O port
  input  logic [2:0]                 addr,
  input  logic                       wr,
  input  logic [7:0]                 wdata,
  output logic [7:0]                 rdata,
  // checker side
  output logic [HART_N-1:0][1:0]     cube,
  output logic                       apply,
  output logic                       clr,
  output hart_mode_e                 mode,
  output logic                       mask_en,
  output logic                       mask_load,
  input  logic                       taut
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cube      <= '0;
      apply     <= 1'b0;
      clr       <= 1'b0;
      mode      <= MODE_8IN_1OUT;
      mask_en   <= 1'b0;
      mask_load <= 1'b0;
    end else begin
      apply     <= 1'b0;
      clr       <= 1'b0;
      mask_load <= 1'b0;
      if (wr) begin
        unique case (addr)
          REG_CUBE0: cube[3:0] <= wdata;
          REG_CUBE1: begin
            cube[7:4] <= wdata;
            apply     <= 1'b1;
          end
          REG_CMD: begin
            clr       <= wdata[CMD_CLEAR];
            mode      <= hart_mode_e'(wdata[CMD_MODE]);
            mask_en   <= wdata[CMD_MASK_EN];
            mask_load <= wdata[CMD_MASK_LOAD];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      REG_CUBE0:  rdata = cube[3:0];
      REG_CUBE1:  rdata = cube[7:4];
      REG_CMD:    rdata = {5'b0, mask_en, mode, 1'b0};
      REG_STATUS: rdata = {5'b0, mask_en, mode, taut};
      default:    rdata = 8'h00;
    endcase
  end

endmodule
