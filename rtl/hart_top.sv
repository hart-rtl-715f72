// hart_top: the tautology-checking hardware and the test-generation hardware.
//
// Three independent circuits side by side, each with its own ports:
//   h8_*  the 256-latch checker (eight variables, or six inputs with a
//         four-valued output part) behind a byte-wide host port;
//   h3_*  the basic three-variable checker: minterm generator, eight latches
//         and an eight-input AND, driven directly with positional cubes;
//   tg_*  the three-variable test-generation hardware, which reports the first
//         input vector that the applied cubes leave at zero.
// The host computer that decomposes large problems and drives the port is not
// part of this design.  All three share one clock and asynchronous reset.
module hart_top
  import hart_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  // 256-latch checker, host port
  input  logic [2:0]                   h8_addr,
  input  logic                         h8_wr,
  input  logic [7:0]                   h8_wdata,
  output logic [7:0]                   h8_rdata,
  output logic                         h8_taut,
  output logic [(1<<HART_N)-1:0]       h8_latches,
  // three-variable checker
  input  logic                         h3_clr,
  input  logic                         h3_apply,
  input  logic [LM_VARS-1:0][1:0]      h3_cube,
  output logic [LM_LATCHES-1:0]        h3_r,
  output logic                         h3_taut,
  // three-variable test generator
  input  logic                         tg_clr,
  input  logic                         tg_apply,
  input  logic [LM_VARS-1:0][1:0]      tg_cube,
  output logic [LM_LATCHES-1:0]        tg_y,
  output logic                         tg_t,
  output logic [LM_VARS-1:0]           tg_code
);

  hart8 u_hart8 (
    .clk     (clk),
    .rst_n   (rst_n),
    .addr    (h8_addr),
    .wr      (h8_wr),
    .wdata   (h8_wdata),
    .rdata   (h8_rdata),
    .taut    (h8_taut),
    .latches (h8_latches)
  );

  hart_basic #(.N(LM_VARS)) u_hart3 (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (h3_clr),
    .apply (h3_apply),
    .cube  (h3_cube),
    .r     (h3_r),
    .taut  (h3_taut)
  );

  tgen #(.N(LM_VARS)) u_tgen (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (tg_clr),
    .apply (tg_apply),
    .cube  (tg_cube),
    .y     (tg_y),
    .t     (tg_t),
    .code  (tg_code)
  );

endmodule
