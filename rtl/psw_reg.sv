// psw_reg: the Program Status Word.
//
// Fields (positions from ehu_pkg): mode (0 = supervisor, 1 = user), global
// exception enable (1 = enabled), wide-word unit enable and floating-point
// unit enable; the remaining bits are plain storage.
//
// Update priority, highest first:
//   exception       mode <- supervisor (0), exception enable <- 0; the other
//                   fields are kept, so the handler can read the WW/FP enable
//                   bits and skip saving unused register files.
//   excep_finished  the whole PSW is restored from SSW (end of the handler,
//                   when the RFE delay slot reaches the memory stage).
//   psw_wen         protected write of wdata (supervisor software).
// Forcing mode and enable on an exception and restoring from SSW on RFE
// follow the published description; restoring every field (not only mode
// and enable) follows the statement that the PSW returns to its saved
// value. The reset value RESET_VAL (supervisor, exceptions disabled, units
// disabled) is this design's choice. Registered on the rising clock edge,
// synchronous active-low reset.
module psw_reg
  import ehu_pkg::*;
#(
  parameter int unsigned    XW        = XLEN,
  parameter logic [XW-1:0]  RESET_VAL = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          exception,
  input  logic          excep_finished,
  input  logic          psw_wen,
  input  logic [XW-1:0] wdata,
  input  logic [XW-1:0] ssw,
  output logic [XW-1:0] psw
);

  logic [XW-1:0] psw_taken;

  always_comb begin
    psw_taken             = psw;
    psw_taken[PSW_MODE]   = 1'b0;
    psw_taken[PSW_EXC_EN] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)              psw <= RESET_VAL;
    else if (exception)      psw <= psw_taken;
    else if (excep_finished) psw <= ssw;
    else if (psw_wen)        psw <= wdata;
  end

endmodule
