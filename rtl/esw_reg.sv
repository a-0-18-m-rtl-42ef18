// esw_reg: the Exception Source Word (ESW) with its capture logic.
//
// Each of the ESW_BITS bits is a sticky flag naming one exception source.
// A hardware bit (HW_MASK bit = 1) is set whenever its hardware exception
// line hi_except[i] is high. A software bit (HW_MASK bit = 0) is set by a
// protected write to the Exception Set Register (esr_we) whose data bit i is
// 1. Any bit, hardware or software, is cleared by a protected write to the
// Exception Reset Register (err_we) whose data bit i is 1. ESR and ERR are
// write-only strobes, not storage. The separation of hardware-set and
// software-set bits and the ERR clear follow the published capture scheme;
// a clear and a set of the same bit in the same cycle resolve to clear
// (the clear is an explicit software acknowledgement), which is this
// design's choice. Hardware bits ignore ESR writes.
//
// esw_d is the value the register takes at the next rising clock edge; the
// detection logic uses it so that an exception raised this cycle is seen
// without waiting for it to be registered. Reset (rst_n low, synchronous to
// clk) clears every bit. Latency: a set or clear is visible on esw_q one
// cycle later and on esw_d in the same cycle.
module esw_reg
  import ehu_pkg::*;
#(
  parameter int unsigned         W       = ESW_BITS,
  parameter logic [W-1:0]        HW_MASK = W'(ESW_HW_MASK)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] hi_except,  // hardware exception lines
  input  logic         esr_we,     // protected write to ESR
  input  logic         err_we,     // protected write to ERR
  input  logic [W-1:0] wdata,      // protected write data
  output logic [W-1:0] esw_d,      // next value of the ESW
  output logic [W-1:0] esw_q       // current ESW
);

  logic [W-1:0] set_v, clr_v;

  always_comb begin
    set_v = (hi_except & HW_MASK) | ({W{esr_we}} & wdata & ~HW_MASK);
    clr_v = {W{err_we}} & wdata;
    esw_d = (esw_q | set_v) & ~clr_v;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) esw_q <= '0;
    else        esw_q <= esw_d;
  end

endmodule
