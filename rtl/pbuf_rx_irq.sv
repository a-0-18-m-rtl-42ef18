// pbuf_rx_irq: receive-interrupt generation of the parcel buffer (the
// network interface), feeding the PBuf Receive Interrupt ESW bit.
//
// rx_int is raised for one cycle when any of three published conditions
// holds:
//   - a received parcel is read (parcel_rd) with its interrupt bit set,
//   - a received parcel is read whose eid differs from the eid of the
//     reading process (proc_eid),
//   - reception of a new parcel has been blocked (rx_blocked high) for
//     BLOCK_CYCLES consecutive cycles; it fires once per blocked episode, on
//     the BLOCK_CYCLES-th blocked cycle, and rearms when rx_blocked falls.
// BLOCK_CYCLES = 1024 is the published figure. The eid width, the meaning
// of "blocked" as a single input level and the one-pulse-per-episode rule
// are this design's choices. The blocked-cycle counter saturates; it is
// reset (rst_n low, synchronous) to 0. rx_int is combinational from the
// inputs and the counter.
module pbuf_rx_irq #(
  parameter int unsigned BLOCK_CYCLES = 1024,
  parameter int unsigned EID_W        = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             parcel_rd,     // process reads a received parcel
  input  logic             parcel_int,    // interrupt bit of that parcel
  input  logic [EID_W-1:0] parcel_eid,
  input  logic [EID_W-1:0] proc_eid,
  input  logic             rx_blocked,    // reception of a new parcel is blocked
  output logic             rx_int,
  output logic             timeout_int    // the blocked-timeout cause alone
);

  localparam int unsigned CW = $clog2(BLOCK_CYCLES + 1);

  logic [CW-1:0] blk_cnt;  // blocked cycles so far, saturating at BLOCK_CYCLES

  always_comb begin
    timeout_int = rx_blocked && (blk_cnt == CW'(BLOCK_CYCLES - 1));
    rx_int      = (parcel_rd && (parcel_int || (parcel_eid != proc_eid))) || timeout_int;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !rx_blocked)                blk_cnt <= '0;
    else if (blk_cnt != CW'(BLOCK_CYCLES))    blk_cnt <= blk_cnt + 1'b1;
  end

endmodule
