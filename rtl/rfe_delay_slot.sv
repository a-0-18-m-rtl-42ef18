// rfe_delay_slot: tracks the delay-slot instruction of an RFE.
//
// RFE behaves like a branch with one delay slot. If the RFE itself ended the
// handler, a pending nested exception would be taken at once and flush its
// delay slot before it ran. Instead the delay-slot instruction is treated as
// the RFE: when RFE is decoded (rfe_decode), the instruction then in the
// fetch stage is marked, and the mark travels with it through decode and
// execute; when it reaches the memory stage the `rfe` output is high and the
// unit performs the completion actions (PSW restore, exceptions re-enabled).
// Only the PC redirect to FADR happens earlier, at RFE decode.
//
// The three mark flip-flops load on their stage's write enable, as the
// pipeline registers they sit beside do (fetch_wen moves fetch to decode,
// decode_wen decode to execute, ex_wen execute to memory). pipeline_flush
// clears them along with the instructions they describe (this design's
// choice), and rst_n (synchronous, active low) clears them. `rfe` is a
// registered output: it rises three stage-advances after rfe_decode.
module rfe_delay_slot (
  input  logic clk,
  input  logic rst_n,
  input  logic rfe_decode,      // RFE instruction in the decode stage
  input  logic fetch_wen,       // fetch -> decode register write enable
  input  logic decode_wen,      // decode -> execute register write enable
  input  logic ex_wen,          // execute -> memory register write enable
  input  logic pipeline_flush,
  output logic ds_decode,       // RFE delay slot is in the decode stage
  output logic ds_execute,      // ... in the execute stage
  output logic rfe              // ... in the memory stage
);

  always_ff @(posedge clk) begin
    if (!rst_n || pipeline_flush) begin
      ds_decode  <= 1'b0;
      ds_execute <= 1'b0;
      rfe        <= 1'b0;
    end else begin
      if (fetch_wen)  ds_decode  <= rfe_decode;
      if (decode_wen) ds_execute <= ds_decode;
      if (ex_wen)     rfe        <= ds_execute;
    end
  end

endmodule
