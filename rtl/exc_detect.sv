// exc_detect: exception detection and handler-state tracking.
//
// Detection: the ESW's next value and its current value are ORed (so a bit
// being raised this cycle and a bit already pending both count), masked
// bit-wise by the Exception Mask Register (EMR), and the 32 results are ORed
// together with the undefined-instruction flag. If any is set while the PSW
// global exception-enable bit is high, excep_detected is raised. This
// structure follows the published detection circuit.
//
// Handler state: one flip-flop (in_handler) records that a handler is
// running. exception = excep_detected & ~in_handler & mem_valid is the
// single-cycle "take the exception now" strobe; it sets in_handler. While
// the handler runs, RFE (the RFE delay-slot instruction reaching the memory
// stage) raises excep_finished = RFE & in_handler, which clears in_handler.
// The published text says only that exceptions can be detected in a
// particular state, are disabled while a handler runs and are re-enabled
// by RFE; the set/clear form of the state flop and the mem_valid qualifier
// (an exception is only taken on a real instruction in the memory stage,
// whose address is then the faulting address) are this design's choices.
//
// undef_taken / swvec_taken split "exception" into the undefined-instruction
// and the software-vectored case, as the PC selection needs; an undefined
// instruction takes precedence. All outputs are combinational from the
// inputs and in_handler; in_handler is reset (rst_n low, synchronous) to 0.
module exc_detect
  import ehu_pkg::*;
#(
  parameter int unsigned W = ESW_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] esw_d,           // ESW input (next value)
  input  logic [W-1:0] esw_q,           // ESW output
  input  logic [W-1:0] emr,             // exception mask register, 1 = enabled
  input  logic         undefined_instr, // undefined instruction in memory stage
  input  logic         psw_exc_en,      // PSW global exception enable
  input  logic         mem_valid,       // memory stage holds a valid instruction
  input  logic         rfe,             // RFE delay slot in memory stage
  output logic         excep_detected,
  output logic         exception,       // exception taken this cycle
  output logic         undef_taken,     // ... and it is the undefined instruction
  output logic         swvec_taken,     // ... and it is software-vectored
  output logic         excep_finished,  // exception handling completion
  output logic         in_handler
);

  logic any_pending;

  always_comb begin
    any_pending    = (|((esw_d | esw_q) & emr)) | undefined_instr;
    excep_detected = any_pending & psw_exc_en;
    exception      = excep_detected & ~in_handler & mem_valid;
    undef_taken    = exception & undefined_instr;
    swvec_taken    = exception & ~undefined_instr;
    excep_finished = rfe & in_handler;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)              in_handler <= 1'b0;
    else if (exception)      in_handler <= 1'b1;
    else if (excep_finished) in_handler <= 1'b0;
  end

  // An exception is never taken while a handler runs, and taking one and
  // finishing one are exclusive.
  a_no_nested_take: assert property (@(posedge clk) disable iff (!rst_n)
                                     exception |-> !in_handler);
  a_take_xor_finish: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(exception && excep_finished));

endmodule
