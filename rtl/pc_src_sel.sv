// pc_src_sel: pipeline flush and next program-counter selection.
//
// A two-bit select chooses among the normal next PC from the branch logic
// (00), the reset handler (01), the undefined-instruction handler (10) and
// the software-vectored handler (11), whose addresses are the fixed jump
// addresses RESET_JADR, UNDFND_JADR and SW_VEC_JADR. Select bit 0 is set by
// reset or a software-vectored exception, bit 1 by an undefined-instruction
// exception or a software-vectored exception, as in the published mux
// arrangement. Reset overrides the other two (this design's choice; both
// are also held off by the rest of the unit while reset is asserted).
//
// A second 2:1 stage replaces the result with FADR when an RFE instruction
// is in the decode stage (rfe_decode), so that the instruction fetched after
// the RFE delay slot is the faulting instruction. That stage is bypassed
// while the pipeline is being flushed, because a flush cancels the RFE in
// decode (this design's choice).
//
// pipeline_flush (reset, undefined instruction or software-vectored
// exception taken) tells the fetch, decode and execute stages to drop their
// instructions. Purely combinational.
module pc_src_sel
  import ehu_pkg::*;
#(
  parameter int unsigned XW = XLEN
) (
  input  logic          rst_n,
  input  logic          undef_taken,
  input  logic          swvec_taken,
  input  logic          rfe_decode,
  input  logic [XW-1:0] branch_pc,   // next PC from branch logic
  input  logic [XW-1:0] fadr,
  output pc_src_e       pc_src,
  output logic          pipeline_flush,
  output logic [XW-1:0] next_pc
);

  logic [XW-1:0] vec_pc;

  always_comb begin
    pipeline_flush = ~rst_n | undef_taken | swvec_taken;
    if (!rst_n) pc_src = PCSRC_RESET;
    else        pc_src = pc_src_e'({undef_taken | swvec_taken, swvec_taken});
    unique case (pc_src)
      PCSRC_BRANCH: vec_pc = branch_pc;
      PCSRC_RESET:  vec_pc = XW'(RESET_JADR);
      PCSRC_UNDEF:  vec_pc = XW'(UNDFND_JADR);
      PCSRC_SWVEC:  vec_pc = XW'(SW_VEC_JADR);
      default:      vec_pc = branch_pc;
    endcase
    next_pc = (rfe_decode && !pipeline_flush) ? fadr : vec_pc;
  end

endmodule
