// fault_regs: the state-saving protected registers FADR, NFADR, SSW, MADR.
//
//   FADR  faulting instruction address: the memory-stage PC (pc_mem)
//   NFADR next-to-faulting instruction address: the execute-stage PC (pc_ex)
//   SSW   saved program status word: the PSW in force when the exception hit
//   MADR  faulting data memory address: the memory-stage data address
//
// Each register is written either by a protected register write (its *_wen
// strobe with wdata) or by the event that makes it meaningful. FADR, NFADR
// and SSW capture pc_mem, pc_ex and psw when `exception` is high, which has
// priority over a protected write in the same cycle. MADR captures mem_addr
// when the address translation flags an invalid (mem_addr_inv) or unmapped
// (mem_addr_unmpd) data access, whether or not that exception is masked.
// Choosing mem_addr on the fault flags, rather than on `exception`, is this
// design's choice; when the fault is the exception taken the two agree.
//
// NFADR exists for the branch delay slot: if the faulting instruction sits
// in a taken branch's delay slot, NFADR holds the branch target, and the
// handler, seeing NFADR != FADR + 4, resumes there after the delay slot.
//
// All registers update on the rising clock edge; rst_n (synchronous, active
// low) clears them.
module fault_regs
  import ehu_pkg::*;
#(
  parameter int unsigned XW = XLEN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          exception,
  input  logic [XW-1:0] wdata,
  input  logic          fadr_wen,
  input  logic          nfadr_wen,
  input  logic          ssw_wen,
  input  logic          madr_wen,
  input  logic [XW-1:0] pc_mem,
  input  logic [XW-1:0] pc_ex,
  input  logic [XW-1:0] psw,
  input  logic [XW-1:0] mem_addr,
  input  logic          mem_addr_inv,
  input  logic          mem_addr_unmpd,
  output logic [XW-1:0] fadr,
  output logic [XW-1:0] nfadr,
  output logic [XW-1:0] ssw,
  output logic [XW-1:0] madr
);

  logic mem_fault;
  assign mem_fault = mem_addr_inv | mem_addr_unmpd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fadr  <= '0;
      nfadr <= '0;
      ssw   <= '0;
      madr  <= '0;
    end else begin
      if (exception || fadr_wen)  fadr  <= exception ? pc_mem : wdata;
      if (exception || nfadr_wen) nfadr <= exception ? pc_ex  : wdata;
      if (exception || ssw_wen)   ssw   <= exception ? psw    : wdata;
      if (mem_fault || madr_wen)  madr  <= mem_fault ? mem_addr : wdata;
    end
  end

endmodule
