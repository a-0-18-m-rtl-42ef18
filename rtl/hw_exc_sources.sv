// hw_exc_sources: builds the hardware exception vector (HI_Except) that
// feeds the hardware-set bits of the Exception Source Word.
//
// Every hardware exception line is placed at its ESW bit (see ehu_pkg):
//   - instruction/data access faults from address translation (bits 1-4),
//   - parcel-buffer receive and send interrupts (5, 6), interval timer (7),
//   - WW not available (8): a wide-word instruction while the PSW WW enable
//     bit is 0; FP not available (9): a floating-point instruction while the
//     PSW FP enable bit is 0,
//   - privileged instruction violation (20): a supervisor-only instruction
//     while the PSW mode bit says user,
//   - system call (19), scalar ALU overflow or divide by zero (21),
//   - FP divide by zero (15), FP overflow/underflow (17), WW integer ALU
//     overflow (22) and FP IEEE 754 inexact/invalid (23), each the OR of the
//     corresponding flag of the LANES 32-bit units of the wide-word datapath.
// The bit assignment, the PSW-enable and privilege conditions and the
// aggregation over the lanes follow the published description. The
// instruction-class inputs (is_ww, is_fp, is_priv, is_syscall) are assumed
// to come from the decoder, carried down the pipeline with the instruction
// and valid in the memory stage where exceptions are recognised.
// Software-initiated bits are left 0. Purely combinational.
module hw_exc_sources
  import ehu_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic [XLEN-1:0]     psw,
  input  logic                instr_valid,    // memory stage holds an instruction
  input  logic                is_ww,          // wide-word instruction
  input  logic                is_fp,          // floating-point instruction
  input  logic                is_priv,        // supervisor-only instruction
  input  logic                is_syscall,     // system call instruction
  input  logic                iacc_unmapped,
  input  logic                iacc_invalid,
  input  logic                dacc_unmapped,
  input  logic                dacc_invalid,
  input  logic                pbuf_rx_int,
  input  logic                pbuf_tx_int,
  input  logic                timer_int,
  input  logic                salu_ovf_dz,    // scalar ALU overflow or divide by zero
  input  logic [LANES-1:0]    fp_dz,
  input  logic [LANES-1:0]    fp_ovf_unf,
  input  logic [LANES-1:0]    ww_int_ovf,
  input  logic [LANES-1:0]    fp_inexact_inv,
  output logic [ESW_BITS-1:0] hi_except
);

  always_comb begin
    hi_except                     = '0;
    hi_except[ESW_UNMAPPED_IACC]  = iacc_unmapped;
    hi_except[ESW_INVALID_IACC]   = iacc_invalid;
    hi_except[ESW_UNMAPPED_DACC]  = dacc_unmapped;
    hi_except[ESW_INVALID_DACC]   = dacc_invalid;
    hi_except[ESW_PBUF_RX]        = pbuf_rx_int;
    hi_except[ESW_PBUF_TX]        = pbuf_tx_int;
    hi_except[ESW_INTERVAL_TIMER] = timer_int;
    hi_except[ESW_WW_NA]          = instr_valid & is_ww & ~psw[PSW_WW_EN];
    hi_except[ESW_FP_NA]          = instr_valid & is_fp & ~psw[PSW_FP_EN];
    hi_except[ESW_FP_DZ]          = |fp_dz;
    hi_except[ESW_FP_OVF_UNF]     = |fp_ovf_unf;
    hi_except[ESW_SYSCALL]        = instr_valid & is_syscall;
    hi_except[ESW_PRIV_VIOL]      = instr_valid & is_priv & psw[PSW_MODE];
    hi_except[ESW_SALU_OVF_DZ]    = salu_ovf_dz;
    hi_except[ESW_WW_INT_OVF]     = |ww_int_ovf;
    hi_except[ESW_FP_INEXACT_INV] = |fp_inexact_inv;
  end

endmodule
