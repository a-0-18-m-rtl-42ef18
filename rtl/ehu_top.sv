// ehu_top: precise exception handling unit for a single-issue, in-order,
// five-stage pipeline (fetch, decode, execute, memory, write-back).
//
// Exceptions may arise in any of the first four stages but are recognised
// only in the memory stage, so every older instruction has completed and
// every younger one can be discarded. Three exceptions are vectored by
// hardware (reset, undefined instruction, and the common software-vectored
// entry); all other causes set a bit of the 32-bit Exception Source Word
// (ESW) and share the software-vectored handler, which reads the ESW and
// dispatches in software, choosing priorities itself.
//
// Blocks:
//   hw_exc_sources  maps hardware causes onto ESW bits (HI_Except)
//   pbuf_rx_irq     parcel-buffer receive interrupt (one of those causes)
//   esw_reg         the ESW; software bits set through ESR, any bit cleared
//                   through ERR
//   exc_detect      (ESW_next | ESW) & EMR, plus undefined instruction,
//                   gated by PSW exception enable; handler-state flip-flop
//   fault_regs      FADR, NFADR, SSW, MADR captured on exception / fault
//   psw_reg         PSW forced to supervisor/disabled on exception,
//                   restored from SSW when the handler completes
//   pc_src_sel      pipeline flush and handler / return PC selection
//   rfe_delay_slot  completion at the RFE delay slot, not at the RFE
// The EMR (exception mask register) is held here.
//
// Protected registers: a supervisor-mode write port (preg_we, preg_waddr,
// preg_wdata) writes ESR, ERR, EMR, PSW, SSW, FADR, NFADR and MADR; a
// separate read port (preg_raddr -> preg_rdata) is combinational and reads
// ESW, EMR, PSW, SSW, FADR, NFADR and MADR. Writes issued while the
// PSW says user mode are ignored (the decoder is expected to flag the
// instruction as privileged, raising ESW bit 20). The register address map
// and this gating are this design's choices; the set of registers is the
// published one.
//
// Timing: `exception` and `pipeline_flush` are combinational in the cycle
// the faulting instruction is in the memory stage; next_pc then carries the
// handler address, and FADR/NFADR/SSW/PSW update at the following edge.
// An RFE in decode redirects next_pc to FADR in that cycle; handler
// completion (excep_finished, PSW <- SSW) happens when the RFE's delay-slot
// instruction reaches the memory stage. rst_n is active low and synchronous;
// while it is low the PC source is the reset handler.
module ehu_top
  import ehu_pkg::*;
#(
  parameter int unsigned LANES        = 8,
  parameter int unsigned BLOCK_CYCLES = 1024,
  parameter int unsigned EID_W        = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // protected register port
  input  logic                preg_we,
  input  logic [3:0]          preg_waddr,
  input  logic [XLEN-1:0]     preg_wdata,
  input  logic [3:0]          preg_raddr,
  output logic [XLEN-1:0]     preg_rdata,
  // pipeline state
  input  logic [XLEN-1:0]     pc_mem,          // PC of the memory-stage instruction
  input  logic [XLEN-1:0]     pc_ex,           // PC of the execute-stage instruction
  input  logic                mem_valid,       // memory stage holds an instruction
  input  logic                undefined_instr, // memory-stage instruction is undefined
  input  logic                is_ww,
  input  logic                is_fp,
  input  logic                is_priv,
  input  logic                is_syscall,
  input  logic                rfe_decode,      // RFE in the decode stage
  input  logic                fetch_wen,
  input  logic                decode_wen,
  input  logic                ex_wen,
  input  logic [XLEN-1:0]     branch_pc,       // next PC from the branch logic
  // address translation
  input  logic [XLEN-1:0]     mem_addr,
  input  logic                iacc_unmapped,
  input  logic                iacc_invalid,
  input  logic                mem_addr_unmpd,  // unmapped data access
  input  logic                mem_addr_inv,    // invalid data access
  // other hardware exception sources
  input  logic                timer_int,
  input  logic                salu_ovf_dz,
  input  logic [LANES-1:0]    fp_dz,
  input  logic [LANES-1:0]    fp_ovf_unf,
  input  logic [LANES-1:0]    ww_int_ovf,
  input  logic [LANES-1:0]    fp_inexact_inv,
  // parcel buffer
  input  logic                parcel_rd,
  input  logic                parcel_int,
  input  logic [EID_W-1:0]    parcel_eid,
  input  logic [EID_W-1:0]    proc_eid,
  input  logic                rx_blocked,
  input  logic                pbuf_tx_int,     // route could not be generated
  // outputs to the pipeline
  output logic [XLEN-1:0]     next_pc,
  output pc_src_e             pc_src,
  output logic                pipeline_flush,
  output logic                excep_detected,  // enabled exception pending
  output logic                exception,
  output logic                excep_finished,
  output logic                in_handler,
  output logic                rfe,             // RFE delay slot in memory stage
  output logic [XLEN-1:0]     psw,
  output logic [ESW_BITS-1:0] esw
);

  logic                supervisor;
  logic                wr_esr, wr_err, wr_emr, wr_psw, wr_ssw, wr_fadr, wr_nfadr, wr_madr;
  logic [ESW_BITS-1:0] hi_except, esw_d, emr;
  logic [XLEN-1:0]     ssw, fadr, nfadr, madr;
  logic                pbuf_rx_int;
  logic                undef_taken, swvec_taken;

  // ---- protected register write decode ----
  always_comb begin
    supervisor = ~psw[PSW_MODE];
    wr_esr   = preg_we && supervisor && (preg_waddr == PREG_ESR);
    wr_err   = preg_we && supervisor && (preg_waddr == PREG_ERR);
    wr_emr   = preg_we && supervisor && (preg_waddr == PREG_EMR);
    wr_psw   = preg_we && supervisor && (preg_waddr == PREG_PSW);
    wr_ssw   = preg_we && supervisor && (preg_waddr == PREG_SSW);
    wr_fadr  = preg_we && supervisor && (preg_waddr == PREG_FADR);
    wr_nfadr = preg_we && supervisor && (preg_waddr == PREG_NFADR);
    wr_madr  = preg_we && supervisor && (preg_waddr == PREG_MADR);
  end

  // ---- exception mask register: all exceptions masked after reset ----
  always_ff @(posedge clk) begin
    if (!rst_n)      emr <= '0;
    else if (wr_emr) emr <= preg_wdata;
  end

  // ---- protected register read ----
  always_comb begin
    unique case (preg_raddr)
      PREG_ESW:   preg_rdata = esw;
      PREG_EMR:   preg_rdata = emr;
      PREG_PSW:   preg_rdata = psw;
      PREG_SSW:   preg_rdata = ssw;
      PREG_FADR:  preg_rdata = fadr;
      PREG_NFADR: preg_rdata = nfadr;
      PREG_MADR:  preg_rdata = madr;
      default:    preg_rdata = '0;  // ESR, ERR are write-only
    endcase
  end

  pbuf_rx_irq #(.BLOCK_CYCLES(BLOCK_CYCLES), .EID_W(EID_W)) u_pbuf_rx_irq (
    .clk, .rst_n, .parcel_rd, .parcel_int, .parcel_eid, .proc_eid, .rx_blocked,
    .rx_int(pbuf_rx_int), .timeout_int()
  );

  hw_exc_sources #(.LANES(LANES)) u_hw_exc_sources (
    .psw, .instr_valid(mem_valid), .is_ww, .is_fp, .is_priv, .is_syscall,
    .iacc_unmapped, .iacc_invalid,
    .dacc_unmapped(mem_addr_unmpd), .dacc_invalid(mem_addr_inv),
    .pbuf_rx_int, .pbuf_tx_int, .timer_int, .salu_ovf_dz,
    .fp_dz, .fp_ovf_unf, .ww_int_ovf, .fp_inexact_inv, .hi_except
  );

  esw_reg u_esw_reg (
    .clk, .rst_n, .hi_except, .esr_we(wr_esr), .err_we(wr_err), .wdata(preg_wdata),
    .esw_d, .esw_q(esw)
  );

  exc_detect u_exc_detect (
    .clk, .rst_n, .esw_d, .esw_q(esw), .emr, .undefined_instr(undefined_instr & mem_valid),
    .psw_exc_en(psw[PSW_EXC_EN]), .mem_valid, .rfe,
    .excep_detected, .exception, .undef_taken, .swvec_taken, .excep_finished, .in_handler
  );

  fault_regs u_fault_regs (
    .clk, .rst_n, .exception, .wdata(preg_wdata),
    .fadr_wen(wr_fadr), .nfadr_wen(wr_nfadr), .ssw_wen(wr_ssw), .madr_wen(wr_madr),
    .pc_mem, .pc_ex, .psw, .mem_addr, .mem_addr_inv, .mem_addr_unmpd,
    .fadr, .nfadr, .ssw, .madr
  );

  psw_reg u_psw_reg (
    .clk, .rst_n, .exception, .excep_finished, .psw_wen(wr_psw), .wdata(preg_wdata),
    .ssw, .psw
  );

  pc_src_sel u_pc_src_sel (
    .rst_n, .undef_taken, .swvec_taken, .rfe_decode, .branch_pc, .fadr,
    .pc_src, .pipeline_flush, .next_pc
  );

  rfe_delay_slot u_rfe_delay_slot (
    .clk, .rst_n, .rfe_decode, .fetch_wen, .decode_wen, .ex_wen, .pipeline_flush,
    .ds_decode(), .ds_execute(), .rfe
  );

endmodule
