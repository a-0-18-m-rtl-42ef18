// ehu_pkg: shared constants and types of the precise exception handling unit.
//
// Holds the hardware-vectored handler addresses, the Exception Source Word
// (ESW) bit assignment of the memory-access, execution and communication
// exceptions, the Program Status Word (PSW) field positions and the address
// map of the protected (supervisor-only) registers.
//
// The handler addresses and every ESW bit number follow the published
// exception tables. The PSW bit positions and the protected register
// address map are not published; they are this design's own choice.
package ehu_pkg;

  localparam int unsigned XLEN     = 32;  // scalar datapath and register width
  localparam int unsigned ESW_BITS = 32;  // width of ESW, ESR, ERR and EMR

  // Hardware-vectored handler addresses.
  localparam logic [XLEN-1:0] RESET_JADR    = 32'h0800_0000;
  localparam logic [XLEN-1:0] UNDFND_JADR   = 32'h0800_0100;
  localparam logic [XLEN-1:0] SW_VEC_JADR   = 32'h0800_0200;

  // ESW bit numbers. Memory-access exceptions.
  localparam int unsigned ESW_UNMAPPED_IACC  = 1;
  localparam int unsigned ESW_INVALID_IACC   = 2;
  localparam int unsigned ESW_UNMAPPED_DACC  = 3;
  localparam int unsigned ESW_INVALID_DACC   = 4;
  localparam int unsigned ESW_ADDR_FIXUP     = 10;  // software
  // Communication exceptions.
  localparam int unsigned ESW_PBUF_RX        = 5;
  localparam int unsigned ESW_PBUF_TX        = 6;
  localparam int unsigned ESW_RX_PROCESSING  = 11;  // software
  localparam int unsigned ESW_TX_ERR_PROC    = 12;  // software
  // Execution exceptions.
  localparam int unsigned ESW_INTERVAL_TIMER = 7;
  localparam int unsigned ESW_WW_NA          = 8;
  localparam int unsigned ESW_FP_NA          = 9;
  localparam int unsigned ESW_FP_DZ          = 15;
  localparam int unsigned ESW_FP_OVF_UNF     = 17;
  localparam int unsigned ESW_CTX_SWAPPER    = 18;  // software
  localparam int unsigned ESW_SYSCALL        = 19;
  localparam int unsigned ESW_PRIV_VIOL      = 20;
  localparam int unsigned ESW_SALU_OVF_DZ    = 21;
  localparam int unsigned ESW_WW_INT_OVF     = 22;
  localparam int unsigned ESW_FP_INEXACT_INV = 23;
  localparam int unsigned ESW_INT_FIXUP      = 24;  // software
  localparam int unsigned ESW_WW_FIXUP       = 25;  // software
  localparam int unsigned ESW_FP_FIXUP       = 26;  // software
  localparam int unsigned ESW_LOCK_BUZZER    = 28;  // software
  localparam int unsigned ESW_THREAD_RESCHED = 29;  // software
  localparam int unsigned ESW_THREAD_DISP    = 30;  // software
  localparam int unsigned ESW_RET_USER       = 31;  // software

  // ESW bits whose initiator is hardware (1) rather than software (0).
  // Bits absent from the tables are software bits reserved for the kernel.
  localparam logic [ESW_BITS-1:0] ESW_HW_MASK =
      (32'd1 << ESW_UNMAPPED_IACC)  | (32'd1 << ESW_INVALID_IACC)   |
      (32'd1 << ESW_UNMAPPED_DACC)  | (32'd1 << ESW_INVALID_DACC)   |
      (32'd1 << ESW_PBUF_RX)        | (32'd1 << ESW_PBUF_TX)        |
      (32'd1 << ESW_INTERVAL_TIMER) | (32'd1 << ESW_WW_NA)          |
      (32'd1 << ESW_FP_NA)          | (32'd1 << ESW_FP_DZ)          |
      (32'd1 << ESW_FP_OVF_UNF)     | (32'd1 << ESW_SYSCALL)        |
      (32'd1 << ESW_PRIV_VIOL)      | (32'd1 << ESW_SALU_OVF_DZ)    |
      (32'd1 << ESW_WW_INT_OVF)     | (32'd1 << ESW_FP_INEXACT_INV);

  // PSW fields (positions are this design's choice).
  localparam int unsigned PSW_MODE   = 0;  // 0 = supervisor, 1 = user (active-low supervisor)
  localparam int unsigned PSW_EXC_EN = 1;  // global exception enable, active high
  localparam int unsigned PSW_WW_EN  = 2;  // wide-word unit enabled
  localparam int unsigned PSW_FP_EN  = 3;  // floating-point unit enabled

  // Protected register addresses (this design's choice).
  typedef enum logic [3:0] {
    PREG_ESW   = 4'd0,  // read: exception source word
    PREG_ESR   = 4'd1,  // write: set software ESW bits whose data bit is 1
    PREG_ERR   = 4'd2,  // write: clear ESW bits whose data bit is 1
    PREG_EMR   = 4'd3,  // exception mask register
    PREG_PSW   = 4'd4,
    PREG_SSW   = 4'd5,
    PREG_FADR  = 4'd6,
    PREG_NFADR = 4'd7,
    PREG_MADR  = 4'd8
  } preg_addr_e;

  // Next-PC source selection (two-bit select of the handler address mux).
  typedef enum logic [1:0] {
    PCSRC_BRANCH = 2'b00,
    PCSRC_RESET  = 2'b01,
    PCSRC_UNDEF  = 2'b10,
    PCSRC_SWVEC  = 2'b11
  } pc_src_e;

endpackage
