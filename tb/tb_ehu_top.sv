// tb_ehu_top: end-to-end test of the exception handling unit inside a
// behavioural five-stage pipeline, at the unit's default parameters.
//
// The testbench models an in-order, single-issue pipeline (fetch, decode,
// execute, memory, write-back) with branches resolved in decode and one
// delay slot, and a small program in a behavioural instruction store:
//   reset handler   0x08000000  enables exceptions, raises a software
//                               exception through ESR, drops to user mode
//   undefined       0x08000100  skips the undefined instruction
//   sw-vectored     0x08000200  reads the ESW, clears the most significant
//                               enabled pending bit through ERR, fixes the
//                               cause, chooses retry (FADR) or skip
//                               (FADR := NFADR), unmasks pending masked
//                               causes, and returns with RFE + delay slot
//   user program    0x00001000  a data access to an unmapped page, system
//                               calls (one in a taken branch's delay slot),
//                               an FP lane exception, a WW instruction with
//                               WW disabled, a privileged instruction, an
//                               undefined instruction, a masked timer
//                               interrupt, a parcel read with its interrupt
//                               bit set, and a wait loop ended by the
//                               parcel-buffer 1024-cycle receive timeout.
// Handler "instructions" act in write-back through the unit's protected
// register ports. The test checks that user instructions commit exactly
// once and in program order (precise exceptions: nothing lost, repeated or
// run past a fault), that user code runs in user mode with exceptions on
// and handler code in supervisor mode with them off, the captured FADR,
// NFADR, SSW and MADR, the handler vector of every exception, and counts
// each mechanism; one that never happened is a failure.
module tb_ehu_top;
  import ehu_pkg::*;

  typedef enum logic [4:0] {
    OP_NOP, OP_WR, OP_BR, OP_BRLOOP, OP_RFE, OP_DSLOT, OP_LOAD, OP_SYSCALL, OP_FPOP,
    OP_WWOP, OP_PRIV, OP_UNDEF, OP_HCLEAR, OP_HFIXRET, OP_HUNMASK, OP_HUNDEF, OP_END, OP_BAD
  } op_e;

  typedef struct packed {
    op_e         op;
    logic [3:0]  reg_a;   // protected register written by OP_WR
    logic [31:0] arg;     // write data or branch target
  } instr_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    instr_t      ins;
  } stage_t;

  localparam logic [31:0] USER    = 32'h0000_1000;
  localparam logic [31:0] PAGE    = 32'h4000_0000;
  localparam logic [31:0] PSW_USR = 32'h0000_000B;  // user, exc on, WW off, FP on

  // ---------------- DUT ----------------
  logic        clk = 1'b0;
  logic        rst_n;
  logic        preg_we;
  logic [3:0]  preg_waddr, preg_raddr;
  logic [31:0] preg_wdata, preg_rdata;
  logic [31:0] pc_mem, pc_ex, branch_pc, mem_addr;
  logic        mem_valid, undefined_instr, is_ww, is_fp, is_priv, is_syscall;
  logic        rfe_decode, fetch_wen, decode_wen, ex_wen;
  logic        iacc_unmapped, iacc_invalid, mem_addr_unmpd, mem_addr_inv;
  logic        timer_int, salu_ovf_dz;
  logic [7:0]  fp_dz, fp_ovf_unf, ww_int_ovf, fp_inexact_inv;
  logic        parcel_rd, parcel_int, rx_blocked, pbuf_tx_int;
  logic [7:0]  parcel_eid, proc_eid;
  logic [31:0] next_pc, psw, esw;
  pc_src_e     pc_src;
  logic        pipeline_flush, excep_detected, exception, excep_finished, in_handler, rfe;

  ehu_top dut (.*);

  always #50 clk = ~clk;  // long enough for the handler model's register reads

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0, cycle = 0;
  int n_reset_vec = 0, n_swvec = 0, n_undef = 0, n_flush_younger = 0, n_esr = 0,
      n_err_clear = 0, n_masked = 0, n_pending_after_rfe = 0, n_dslot = 0, n_handler_rfe = 0,
      n_discont = 0, n_madr = 0, n_ww_na = 0, n_priv = 0, n_fp_lane = 0, n_syscall = 0,
      n_pbuf_timeout = 0, n_psw_restore = 0, n_skip = 0, n_retry = 0, n_parcel_int = 0;
  logic parcel_sent = 1'b0, parcel_seen = 1'b0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (cycle %0d): got %h expected %h", what, cycle, got, exp);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    finish_tb();
  end

  // ---------------- program ----------------
  logic page_mapped = 1'b0;
  logic rx_done     = 1'b0;

  function automatic instr_t mk(op_e op, logic [3:0] r = 4'd0, logic [31:0] a = 32'd0);
    instr_t i;
    i.op = op; i.reg_a = r; i.arg = a;
    return i;
  endfunction

  function automatic instr_t prog(logic [31:0] pc);
    unique case (pc)
      // reset handler
      32'h0800_0000: return mk(OP_WR, PREG_EMR, ~(32'd1 << ESW_INTERVAL_TIMER));
      32'h0800_0004: return mk(OP_WR, PREG_PSW, 32'h0000_0002);   // supervisor, exc on
      32'h0800_0008: return mk(OP_WR, PREG_ESR, 32'd1 << ESW_CTX_SWAPPER);
      32'h0800_000C: return mk(OP_NOP);
      32'h0800_0010: return mk(OP_BR, 0, USER);
      32'h0800_0014: return mk(OP_WR, PREG_PSW, PSW_USR);         // delay slot
      // undefined-instruction handler
      32'h0800_0100: return mk(OP_HUNDEF);
      32'h0800_0104, 32'h0800_0108, 32'h0800_010C: return mk(OP_NOP);
      32'h0800_0110: return mk(OP_RFE);
      32'h0800_0114: return mk(OP_DSLOT);
      // software-vectored handler
      32'h0800_0200: return mk(OP_HCLEAR);
      32'h0800_0204: return mk(OP_HFIXRET);
      32'h0800_0208: return mk(OP_HUNMASK);
      32'h0800_020C, 32'h0800_0210, 32'h0800_0214: return mk(OP_NOP);
      32'h0800_0218: return mk(OP_RFE);
      32'h0800_021C: return mk(OP_DSLOT);
      // user program
      32'h0000_1000, 32'h0000_1004: return mk(OP_NOP);
      32'h0000_1008: return mk(OP_LOAD, 0, PAGE + 32'h10);
      32'h0000_100C: return mk(OP_SYSCALL);
      32'h0000_1010: return mk(OP_FPOP);
      32'h0000_1014: return mk(OP_WWOP);
      32'h0000_1018: return mk(OP_PRIV);
      32'h0000_101C: return mk(OP_UNDEF);
      32'h0000_1020: return mk(OP_BR, 0, 32'h0000_1100);
      32'h0000_1024: return mk(OP_SYSCALL);                      // in the delay slot
      32'h0000_1100, 32'h0000_1104: return mk(OP_NOP);
      32'h0000_1108: return mk(OP_SYSCALL);
      32'h0000_110C: return mk(OP_NOP);
      32'h0000_1110: return mk(OP_BRLOOP, 0, 32'h0000_1110);     // wait for parcel event
      32'h0000_1114: return mk(OP_NOP);
      32'h0000_1118: return mk(OP_END);
      default:       return mk(OP_BAD);
    endcase
  endfunction

  // expected user commit order, up to the wait loop
  localparam int NEXP = 8;
  localparam logic [31:0] EXP_TRACE[NEXP] = '{
    32'h1000, 32'h1004, 32'h1008, 32'h1014, 32'h1020, 32'h1100, 32'h1104, 32'h110C};
  int trace_idx = 0;

  // ---------------- pipeline state ----------------
  logic [31:0] f_pc;
  logic        f_valid;
  stage_t      d_s, e_s, m_s, w_s;
  // values sampled before the clock edge
  logic        s_flush, s_exc, s_undef_vec;
  logic [31:0] s_next_pc;
  // handler software state
  int          cur_cause;
  logic [31:0] exc_pc_mem, exc_pc_ex, exc_psw;
  logic        rx_armed = 1'b0;
  int          rx_block_cycles = 0;
  int          exc_rx_cycles = 0;
  int          last_finish_cycle = -10;
  int          timer_cycle = -1;
  logic        restore_pending = 1'b0;

  function automatic stage_t bubble();
    stage_t s;
    s = '0;
    s.ins.op = OP_NOP;
    return s;
  endfunction

  function automatic int top_bit(logic [31:0] v);
    for (int b = 31; b >= 0; b--) if (v[b]) return b;
    return -1;
  endfunction

  // read a protected register through the unit's read port
  task automatic rd(input preg_addr_e a, output logic [31:0] v);
    preg_raddr = a;
    #1;
    v = preg_rdata;
  endtask

  // write-back: architectural effects of the committing instruction
  task automatic writeback(stage_t w);
    logic [31:0] v, v2, r;
    preg_we = 1'b0;
    if (!w.valid) return;
    if (w.pc == 32'h0800_0000) n_reset_vec++;
    // privilege of the committing code
    if (w.pc < 32'h0800_0000) begin
      check("user code runs in user mode with exceptions on", 32'(psw[1:0]), 32'h3);
      if (trace_idx < NEXP) begin
        check("user commit order", w.pc, EXP_TRACE[trace_idx]);
        trace_idx++;
      end else if (w.pc != 32'h1110 && w.pc != 32'h1114 && w.pc != 32'h1118) begin
        check("user commit in wait loop", w.pc, 32'h1110);
      end
    end
    unique case (w.ins.op)
      OP_WR: begin
        preg_we = 1'b1; preg_waddr = w.ins.reg_a; preg_wdata = w.ins.arg;
        if (w.ins.reg_a == PREG_ESR) n_esr++;
      end
      OP_HCLEAR: begin
        check("handler in supervisor, exceptions off", 32'(psw[1:0]), 32'h0);
        check("handler state", 32'(in_handler), 32'h1);
        rd(PREG_FADR, r);  check("FADR = memory-stage PC", r, exc_pc_mem);
        rd(PREG_NFADR, r); check("NFADR = execute-stage PC", r, exc_pc_ex);
        rd(PREG_SSW, r);   check("SSW = PSW at exception", r, exc_psw);
        rd(PREG_ESW, v);
        rd(PREG_EMR, r);
        v = v & r;
        cur_cause = top_bit(v);
        if (cur_cause < 0) begin
          failures++;
          $display("FAIL sw-vectored handler entered with nothing pending (cycle %0d)", cycle);
        end else begin
          preg_we = 1'b1; preg_waddr = PREG_ERR; preg_wdata = 32'd1 << cur_cause;
          unique case (cur_cause)
            ESW_UNMAPPED_DACC: begin
              rd(PREG_MADR, r);
              check("MADR = faulting data address", r, PAGE + 32'h10);
              if (r == PAGE + 32'h10) n_madr++;
              page_mapped = 1'b1;
            end
            ESW_CTX_SWAPPER:    ;
            ESW_SYSCALL:        n_syscall++;
            ESW_FP_INEXACT_INV: n_fp_lane++;
            ESW_WW_NA:          n_ww_na++;
            ESW_PRIV_VIOL:      n_priv++;
            ESW_INTERVAL_TIMER: ;
            ESW_PBUF_RX: if (parcel_sent && !parcel_seen) begin
              // a parcel with its interrupt bit set was read
              parcel_seen = 1'b1;
              n_parcel_int++;
            end else begin
              // taken on the 1024th blocked cycle, or the next if the
              // memory stage held a bubble then
              checks++;
              if (exc_rx_cycles < 1024 || exc_rx_cycles > 1026) begin
                failures++;
                $display("FAIL receive timeout after %0d blocked cycles", exc_rx_cycles);
              end
              n_pbuf_timeout++;
              rx_done = 1'b1;
            end
            default: begin
              failures++;
              $display("FAIL unexpected cause %0d (cycle %0d)", cur_cause, cycle);
            end
          endcase
        end
      end
      OP_HFIXRET: begin
        checks++;
        rd(PREG_ESW, r);
        if (cur_cause >= 0 && r[cur_cause]) begin
          failures++;
          $display("FAIL ESW bit %0d not cleared by ERR", cur_cause);
        end else n_err_clear++;
        rd(PREG_FADR, v);
        rd(PREG_NFADR, v2);
        if (v2 != v + 32'd4) n_discont++;
        if (cur_cause == ESW_SYSCALL || cur_cause == ESW_PRIV_VIOL ||
            cur_cause == ESW_FP_INEXACT_INV) begin
          // the instruction is done by the handler: resume after it
          preg_we = 1'b1; preg_waddr = PREG_FADR; preg_wdata = v2;
          n_skip++;
        end else if (cur_cause == ESW_WW_NA) begin
          // grant the WW unit and retry
          rd(PREG_SSW, r);
          preg_we = 1'b1; preg_waddr = PREG_SSW; preg_wdata = r | (32'd1 << PSW_WW_EN);
          n_retry++;
        end else n_retry++;
      end
      OP_HUNMASK: begin
        rd(PREG_ESW, v);
        rd(PREG_EMR, r);
        v = v & ~r;
        if (v != 0) begin
          n_masked++;
          preg_we = 1'b1; preg_waddr = PREG_EMR; preg_wdata = 32'hFFFF_FFFF;
        end
      end
      OP_HUNDEF: begin
        check("undefined handler in supervisor", 32'(psw[1:0]), 32'h0);
        rd(PREG_FADR, r);  check("undefined: FADR", r, exc_pc_mem);
        rd(PREG_NFADR, r);
        preg_we = 1'b1; preg_waddr = PREG_FADR; preg_wdata = r;
        n_skip++;
      end
      OP_DSLOT: n_dslot++;
      OP_END: begin
        check("whole user trace committed", 32'(trace_idx), 32'(NEXP));
        check("ESW empty at end", esw, 32'h0);
        if (n_reset_vec == 0)        begin failures++; $display("FAIL never: reset vector"); end
        if (n_swvec == 0)            begin failures++; $display("FAIL never: sw-vectored exception"); end
        if (n_undef == 0)            begin failures++; $display("FAIL never: undefined instruction"); end
        if (n_flush_younger == 0)    begin failures++; $display("FAIL never: flush of younger instructions"); end
        if (n_esr == 0)              begin failures++; $display("FAIL never: ESR software exception"); end
        if (n_err_clear == 0)        begin failures++; $display("FAIL never: ERR clear"); end
        if (n_masked == 0)           begin failures++; $display("FAIL never: masked pending exception"); end
        if (n_pending_after_rfe == 0) begin failures++; $display("FAIL never: pending exception after RFE"); end
        if (n_dslot == 0 || n_dslot != n_handler_rfe)
                                     begin failures++; $display("FAIL RFE delay slots %0d vs RFEs %0d", n_dslot, n_handler_rfe); end
        if (n_discont == 0)          begin failures++; $display("FAIL never: FADR/NFADR discontinuity"); end
        if (n_madr == 0)             begin failures++; $display("FAIL never: MADR capture"); end
        if (n_ww_na == 0)            begin failures++; $display("FAIL never: WW not available"); end
        if (n_priv == 0)             begin failures++; $display("FAIL never: privileged violation"); end
        if (n_fp_lane == 0)          begin failures++; $display("FAIL never: FP lane exception"); end
        if (n_syscall == 0)          begin failures++; $display("FAIL never: system call"); end
        if (n_pbuf_timeout == 0)     begin failures++; $display("FAIL never: parcel receive timeout"); end
        if (n_parcel_int == 0)       begin failures++; $display("FAIL never: parcel interrupt bit"); end
        if (n_psw_restore == 0)      begin failures++; $display("FAIL never: PSW restore"); end
        $display("mechanisms: reset=%0d swvec=%0d undef=%0d flush=%0d esr=%0d err=%0d masked=%0d pend_after_rfe=%0d dslot=%0d discont=%0d madr=%0d ww_na=%0d priv=%0d fp_lane=%0d syscall=%0d pbuf_timeout=%0d parcel_int=%0d psw_restore=%0d skip=%0d retry=%0d",
                 n_reset_vec, n_swvec, n_undef, n_flush_younger, n_esr, n_err_clear, n_masked,
                 n_pending_after_rfe, n_dslot, n_discont, n_madr, n_ww_na, n_priv, n_fp_lane,
                 n_syscall, n_pbuf_timeout, n_parcel_int, n_psw_restore, n_skip, n_retry);
        finish_tb();
      end
      OP_BAD: begin
        failures++;
        $display("FAIL committed an instruction outside the program at %h", w.pc);
      end
      default: ;
    endcase
  endtask

  // ---------------- main loop ----------------
  initial begin
    rst_n = 1'b0;
    preg_we = 0; preg_waddr = '0; preg_wdata = '0; preg_raddr = '0;
    {iacc_unmapped, iacc_invalid, mem_addr_inv, salu_ovf_dz, pbuf_tx_int} = '0;
    {fp_dz, fp_ovf_unf, ww_int_ovf} = '0;
    parcel_rd = 0; parcel_int = 0; parcel_eid = 8'h5; proc_eid = 8'h5; rx_blocked = 0;
    timer_int = 0;
    fetch_wen = 1; decode_wen = 1; ex_wen = 1;
    f_pc = '0; f_valid = 1'b0;
    d_s = bubble(); e_s = bubble(); m_s = bubble(); w_s = bubble();
    forever begin
      @(negedge clk);
      cycle++;
      if (cycle == 3) rst_n = 1'b1;
      // ---- memory-stage inputs ----
      pc_mem          = m_s.pc;
      pc_ex           = e_s.pc;
      mem_valid       = m_s.valid;
      undefined_instr = m_s.valid && m_s.ins.op == OP_UNDEF;
      is_ww           = m_s.valid && m_s.ins.op == OP_WWOP;
      is_fp           = m_s.valid && m_s.ins.op == OP_FPOP;
      is_priv         = m_s.valid && (m_s.ins.op == OP_PRIV || m_s.ins.op == OP_WR);
      is_syscall      = m_s.valid && m_s.ins.op == OP_SYSCALL;
      mem_addr        = m_s.ins.arg;
      mem_addr_unmpd  = m_s.valid && m_s.ins.op == OP_LOAD && !page_mapped;
      fp_inexact_inv  = (m_s.valid && m_s.ins.op == OP_FPOP) ? 8'h20 : 8'h00;  // lane 5
      timer_int       = (cycle == timer_cycle);
      rx_blocked      = rx_armed && !rx_done;
      // one parcel with the interrupt bit, read while 0x1100 retires
      parcel_rd       = w_s.valid && w_s.pc == 32'h1100 && !parcel_sent;
      parcel_int      = parcel_rd;
      if (parcel_rd) parcel_sent = 1'b1;
      // ---- decode-stage inputs ----
      rfe_decode = d_s.valid && d_s.ins.op == OP_RFE;
      if (d_s.valid && d_s.ins.op == OP_BR)                    branch_pc = d_s.ins.arg;
      else if (d_s.valid && d_s.ins.op == OP_BRLOOP && !rx_done) branch_pc = d_s.ins.arg;
      else                                                     branch_pc = f_pc + 32'd4;
      // ---- write-back ----
      writeback(w_s);
      #1;
      // ---- sample the unit ----
      s_flush     = pipeline_flush;
      s_exc       = exception;
      s_undef_vec = (pc_src == PCSRC_UNDEF);
      s_next_pc   = next_pc;
      if (!rst_n) check("reset vector", next_pc, 32'h0800_0000);
      if (exception) begin
        exc_pc_mem = m_s.pc;
        exc_pc_ex  = e_s.pc;
        exc_psw    = psw;
        exc_rx_cycles = rx_block_cycles + (rx_blocked ? 1 : 0);  // this cycle included
        if (pc_src == PCSRC_UNDEF) begin
          n_undef++;
          check("undefined handler address", next_pc, 32'h0800_0100);
        end else begin
          n_swvec++;
          check("sw-vectored handler address", next_pc, 32'h0800_0200);
        end
        if (d_s.valid || e_s.valid) n_flush_younger++;
        if (cycle - last_finish_cycle <= 2) n_pending_after_rfe++;
      end
      if (excep_finished) begin
        last_finish_cycle = cycle;
        n_handler_rfe++;
        check("completion at RFE delay slot", 32'(m_s.ins.op), 32'(OP_DSLOT));
      end
      side_events();
      // ---- clock edge: advance the pipeline ----
      @(posedge clk);
      if (s_flush) begin
        w_s = (m_s.valid && !s_exc && rst_n) ? m_s : bubble();
        m_s = bubble(); e_s = bubble(); d_s = bubble();
        if (!rst_n) w_s = bubble();
      end else begin
        w_s = m_s; m_s = e_s; e_s = d_s;
        d_s.valid = f_valid; d_s.pc = f_pc; d_s.ins = prog(f_pc);
      end
      f_pc    = s_next_pc;
      f_valid = 1'b1;
    end
  end

  // masked timer: raise it when 0x1104 commits, and check it is not taken
  // while masked; arm the parcel wait when the loop first commits
  task automatic side_events();
    if (w_s.valid && w_s.pc == 32'h1104 && timer_cycle < 0) timer_cycle = cycle + 1;
    if (timer_cycle > 0 && cycle > timer_cycle && cycle < timer_cycle + 3) begin
      checks++;
      if (exception) begin
        failures++;
        $display("FAIL masked timer interrupt was taken");
      end
    end
    if (w_s.valid && w_s.pc == 32'h1110) rx_armed = 1'b1;
    if (rx_blocked) rx_block_cycles++;
    // one count per return to user mode: first user commit after completion
    if (excep_finished && exc_psw[PSW_MODE]) restore_pending = 1'b1;
    if (restore_pending && w_s.valid && w_s.pc < 32'h0800_0000 && psw[PSW_MODE]) begin
      n_psw_restore++;
      restore_pending = 1'b0;
    end
  endtask

endmodule
