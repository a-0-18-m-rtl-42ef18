// tb_hw_exc_sources: self-checking testbench of the hardware exception map.
//
// Checks with directed cases that each hardware source lands on the ESW bit
// given by the published tables (typed in here as numbers), that WW/FP not
// available depend on the PSW enable bits, that the privileged violation
// needs user mode, that each lane flag of the eight wide-word units reaches
// its aggregated bit, and that no software bit is ever driven; then random
// stimulus against a reference model.
module tb_hw_exc_sources;
  import ehu_pkg::*;

  logic [31:0] psw, hi_except;
  logic        instr_valid, is_ww, is_fp, is_priv, is_syscall;
  logic        iacc_unmapped, iacc_invalid, dacc_unmapped, dacc_invalid;
  logic        pbuf_rx_int, pbuf_tx_int, timer_int, salu_ovf_dz;
  logic [7:0]  fp_dz, fp_ovf_unf, ww_int_ovf, fp_inexact_inv;
  int          checks = 0, failures = 0;

  hw_exc_sources dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic clear();
    psw = 32'h0000_000C;  // supervisor, WW and FP enabled
    {instr_valid, is_ww, is_fp, is_priv, is_syscall} = '0;
    {iacc_unmapped, iacc_invalid, dacc_unmapped, dacc_invalid} = '0;
    {pbuf_rx_int, pbuf_tx_int, timer_int, salu_ovf_dz} = '0;
    {fp_dz, fp_ovf_unf, ww_int_ovf, fp_inexact_inv} = '0;
  endtask

  function automatic logic [31:0] bitv(int b);
    return 32'd1 << b;
  endfunction

  function automatic logic [31:0] model();
    logic [31:0] m = '0;
    m[1] = iacc_unmapped; m[2] = iacc_invalid; m[3] = dacc_unmapped; m[4] = dacc_invalid;
    m[5] = pbuf_rx_int; m[6] = pbuf_tx_int; m[7] = timer_int;
    m[8] = instr_valid && is_ww && !psw[2];
    m[9] = instr_valid && is_fp && !psw[3];
    m[15] = fp_dz != 0; m[17] = fp_ovf_unf != 0;
    m[19] = instr_valid && is_syscall;
    m[20] = instr_valid && is_priv && psw[0];
    m[21] = salu_ovf_dz; m[22] = ww_int_ovf != 0; m[23] = fp_inexact_inv != 0;
    return m;
  endfunction

  initial begin
    clear(); #1 check("idle", hi_except, 0);
    clear(); iacc_unmapped = 1; #1 check("bit1", hi_except, bitv(1));
    clear(); iacc_invalid = 1;  #1 check("bit2", hi_except, bitv(2));
    clear(); dacc_unmapped = 1; #1 check("bit3", hi_except, bitv(3));
    clear(); dacc_invalid = 1;  #1 check("bit4", hi_except, bitv(4));
    clear(); pbuf_rx_int = 1;   #1 check("bit5", hi_except, bitv(5));
    clear(); pbuf_tx_int = 1;   #1 check("bit6", hi_except, bitv(6));
    clear(); timer_int = 1;     #1 check("bit7", hi_except, bitv(7));
    clear(); instr_valid = 1; is_ww = 1; #1 check("ww enabled", hi_except, 0);
    psw[2] = 0; #1 check("bit8 ww n/a", hi_except, bitv(8));
    clear(); instr_valid = 1; is_fp = 1; #1 check("fp enabled", hi_except, 0);
    psw[3] = 0; #1 check("bit9 fp n/a", hi_except, bitv(9));
    clear(); instr_valid = 1; is_priv = 1; #1 check("priv in supervisor", hi_except, 0);
    psw[0] = 1; #1 check("bit20 priv in user", hi_except, bitv(20));
    clear(); instr_valid = 1; is_syscall = 1; #1 check("bit19", hi_except, bitv(19));
    clear(); salu_ovf_dz = 1; #1 check("bit21", hi_except, bitv(21));
    for (int l = 0; l < 8; l++) begin
      clear(); fp_dz[l] = 1;          #1 check("bit15 lane", hi_except, bitv(15));
      clear(); fp_ovf_unf[l] = 1;     #1 check("bit17 lane", hi_except, bitv(17));
      clear(); ww_int_ovf[l] = 1;     #1 check("bit22 lane", hi_except, bitv(22));
      clear(); fp_inexact_inv[l] = 1; #1 check("bit23 lane", hi_except, bitv(23));
    end
    for (int i = 0; i < 3000; i++) begin
      psw = $urandom();
      {instr_valid, is_ww, is_fp, is_priv, is_syscall} = 5'($urandom());
      {iacc_unmapped, iacc_invalid, dacc_unmapped, dacc_invalid} = 4'($urandom() & $urandom());
      {pbuf_rx_int, pbuf_tx_int, timer_int, salu_ovf_dz} = 4'($urandom() & $urandom());
      fp_dz = 8'($urandom() & $urandom() & $urandom());
      fp_ovf_unf = 8'($urandom() & $urandom() & $urandom());
      ww_int_ovf = 8'($urandom() & $urandom() & $urandom());
      fp_inexact_inv = 8'($urandom() & $urandom() & $urandom());
      #1 check("random", hi_except, model());
      checks++;
      if ((hi_except & 32'hFF05_3C01) != 0) begin
        failures++;
        $display("FAIL software bit driven: %h", hi_except);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
