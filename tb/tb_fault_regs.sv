// tb_fault_regs: self-checking testbench of FADR, NFADR, SSW and MADR.
//
// Random protected writes, exceptions and data-access faults are applied;
// after every clock edge the four registers are compared with a reference
// model: on an exception FADR/NFADR/SSW take the memory-stage PC, the
// execute-stage PC and the PSW (over any protected write); on an invalid
// or unmapped data access MADR takes the data address; otherwise a
// protected write stores the write data and the registers hold.
module tb_fault_regs;
  import ehu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        exception, fadr_wen, nfadr_wen, ssw_wen, madr_wen, mem_addr_inv, mem_addr_unmpd;
  logic [31:0] wdata, pc_mem, pc_ex, psw, mem_addr, fadr, nfadr, ssw, madr;
  logic [31:0] m_fadr, m_nfadr, m_ssw, m_madr;
  int          checks = 0, failures = 0;

  fault_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    {exception, fadr_wen, nfadr_wen, ssw_wen, madr_wen, mem_addr_inv, mem_addr_unmpd} = '0;
    wdata = '0; pc_mem = '0; pc_ex = '0; psw = '0; mem_addr = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    {m_fadr, m_nfadr, m_ssw, m_madr} = '0;
    check("reset fadr", fadr, 0);
    // directed: exception captures the PCs and PSW
    pc_mem = 32'h0000_1000; pc_ex = 32'h0000_2000; psw = 32'h0000_000F; exception = 1;
    fadr_wen = 1; wdata = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    check("fadr on exception", fadr, 32'h0000_1000);
    check("nfadr on exception", nfadr, 32'h0000_2000);
    check("ssw on exception", ssw, 32'h0000_000F);
    exception = 0; fadr_wen = 0;
    {m_fadr, m_nfadr, m_ssw} = {32'h0000_1000, 32'h0000_2000, 32'h0000_000F};
    // directed: unmapped data access captures mem_addr
    mem_addr = 32'h1234_5678; mem_addr_unmpd = 1;
    @(posedge clk); #1;
    check("madr on fault", madr, 32'h1234_5678);
    m_madr = 32'h1234_5678;
    mem_addr_unmpd = 0;
    for (int i = 0; i < 4000; i++) begin
      logic fault;
      exception = ($urandom() % 6) == 0;
      fadr_wen = ($urandom() % 5) == 0; nfadr_wen = ($urandom() % 5) == 0;
      ssw_wen = ($urandom() % 5) == 0;  madr_wen = ($urandom() % 5) == 0;
      mem_addr_inv = ($urandom() % 8) == 0; mem_addr_unmpd = ($urandom() % 8) == 0;
      wdata = $urandom(); pc_mem = $urandom(); pc_ex = $urandom(); psw = $urandom();
      mem_addr = $urandom();
      fault = mem_addr_inv || mem_addr_unmpd;
      @(posedge clk); #1;
      if (exception)      m_fadr = pc_mem;   else if (fadr_wen)  m_fadr = wdata;
      if (exception)      m_nfadr = pc_ex;   else if (nfadr_wen) m_nfadr = wdata;
      if (exception)      m_ssw = psw;       else if (ssw_wen)   m_ssw = wdata;
      if (fault)          m_madr = mem_addr; else if (madr_wen)  m_madr = wdata;
      check("fadr", fadr, m_fadr);
      check("nfadr", nfadr, m_nfadr);
      check("ssw", ssw, m_ssw);
      check("madr", madr, m_madr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
