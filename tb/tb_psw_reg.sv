// tb_psw_reg: self-checking testbench of the Program Status Word.
//
// Checks the reset value (supervisor, exceptions disabled), that an
// exception clears only the mode and exception-enable bits and keeps the
// WW/FP enables, that handler completion restores the whole saved word
// from SSW, that a protected write stores its data, and the priority
// exception > completion > write, under random stimulus against a model.
module tb_psw_reg;
  import ehu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        exception, excep_finished, psw_wen;
  logic [31:0] wdata, ssw, psw, model;
  int          checks = 0, failures = 0;

  psw_reg dut (.*);

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
    exception = 0; excep_finished = 0; psw_wen = 0; wdata = '0; ssw = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset", psw, 32'h0);
    // user mode, exceptions, WW and FP enabled
    psw_wen = 1; wdata = 32'h0000_000F;
    @(posedge clk); #1 psw_wen = 0;
    check("write", psw, 32'h0000_000F);
    exception = 1;
    @(posedge clk); #1 exception = 0;
    check("exception: supervisor, disabled, units kept", psw, 32'h0000_000C);
    ssw = 32'h0000_000B; excep_finished = 1;
    @(posedge clk); #1 excep_finished = 0;
    check("restore from ssw", psw, 32'h0000_000B);
    model = psw;
    for (int i = 0; i < 4000; i++) begin
      exception = ($urandom() % 5) == 0;
      excep_finished = ($urandom() % 4) == 0;
      psw_wen = ($urandom() % 3) == 0;
      wdata = $urandom(); ssw = $urandom();
      @(posedge clk); #1;
      if (exception)           model = model & ~32'h3;
      else if (excep_finished) model = ssw;
      else if (psw_wen)        model = wdata;
      check("psw", psw, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
