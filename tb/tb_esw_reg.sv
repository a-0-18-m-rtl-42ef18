// tb_esw_reg: self-checking testbench of the Exception Source Word.
//
// Drives random hardware exception lines and random protected ESR / ERR
// writes for a few thousand cycles and compares esw_d and esw_q every cycle
// with a reference model whose hardware-bit list is typed in from the
// published exception tables (bits 1-9, 15, 17, 19-23), independent of the
// package constant. Also checks directed cases: ESR cannot set a hardware
// bit, ERR clears any bit, and a clear beats a set in the same cycle.
module tb_esw_reg;
  import ehu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] hi_except, wdata, esw_d, esw_q;
  logic        esr_we, err_we;
  int          checks = 0, failures = 0;
  int          cycles = 0;

  localparam int HW_BITS[16] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 15, 17, 19, 20, 21, 22, 23};
  logic [31:0] hw_mask_ref, model;

  esw_reg dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_next(logic [31:0] cur, logic [31:0] hw, logic esr,
                                           logic err, logic [31:0] d);
    logic [31:0] n = cur;
    for (int b = 0; b < 32; b++) begin
      if (hw_mask_ref[b] && hw[b])              n[b] = 1'b1;
      if (!hw_mask_ref[b] && esr && d[b])       n[b] = 1'b1;
      if (err && d[b])                          n[b] = 1'b0;
    end
    return n;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic step(logic [31:0] hw, logic esr, logic err, logic [31:0] d);
    hi_except = hw; esr_we = esr; err_we = err; wdata = d;
    #1;
    check("esw_d", esw_d, ref_next(model, hw, esr, err, d));
    @(posedge clk);
    model = ref_next(model, hw, esr, err, d);
    #1;
    check("esw_q", esw_q, model);
  endtask

  initial begin
    hw_mask_ref = '0;
    foreach (HW_BITS[i]) hw_mask_ref[HW_BITS[i]] = 1'b1;
    hi_except = '0; esr_we = 0; err_we = 0; wdata = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model = '0;
    check("reset", esw_q, 32'h0);
    // ESR cannot set hardware bits, sets software ones
    step('0, 1, 0, 32'hFFFF_FFFF);
    check("esr sets only sw bits", esw_q, ~hw_mask_ref);
    // ERR clears everything
    step('0, 0, 1, 32'hFFFF_FFFF);
    check("err clears", esw_q, 32'h0);
    // hardware sets only hardware bits
    step(32'hFFFF_FFFF, 0, 0, '0);
    check("hw sets only hw bits", esw_q, hw_mask_ref);
    // clear and set of same bit in one cycle -> clear
    step(32'h0000_0008, 0, 1, 32'h0000_0008);
    check("clear beats set", esw_q[3], 1'b0);
    // bits stay set without the source (sticky)
    step(32'h0000_0080, 0, 0, '0);
    step('0, 0, 0, '0);
    check("sticky timer bit", esw_q[ESW_INTERVAL_TIMER], 1'b1);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] hw, d;
      hw = $urandom() & $urandom() & $urandom();
      d  = $urandom();
      step(hw, ($urandom() % 4) == 0, ($urandom() % 3) == 0, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
