// tb_pbuf_rx_irq: self-checking testbench of the parcel-buffer receive
// interrupt.
//
// Runs at the published 1024-cycle blocking threshold. Checks that reading
// a parcel with the interrupt bit, or with a foreign eid, raises the
// interrupt at once; that an ordinary parcel does not; that reception
// blocked for 1023 cycles does not and the 1024th blocked cycle does, once;
// and that the count restarts when blocking ends.
module tb_pbuf_rx_irq;

  logic       clk = 1'b0;
  logic       rst_n, parcel_rd, parcel_int, rx_blocked, rx_int, timeout_int;
  logic [7:0] parcel_eid, proc_eid;
  int         checks = 0, failures = 0;
  int         fired_at, n_fired;

  pbuf_rx_irq dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // hold rx_blocked for n cycles; return the blocked-cycle number (1-based)
  // at which rx_int was seen, and how many times
  task automatic block_for(int n);
    fired_at = 0; n_fired = 0;
    rx_blocked = 1;
    for (int c = 1; c <= n; c++) begin
      #1;
      if (rx_int) begin
        n_fired++;
        if (fired_at == 0) fired_at = c;
      end
      @(posedge clk); #1;
    end
    rx_blocked = 0;
  endtask

  initial begin
    parcel_rd = 0; parcel_int = 0; rx_blocked = 0; parcel_eid = 8'h11; proc_eid = 8'h11;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1 check("idle", rx_int, 0);
    parcel_rd = 1; #1 check("plain parcel", rx_int, 0);
    parcel_int = 1; #1 check("interrupt bit", rx_int, 1);
    parcel_int = 0; parcel_eid = 8'h12; #1 check("eid mismatch", rx_int, 1);
    parcel_rd = 0; #1 check("eid mismatch without read", rx_int, 0);
    parcel_eid = 8'h11;
    @(posedge clk); #1;
    block_for(1023);
    check("1023 blocked cycles: no interrupt", n_fired, 0);
    @(posedge clk); #1;
    block_for(3000);
    check("fires on blocked cycle", fired_at, 1024);
    check("fires once", n_fired, 1);
    @(posedge clk); #1;
    block_for(1500);
    check("rearmed after unblock", fired_at, 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
