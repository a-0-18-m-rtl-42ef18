// tb_rfe_delay_slot: self-checking testbench of the RFE delay-slot tracker.
//
// Models a three-register pipeline (fetch->decode->execute->memory) with
// random per-stage stalls and occasional flushes. An RFE is put in decode
// at random; the testbench tags the instruction that is in fetch at that
// moment (the delay slot) and follows it through its own copy of the
// pipeline. `rfe` must be high exactly when the tagged instruction is in
// the memory stage. A directed run without stalls checks the three-advance
// latency.
module tb_rfe_delay_slot;

  logic clk = 1'b0;
  logic rst_n, rfe_decode, fetch_wen, decode_wen, ex_wen, pipeline_flush;
  logic ds_decode, ds_execute, rfe;
  logic t_d, t_e, t_m;  // tag carried by the model pipeline
  int   checks = 0, failures = 0, rfe_seen = 0;

  rfe_delay_slot dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  task automatic step(logic rd, logic fw, logic dw, logic ew, logic fl);
    rfe_decode = rd; fetch_wen = fw; decode_wen = dw; ex_wen = ew; pipeline_flush = fl;
    @(posedge clk);
    if (fl) {t_d, t_e, t_m} = '0;
    else begin
      if (ew) t_m = t_e;
      if (dw) t_e = t_d;
      if (fw) t_d = rd;
    end
    #1;
    check("ds_decode", ds_decode, t_d);
    check("ds_execute", ds_execute, t_e);
    check("rfe", rfe, t_m);
    if (rfe) rfe_seen++;
  endtask

  initial begin
    {rfe_decode, fetch_wen, decode_wen, ex_wen, pipeline_flush} = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    {t_d, t_e, t_m} = '0;
    // latency: RFE decoded, then three advances
    step(1, 1, 1, 1, 0);
    check("lat1", rfe, 1'b0);
    step(0, 1, 1, 1, 0);
    check("lat2", rfe, 1'b0);
    step(0, 1, 1, 1, 0);
    check("lat3 delay slot in memory stage", rfe, 1'b1);
    step(0, 1, 1, 1, 0);
    check("lat4 gone", rfe, 1'b0);
    for (int i = 0; i < 4000; i++) begin
      logic fw, dw, ew;
      // an in-order pipeline: a stage advances only if the one after it does
      ew = ($urandom() % 5) != 0;
      dw = ew && (($urandom() % 6) != 0);
      fw = dw && (($urandom() % 6) != 0);
      step(($urandom() % 6) == 0, fw, dw, ew, ($urandom() % 40) == 0);
    end
    if (rfe_seen == 0) begin
      failures++;
      $display("FAIL rfe never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
