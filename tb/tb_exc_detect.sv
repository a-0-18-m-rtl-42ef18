// tb_exc_detect: self-checking testbench of exception detection and the
// handler-state flip-flop.
//
// Random ESW next/current values, masks, undefined-instruction flags, PSW
// enable, memory-stage valid and RFE strobes are applied for several
// thousand cycles; each output is compared with a reference model written
// from the behaviour: pending = any bit of (next | current) & mask, or an
// undefined instruction; detected = pending & enable; taken = detected,
// not in a handler, and a valid memory-stage instruction; finished = RFE
// while in a handler. Directed cases check masking, global disable,
// blocking while a handler runs and re-arming after completion.
module tb_exc_detect;
  import ehu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] esw_d, esw_q, emr;
  logic        undefined_instr, psw_exc_en, mem_valid, rfe;
  logic        excep_detected, exception, undef_taken, swvec_taken, excep_finished, in_handler;
  int          checks = 0, failures = 0;
  logic        m_in;

  exc_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
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

  task automatic step(logic [31:0] d, logic [31:0] q, logic [31:0] m, logic und,
                      logic en, logic v, logic r);
    logic pend, det, tak, fin;
    esw_d = d; esw_q = q; emr = m; undefined_instr = und; psw_exc_en = en;
    mem_valid = v; rfe = r;
    #1;
    pend = 1'b0;
    for (int b = 0; b < 32; b++) if ((d[b] || q[b]) && m[b]) pend = 1'b1;
    if (und) pend = 1'b1;
    det = pend && en;
    tak = det && !m_in && v;
    fin = r && m_in;
    check("in_handler", in_handler, m_in);
    check("excep_detected", excep_detected, det);
    check("exception", exception, tak);
    check("undef_taken", undef_taken, tak && und);
    check("swvec_taken", swvec_taken, tak && !und);
    check("excep_finished", excep_finished, fin);
    @(posedge clk);
    if (tak) m_in = 1'b1;
    else if (fin) m_in = 1'b0;
    #1;
  endtask

  initial begin
    esw_d = '0; esw_q = '0; emr = '0; undefined_instr = 0; psw_exc_en = 0;
    mem_valid = 0; rfe = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_in = 1'b0;
    // masked bit: not detected
    step(32'h80, 0, 32'h7F, 0, 1, 1, 0);
    check("masked", excep_detected, 1'b0);
    // enabled bit but global disable
    step(32'h80, 0, 32'h80, 0, 0, 1, 0);
    check("global disable", excep_detected, 1'b0);
    // pending in current value only, enabled: taken
    step(0, 32'h80, 32'h80, 0, 1, 1, 0);
    check("taken", in_handler, 1'b1);
    // while in the handler nothing more is taken
    step(0, 32'h80, 32'h80, 0, 1, 1, 0);
    check("blocked in handler", exception, 1'b0);
    // completion
    step(0, 32'h80, 32'h80, 0, 0, 1, 1);
    check("finished", in_handler, 1'b0);
    // undefined instruction, nothing in ESW
    step(0, 0, 0, 1, 1, 1, 0);
    check("undef in handler", in_handler, 1'b1);
    step(0, 0, 0, 0, 0, 1, 1);
    // random
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] d, q, m;
      d = ($urandom() % 4 == 0) ? (32'd1 << ($urandom() % 32)) : 32'd0;
      q = ($urandom() % 4 == 0) ? (32'd1 << ($urandom() % 32)) : 32'd0;
      m = $urandom() | $urandom();
      step(d, q, m, ($urandom() % 16) == 0, ($urandom() % 3) != 0, ($urandom() % 5) != 0,
           ($urandom() % 4) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
