// tb_pc_src_sel: self-checking testbench of flush and next-PC selection.
//
// Walks every combination of reset, undefined-instruction exception,
// software-vectored exception and RFE-in-decode with random branch and FADR
// values, and compares the select code, the flush and the next PC with the
// handler addresses typed in from the published vector table
// (0x08000000 reset, 0x08000100 undefined instruction, 0x08000200
// software-vectored).
module tb_pc_src_sel;
  import ehu_pkg::*;

  logic        rst_n, undef_taken, swvec_taken, rfe_decode, pipeline_flush;
  logic [31:0] branch_pc, fadr, next_pc;
  pc_src_e     pc_src;
  int          checks = 0, failures = 0;

  pc_src_sel dut (.*);

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
      $display("FAIL %s: got %h expected %h (rst_n=%b und=%b sw=%b rfe=%b)", what, got, exp,
               rst_n, undef_taken, swvec_taken, rfe_decode);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int c = 0; c < 16; c++) begin
        logic [31:0] exp_pc;
        logic [1:0]  exp_sel;
        logic        exp_flush;
        {rst_n, undef_taken, swvec_taken, rfe_decode} = 4'(c);
        // the unit never takes both kinds at once
        if (undef_taken && swvec_taken) continue;
        branch_pc = $urandom(); fadr = $urandom();
        #1;
        exp_flush = !rst_n || undef_taken || swvec_taken;
        if (!rst_n)           begin exp_sel = 2'b01; exp_pc = 32'h0800_0000; end
        else if (undef_taken) begin exp_sel = 2'b10; exp_pc = 32'h0800_0100; end
        else if (swvec_taken) begin exp_sel = 2'b11; exp_pc = 32'h0800_0200; end
        else                  begin exp_sel = 2'b00; exp_pc = branch_pc;    end
        if (rfe_decode && !exp_flush) exp_pc = fadr;
        check("pc_src", 32'(pc_src), 32'(exp_sel));
        check("flush", 32'(pipeline_flush), 32'(exp_flush));
        check("next_pc", next_pc, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
