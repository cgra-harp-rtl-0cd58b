// tb_cgra_up: self-checking testbench of one processing unit.
// Drives random operations, operands, valid flags, enable, run and flush for
// 4000 cycles and compares the output register and its valid flag with an
// independent model after every edge. Also checks each operation once with
// fixed operands and the one-cycle latency.
module tb_cgra_up;
  import cgra_pkg::*;
  import cgra_tb_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, flush = 0, en = 0, a_valid = 0, b_valid = 0;
  logic [2:0] op = '0;
  word_t a = '0, b = '0, y;
  logic y_valid;
  int checks = 0, failures = 0;

  cgra_up dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  word_t mq; bit mv;
  bit ok;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check(y == 0 && !y_valid, "reset");
    // directed: every operation, fixed operands, one cycle latency
    for (int o = 0; o < 8; o++) begin
      @(negedge clk);
      op = 3'(o); a = 16'h1234; b = 16'h0F0F; a_valid = 1; b_valid = 1; en = 1; run = 1;
      @(posedge clk); #1;
      check(y == ref_op(o, 16'h1234, 16'h0F0F) && y_valid, $sformatf("directed op %0d", o));
    end
    begin word_t exp[8] = '{16'h1234, 16'h2143, 16'h0325, 16'h1D0C, 16'h0204, 16'h1F3F, 16'h1D3B, 16'hEDCB};
      // hand-computed values for a = 0x1234, b = 0x0F0F
      for (int o = 0; o < 8; o++) check(ref_op(o, 16'h1234, 16'h0F0F) == exp[o], $sformatf("model op %0d", o));
    end
    mq = y; mv = y_valid;
    // random
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      op = 3'($urandom); a = word_t'($urandom); b = word_t'($urandom);
      a_valid = ($urandom % 8) != 0; b_valid = ($urandom % 8) != 0;
      en = ($urandom % 6) != 0; run = ($urandom % 5) != 0; flush = ($urandom % 20) == 0;
      ok = a_valid && (b_valid || !ref_reads_b(int'(op)));
      if (flush) mv = 0;
      else if (run && en) begin
        mv = ok;
        if (ok) mq = ref_op(int'(op), a, b);
      end
      @(posedge clk); #1;
      check(y == mq && y_valid == mv, "random step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
