// tb_cgra_store_up: self-checking testbench of the data-writing UP.
// Checks that out_valid pulses exactly once for every valid result captured
// while store_wr = 1, never otherwise, and that out_data follows the register.
module tb_cgra_store_up;
  import cgra_pkg::*;
  import cgra_tb_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, flush = 0, en = 0, store_wr = 0;
  logic a_valid = 0, b_valid = 0;
  logic [2:0] op = '0;
  word_t a = '0, b = '0, y, out_data;
  logic y_valid, out_valid;
  int checks = 0, failures = 0, writes = 0;

  cgra_store_up dut (.*);

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

  word_t mq = '0; bit mv = 0, mo = 0, ok;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(!out_valid, "no output after reset");
    // directed: write a + b for 8 cycles
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      op = 3'(OP_ADD); en = 1; run = 1; store_wr = 1;
      a = word_t'(n); b = 16'd1000; a_valid = 1; b_valid = 1;
      @(posedge clk); #1;
      check(out_valid && out_data == word_t'(1000 + n), "directed write");
    end
    @(negedge clk); run = 0;
    @(posedge clk); #1;
    check(!out_valid && out_data == 16'd1007, "hold when frozen");
    mq = y; mv = y_valid;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      op = 3'($urandom); a = word_t'($urandom); b = word_t'($urandom);
      a_valid = ($urandom % 5) != 0; b_valid = ($urandom % 5) != 0;
      en = ($urandom % 8) != 0; run = ($urandom % 5) != 0; store_wr = ($urandom % 4) != 0;
      flush = ($urandom % 30) == 0;
      ok = a_valid && (b_valid || !ref_reads_b(int'(op)));
      mo = 0;
      if (flush) mv = 0;
      else if (run && en) begin
        mv = ok;
        if (ok) mq = ref_op(int'(op), a, b);
        mo = ok;
      end
      @(posedge clk); #1;
      // store_wr is still applied after the edge
      check(y == mq && y_valid == mv && out_data == mq, "register");
      check(out_valid == (mo && store_wr), "out_valid");
      if (out_valid) writes++;
    end
    check(writes > 100, "writes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
