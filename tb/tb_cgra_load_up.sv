// tb_cgra_load_up: self-checking testbench of the data-loading UP.
// With load_ext = 1 the UP must load the external input stream (and take its
// valid flag) instead of operand a; with load_ext = 0 it must act as a plain
// UP. Random stimulus for 3000 cycles, checked against an independent model.
module tb_cgra_load_up;
  import cgra_pkg::*;
  import cgra_tb_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, flush = 0, en = 0, load_ext = 0;
  logic in_valid = 0, a_valid = 0, b_valid = 0;
  logic [2:0] op = '0;
  word_t in_data = '0, a = '0, b = '0, y;
  logic y_valid;
  int checks = 0, failures = 0, loads = 0;

  cgra_load_up dut (.*);

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

  word_t mq = '0; bit mv = 0;
  word_t ea; bit eav, ok;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // directed: a pure load stream, one word per cycle, one cycle latency
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      op = 3'(OP_PASS); en = 1; run = 1; load_ext = 1; in_valid = 1;
      in_data = word_t'(16'h100 + n); a = 16'hDEAD; a_valid = 1; b_valid = 0;
      @(posedge clk); #1;
      check(y == word_t'(16'h100 + n) && y_valid, "stream load");
    end
    mq = y; mv = y_valid;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      op = 3'($urandom); a = word_t'($urandom); b = word_t'($urandom); in_data = word_t'($urandom);
      a_valid = ($urandom % 6) != 0; b_valid = ($urandom % 6) != 0; in_valid = ($urandom % 4) != 0;
      load_ext = $urandom % 2; en = ($urandom % 8) != 0; run = ($urandom % 6) != 0;
      flush = ($urandom % 25) == 0;
      ea  = load_ext ? in_data : a;
      eav = load_ext ? in_valid : a_valid;
      ok = eav && (b_valid || !ref_reads_b(int'(op)));
      if (flush) mv = 0;
      else if (run && en) begin
        mv = ok;
        if (ok) begin
          mq = ref_op(int'(op), ea, b);
          if (load_ext) loads++;
        end
      end
      @(posedge clk); #1;
      check(y == mq && y_valid == mv, "random step");
    end
    check(loads > 100, "external loads exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
