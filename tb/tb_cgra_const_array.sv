// tb_cgra_const_array: self-checking testbench of the vector constants.
// Checks reset to zero, single writes landing in the addressed constant only,
// and random write sequences against a shadow copy.
module tb_cgra_const_array;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [2:0] wr_addr = '0;
  word_t wr_data = '0;
  word_t [N_CONST-1:0] consts;
  word_t shadow [N_CONST];
  int checks = 0, failures = 0;

  cgra_const_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  task automatic compare(string what);
    for (int k = 0; k < N_CONST; k++) check(consts[k] == shadow[k], what);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    foreach (shadow[k]) shadow[k] = '0;
    compare("reset");
    for (int k = 0; k < N_CONST; k++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 3'(k); wr_data = word_t'(16'h1000 * (k + 1) + 16'h0005);
      shadow[k] = wr_data;
      @(posedge clk); #1;
      compare("directed write");
    end
    @(negedge clk); wr_en = 0; wr_data = 16'hFFFF;
    @(posedge clk); #1;
    compare("no write");
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      wr_en = $urandom % 2; wr_addr = 3'($urandom); wr_data = word_t'($urandom);
      if (wr_en) shadow[wr_addr] = wr_data;
      @(posedge clk); #1;
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
