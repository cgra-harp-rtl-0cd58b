// tb_cgra_config_mem: self-checking testbench of the configuration memory.
// Fills every entry with a distinct 146-bit word, activates entries in random
// order and checks that the active word equals the stored one one edge after
// act_en, holds otherwise, and that a write to the active entry does not
// change the active word until it is activated again.
module tb_cgra_config_mem;
  import cgra_pkg::*;

  localparam int D = CFG_DEPTH;

  logic clk = 0, rst_n = 0, wr_en = 0, act_en = 0;
  logic [$clog2(D)-1:0] wr_addr = '0, act_addr = '0;
  logic [CFG_W-1:0] wr_data = '0;
  cfg_word_t active;
  logic [CFG_W-1:0] shadow [D];
  logic [CFG_W-1:0] exp_active;
  int checks = 0, failures = 0;

  cgra_config_mem dut (.*);

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

  function automatic logic [CFG_W-1:0] rand_word();
    logic [CFG_W-1:0] w;
    for (int i = 0; i < CFG_W; i += 32) w[i +: 32] = $urandom;  // top part truncates
    return w;
  endfunction

  initial begin
    check($bits(active) == 146, "configuration word is 146 bits");
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(active == '0, "reset clears active word");
    exp_active = '0;
    for (int e = 0; e < D; e++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = $clog2(D)'(e); wr_data = rand_word();
      shadow[e] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    @(posedge clk); #1;
    check(active == '0, "writes alone do not activate");
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      act_en = ($urandom % 3) == 0; act_addr = $clog2(D)'($urandom);
      wr_en = ($urandom % 4) == 0; wr_addr = $clog2(D)'($urandom); wr_data = rand_word();
      if (act_en) exp_active = shadow[act_addr];   // old content if written now
      if (wr_en) shadow[wr_addr] = wr_data;
      @(posedge clk); #1;
      check(active == exp_active, "active word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
