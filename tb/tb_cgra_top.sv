// tb_cgra_top: end-to-end testbench of the CGRA at its default size.
// Acts as the host: stores two configuration words in the configuration
// memory, writes the vector constants, activates a configuration, streams
// data through the loading UP and reads the writing UP's output stream.
//   1. Fig. 4 graph y = a*x^2 + b*x + c (a, b, c = constants 0..2): a gapless
//      burst checks one result per cycle and the 5-cycle latency, then a long
//      stream with input gaps (bubbles) and array stalls (run = 0).
//   2. Run-time reconfiguration to y = (x + k3) * (x - k4) (latency 4).
//   3. A constant rewritten between two streams.
//   4. Reconfiguration with tokens in flight: they are discarded.
// Every result is compared with arithmetic done here; each mechanism is
// counted and must have happened at least once.
module tb_cgra_top;
  import cgra_pkg::*;
  import cgra_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_wr_en = 0, cfg_act_en = 0, const_wr_en = 0, run = 0, in_valid = 0;
  logic [3:0] cfg_wr_addr = '0, cfg_act_addr = '0;
  logic [CFG_W-1:0] cfg_wr_data = '0;
  logic [2:0] const_wr_addr = '0;
  word_t const_wr_data = '0, in_data = '0, out_data;
  logic out_valid;
  cfg_word_t active_cfg;
  word_t [N_UP-1:0] up_q;
  logic [N_UP-1:0] up_q_valid;

  cgra_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cfg_write = 0, n_activate = 0, n_const_write = 0, n_bubble = 0, n_stall = 0;
  int n_result = 0, n_flushed = 0, n_full_rate = 0;

  initial begin
    repeat (100000) @(posedge clk);
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

  // host-side shadow state
  word_t k[8];
  int    mode;          // 0: polynomial, 1: product
  int    latency;
  word_t exp_q[$];
  int    tin_q[$];
  int    run_cnt = 0;
  int    out_run = 0;   // consecutive outputs seen

  function automatic word_t golden(word_t x);
    if (mode == 0) return word_t'(k[0] * x * x + k[1] * x + k[2]);
    return word_t'((x + k[3]) * (x - k[4]));
  endfunction

  // One clock cycle of streaming: drive at negedge, book-keep at the edge,
  // check the output just after it.
  task automatic cycle(bit rn, bit iv, word_t d);
    @(negedge clk);
    run = rn; in_valid = iv; in_data = d;
    @(posedge clk);
    if (rn && iv) begin exp_q.push_back(golden(d)); tin_q.push_back(run_cnt); end
    if (!rn) n_stall++;
    if (rn && !iv) n_bubble++;
    if (rn) run_cnt++;
    #1;
    if (out_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        word_t e; int t0;
        e = exp_q.pop_front(); t0 = tin_q.pop_front();
        check(out_data == e, $sformatf("result (mode %0d)", mode));
        check(run_cnt - t0 == latency, "latency in advancing cycles");
        n_result++;
      end
      out_run++;
    end else out_run = 0;
    if (out_run >= 16) n_full_rate++;
  endtask

  task automatic drain();
    int guard = 0;
    while (exp_q.size() != 0 && guard < 50) begin cycle(1, 0, '0); guard++; end
    check(exp_q.size() == 0, "all results returned");
  endtask

  task automatic write_cfg(int addr, cfg_word_t w);
    @(negedge clk);
    cfg_wr_en = 1; cfg_wr_addr = 4'(addr); cfg_wr_data = w;
    @(negedge clk);
    cfg_wr_en = 0;
    n_cfg_write++;
  endtask

  task automatic write_const(int addr, word_t v);
    @(negedge clk);
    const_wr_en = 1; const_wr_addr = 3'(addr); const_wr_data = v;
    k[addr] = v;
    @(negedge clk);
    const_wr_en = 0;
    n_const_write++;
  endtask

  task automatic activate(int addr, int new_mode, int new_latency);
    @(negedge clk);
    cfg_act_en = 1; cfg_act_addr = 4'(addr); run = 1; in_valid = 0;
    @(posedge clk); #1;
    n_flushed += exp_q.size();
    exp_q.delete(); tin_q.delete();
    mode = new_mode; latency = new_latency;
    @(negedge clk);
    cfg_act_en = 0;
    n_activate++;
  endtask

  initial begin
    foreach (k[i]) k[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(!out_valid && active_cfg == '0, "idle after reset");

    write_cfg(0, cfg_poly());
    write_cfg(5, cfg_prod());
    write_const(0, 16'd3);
    write_const(1, 16'd5);
    write_const(2, 16'd7);
    write_const(3, 16'd11);
    write_const(4, 16'd2);

    // 1. polynomial
    activate(0, 0, 5);
    check(active_cfg == cfg_poly(), "configuration 0 active");
    for (int n = 0; n < 32; n++) cycle(1, 1, word_t'(n));
    drain();
    check(n_full_rate > 0, "one result per cycle in a gapless burst");
    for (int n = 0; n < 400; n++)
      cycle(($urandom % 5) != 0, ($urandom % 3) != 0, word_t'($urandom));
    drain();

    // 2. reconfigure at run time
    activate(5, 1, 4);
    check(active_cfg == cfg_prod(), "configuration 5 active");
    for (int n = 0; n < 300; n++)
      cycle(($urandom % 6) != 0, ($urandom % 4) != 0, word_t'($urandom));
    drain();

    // 3. new constant
    write_const(3, 16'hFFF0);
    for (int n = 0; n < 100; n++) cycle(1, ($urandom % 2) != 0, word_t'($urandom));
    drain();

    // 4. reconfigure with tokens in flight
    for (int n = 0; n < 3; n++) cycle(1, 1, word_t'(100 + n));
    activate(0, 0, 5);
    for (int n = 0; n < 10; n++) cycle(1, 0, '0);
    check(n_flushed > 0, "tokens in flight discarded");
    for (int n = 0; n < 50; n++) cycle(1, 1, word_t'($urandom));
    drain();

    check(n_cfg_write > 0, "configuration writes");
    check(n_activate >= 3, "reconfigurations");
    check(n_const_write > 5, "constant writes");
    check(n_bubble > 0, "input bubbles");
    check(n_stall > 0, "array stalls");
    check(n_result > 400, "results");
    $display("mechanisms: cfg_write=%0d activate=%0d const_write=%0d bubble=%0d stall=%0d flushed=%0d full_rate=%0d results=%0d",
             n_cfg_write, n_activate, n_const_write, n_bubble, n_stall, n_flushed, n_full_rate, n_result);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
