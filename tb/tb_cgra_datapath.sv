// tb_cgra_datapath: self-checking testbench of the UP array and interconnect.
// Runs the Fig. 4 graph (a*x^2 + b*x + c) on a stream and checks every result
// and the 5-cycle latency against arithmetic done here; then applies random
// configuration words (random operations, enables, crossbar selects, operand
// multiplexers) with random streams, stalls and flushes, and compares all UP
// registers, valid flags and the output stream with a cycle-level model after
// every edge.
module tb_cgra_datapath;
  import cgra_pkg::*;
  import cgra_tb_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, flush = 0, in_valid = 0;
  cfg_word_t cfg = '0;
  word_t [N_CONST-1:0] consts = '0;
  word_t in_data = '0, out_data;
  logic out_valid;
  word_t [N_UP-1:0] up_q;
  logic [N_UP-1:0] up_q_valid;
  int checks = 0, failures = 0;

  cgra_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  cgra_model m;
  word_t mc[8];
  word_t xs[$];
  int    t_in[$];
  int    cyc = 0;
  int    outs = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    m = new();
    m.reset();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // --- Fig. 4 graph, directed ---
    @(negedge clk);
    consts[0] = 16'd3; consts[1] = 16'd5; consts[2] = 16'd7;
    cfg = cfg_poly(); run = 1;
    fork
      begin
        for (int n = 0; n < 40; n++) begin
          @(negedge clk);
          in_valid = 1; in_data = word_t'(n * 37 + 1);
          xs.push_back(in_data); t_in.push_back(cyc);
        end
        @(negedge clk); in_valid = 0;
      end
      begin
        for (int g = 0; g < 200 && outs < 40; g++) begin
          @(posedge clk); #1;
          if (out_valid) begin
            word_t x; int t0; word_t exp;
            x = xs.pop_front(); t0 = t_in.pop_front();
            exp = word_t'(3 * x * x + 5 * x + 7);
            check(out_data == exp, "poly result");
            check(cyc - t0 == 5, "poly latency 5");
            outs++;
          end
        end
      end
    join
    check(outs == 40, "all poly results returned");
    // --- random configurations against the model ---
    @(negedge clk);
    flush = 1; in_valid = 0;
    @(posedge clk); #1;
    m.reset();
    for (int k = 0; k < 8; k++) m.q[k] = up_q[k];
    for (int r = 0; r < 60; r++) begin
      cfg_word_t c;
      logic [CFG_W-1:0] raw;
      for (int i = 0; i < CFG_W; i += 32) raw[i +: 32] = $urandom;
      c = cfg_word_t'(raw);
      c.up_en = c.up_en | 8'h81;
      if ($urandom % 4 != 0) c.load_ext = 1;
      @(negedge clk);
      cfg = c; flush = 1;
      for (int k = 0; k < 8; k++) begin consts[k] = word_t'($urandom); mc[k] = consts[k]; end
      for (int n = 0; n < 60; n++) begin
        if (n > 0) begin
          @(negedge clk);
          flush = ($urandom % 50) == 0;
        end
        run = ($urandom % 6) != 0;
        in_valid = ($urandom % 4) != 0; in_data = word_t'($urandom);
        m.step(c, mc, run, flush, in_data, in_valid);
        @(posedge clk); #1;
        for (int u = 0; u < 8; u++)
          check(up_q[u] == m.q[u] && up_q_valid[u] == m.v[u], $sformatf("UP %0d", u));
        check(out_valid == m.out_valid, "out_valid");
        if (out_valid) check(out_data == m.q[7], "out_data");
      end
      flush = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
