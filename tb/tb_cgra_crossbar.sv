// tb_cgra_crossbar: self-checking testbench of the 8x16 crossbar.
// Random sources and selects; every destination must carry the selected
// source. Also checks a broadcast (all destinations take one source) and the
// identity-like pattern dst[d] = src[d % 8].
module tb_cgra_crossbar;
  localparam int NS = 8, ND = 16, W = 16, SW = 3;

  logic [NS-1:0][W-1:0]  src;
  logic [ND-1:0][SW-1:0] sel;
  logic [ND-1:0][W-1:0]  dst;
  int checks = 0, failures = 0;

  cgra_crossbar #(.N_SRC(NS), .N_DST(ND), .W(W)) dut (.*);

  initial begin
    #100000;
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

  initial begin
    for (int s = 0; s < NS; s++) src[s] = W'(16'hA000 + s * 16'h0111);
    for (int s = 0; s < NS; s++) begin
      for (int d = 0; d < ND; d++) sel[d] = SW'(s);
      #1;
      for (int d = 0; d < ND; d++) check(dst[d] == W'(16'hA000 + s * 16'h0111), "broadcast");
    end
    for (int d = 0; d < ND; d++) sel[d] = SW'(d % NS);
    #1;
    for (int d = 0; d < ND; d++) check(dst[d] == src[d % NS], "pattern");
    for (int n = 0; n < 500; n++) begin
      int pick[ND];
      for (int s = 0; s < NS; s++) src[s] = W'($urandom);
      for (int d = 0; d < ND; d++) begin pick[d] = $urandom % NS; sel[d] = SW'(pick[d]); end
      #1;
      for (int d = 0; d < ND; d++) check(dst[d] == src[pick[d]], "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
