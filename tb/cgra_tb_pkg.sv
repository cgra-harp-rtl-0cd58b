// cgra_tb_pkg: reference model and helpers shared by the CGRA testbenches.
//
// ref_op is an independent golden model of one UP operation. cgra_model is a
// cycle-level golden model of the whole datapath (UP registers, valid flags,
// crossbars, operand multiplexers, loading and writing UPs): call step() with
// the inputs sampled before a clock edge to get the state after that edge.
// Field helpers build configuration words from (UP, operand, source) choices.
package cgra_tb_pkg;
  import cgra_pkg::*;

  function automatic word_t ref_op(int op, word_t a, word_t b);
    int unsigned p;
    case (op)
      0: return a;
      1: return word_t'(a + b);
      2: return word_t'(a - b);
      3: begin p = int'(a) * int'(b); return word_t'(p & 32'hFFFF); end
      4: return a & b;
      5: return a | b;
      6: return a ^ b;
      default: return ~a;
    endcase
  endfunction

  function automatic bit ref_reads_b(int op);
    return !(op == 0 || op == 7);
  endfunction

  // Route operand input j (UP j/2, operand j%2) from UP register src.
  function automatic void route_up(inout cfg_word_t c, input int j, input int src);
    c.src_const[j] = 1'b0;
    c.up_sel[j]    = 3'(src);
  endfunction

  // Route operand input j from vector constant k.
  function automatic void route_const(inout cfg_word_t c, input int j, input int k);
    c.src_const[j] = 1'b1;
    c.const_sel[j] = 3'(k);
  endfunction

  function automatic void set_up(inout cfg_word_t c, input int u, input int op);
    c.up_en[u] = 1'b1;
    c.up_op[u] = 3'(op);
  endfunction


  // Fig. 4 graph, y = a*x*x + b*x + c, with a, b, c in constants 0, 1, 2.
  //   A: load x          B: x*x         C: x*b
  //   D: B*a             E: C+c         F: D+E        H: write F
  // Five UPs on every path, so the latency is 5 cycles.
  function automatic cfg_word_t cfg_poly();
    cfg_word_t c = '0;
    set_up(c, 0, 0); c.load_ext = 1'b1;              // A: PASS external input
    set_up(c, 1, 3); route_up(c, 2, 0);  route_up(c, 3, 0);     // B = A*A
    set_up(c, 2, 3); route_up(c, 4, 0);  route_const(c, 5, 1);  // C = A*b
    set_up(c, 3, 3); route_up(c, 6, 1);  route_const(c, 7, 0);  // D = B*a
    set_up(c, 4, 1); route_up(c, 8, 2);  route_const(c, 9, 2);  // E = C+c
    set_up(c, 5, 1); route_up(c, 10, 3); route_up(c, 11, 4);    // F = D+E
    set_up(c, 7, 0); route_up(c, 14, 5); c.store_wr = 1'b1;     // H = F
    return c;
  endfunction

  // A second graph, y = (x + k3) * (x - k4), latency 4.
  function automatic cfg_word_t cfg_prod();
    cfg_word_t c = '0;
    set_up(c, 0, 0); c.load_ext = 1'b1;
    set_up(c, 1, 1); route_up(c, 2, 0); route_const(c, 3, 3);   // B = A+k3
    set_up(c, 2, 2); route_up(c, 4, 0); route_const(c, 5, 4);   // C = A-k4
    set_up(c, 4, 3); route_up(c, 8, 1); route_up(c, 9, 2);      // E = B*C
    set_up(c, 7, 0); route_up(c, 14, 4); c.store_wr = 1'b1;     // H = E
    return c;
  endfunction

  class cgra_model;
    word_t q[8];
    bit    v[8];
    bit    out_valid;

    function void reset();
      foreach (q[i]) begin q[i] = '0; v[i] = 0; end
      out_valid = 0;
    endfunction

    // One clock edge.
    function void step(cfg_word_t c, word_t consts[8], bit run, bit flush,
                       word_t in_data, bit in_valid);
      word_t nq[8];
      bit    nv[8];
      bit    cap_store;
      word_t opd[16];
      bit    opv[16];
      for (int j = 0; j < 16; j++) begin
        if (c.src_const[j]) begin
          opd[j] = consts[c.const_sel[j]];
          opv[j] = 1;
        end else begin
          opd[j] = q[c.up_sel[j]];
          opv[j] = v[c.up_sel[j]];
        end
      end
      if (c.load_ext) begin
        opd[0] = in_data;
        opv[0] = in_valid;
      end
      cap_store = 0;
      for (int u = 0; u < 8; u++) begin
        bit ok;
        nq[u] = q[u];
        nv[u] = v[u];
        ok = opv[2*u] && (opv[2*u+1] || !ref_reads_b(int'(c.up_op[u])));
        if (flush) nv[u] = 0;
        else if (run && c.up_en[u]) begin
          nv[u] = ok;
          if (ok) nq[u] = ref_op(int'(c.up_op[u]), opd[2*u], opd[2*u+1]);
          if (u == 7) cap_store = ok;
        end
      end
      q = nq;
      v = nv;
      out_valid = cap_store && c.store_wr;
    endfunction
  endclass

endpackage
