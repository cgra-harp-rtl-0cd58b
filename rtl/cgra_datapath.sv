// cgra_datapath: the reconfigurable array of 8 UPs and its interconnect.
//
// Structure (one configuration word drives all of it):
//   * 8 UPs, A..H, each with an output register. UP A is the loading UP (its
//     operand a can be the external input stream), UP H the writing UP (its
//     register drives the external output stream), UPs B..G are plain
//     arithmetic/logic UPs.
//   * UP crossbar, 8x16: any UP register onto any of the 16 UP operand inputs.
//     Operand input 2*i is operand a of UP i, input 2*i+1 its operand b.
//   * Constants crossbar, 8x16: any of the 8 vector constants onto any input.
//   * 16 operand multiplexers, one per input: UP crossbar or constants crossbar.
// Because every UP is registered and may read any UP register, a dataflow graph
// maps onto the array level by level: each graph level is one pipeline stage,
// and after the pipeline has filled one result leaves per cycle.
//
// Valid flags travel beside the data (the UP crossbar is 17 bits wide);
// constants are always valid. run advances the whole array by one step; with
// run = 0 every register holds. flush drops all tokens in flight.
//
// Timing: a word accepted on in_data appears at out_data after as many cycles
// as UPs on its path (including UP A and UP H).
//
// From the architecture: word size, UP count, both 8x16 crossbars, the operand
// multiplexers, the loading/writing UPs and the per-UP registers. Own choices:
// which UPs load and write, operand numbering, valid flags, run and flush.
module cgra_datapath
  import cgra_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic                    flush,
  input  cfg_word_t               cfg,
  input  word_t [N_CONST-1:0]     consts,
  input  word_t                   in_data,
  input  logic                    in_valid,
  output word_t                   out_data,
  output logic                    out_valid,
  output word_t [N_UP-1:0]        up_q,        // UP output registers (observation)
  output logic  [N_UP-1:0]        up_q_valid
);

  localparam int unsigned VW = DATA_W + 1;  // word plus valid flag

  logic [N_UP-1:0][VW-1:0]  up_tok;     // UP registers with valid flags
  logic [N_IN-1:0][VW-1:0]  up_net;     // UP crossbar outputs
  word_t [N_IN-1:0]         const_net;  // constants crossbar outputs
  word_t [N_IN-1:0]         opnd;       // operand multiplexer outputs
  logic  [N_IN-1:0]         opnd_valid;

  for (genvar i = 0; i < N_UP; i++) begin : g_tok
    assign up_tok[i] = {up_q_valid[i], up_q[i]};
  end

  cgra_crossbar #(.N_SRC(N_UP), .N_DST(N_IN), .W(VW)) u_up_xbar (
    .src(up_tok), .sel(cfg.up_sel), .dst(up_net)
  );

  cgra_crossbar #(.N_SRC(N_CONST), .N_DST(N_IN), .W(DATA_W)) u_const_xbar (
    .src(consts), .sel(cfg.const_sel), .dst(const_net)
  );

  always_comb begin
    for (int j = 0; j < N_IN; j++) begin
      if (cfg.src_const[j]) begin
        opnd[j]       = const_net[j];
        opnd_valid[j] = 1'b1;
      end else begin
        opnd[j]       = up_net[j][DATA_W-1:0];
        opnd_valid[j] = up_net[j][DATA_W];
      end
    end
  end

  for (genvar i = 0; i < N_UP; i++) begin : g_up
    if (i == LOAD_UP) begin : g_load
      cgra_load_up u_load (
        .clk, .rst_n, .run, .flush,
        .op(cfg.up_op[i]), .en(cfg.up_en[i]), .load_ext(cfg.load_ext),
        .in_data, .in_valid,
        .a(opnd[2*i]),   .a_valid(opnd_valid[2*i]),
        .b(opnd[2*i+1]), .b_valid(opnd_valid[2*i+1]),
        .y(up_q[i]), .y_valid(up_q_valid[i])
      );
    end else if (i == STORE_UP) begin : g_store
      cgra_store_up u_store (
        .clk, .rst_n, .run, .flush,
        .op(cfg.up_op[i]), .en(cfg.up_en[i]), .store_wr(cfg.store_wr),
        .a(opnd[2*i]),   .a_valid(opnd_valid[2*i]),
        .b(opnd[2*i+1]), .b_valid(opnd_valid[2*i+1]),
        .y(up_q[i]), .y_valid(up_q_valid[i]),
        .out_data, .out_valid
      );
    end else begin : g_alu
      cgra_up u_up (
        .clk, .rst_n, .run, .flush,
        .op(cfg.up_op[i]), .en(cfg.up_en[i]),
        .a(opnd[2*i]),   .a_valid(opnd_valid[2*i]),
        .b(opnd[2*i+1]), .b_valid(opnd_valid[2*i+1]),
        .y(up_q[i]), .y_valid(up_q_valid[i])
      );
    end
  end

endmodule
