// cgra_top: CGRA overlay for a CPU+FPGA platform.
//
// A coarse-grained reconfigurable array that, once synthesized into the FPGA,
// is re-programmed at run time by writing configuration words instead of
// re-synthesizing. It holds:
//   * cgra_config_mem  - DEPTH stored 146-bit configuration words and the
//                        active word that drives the array;
//   * cgra_const_array - 8 vector constants of 16 bits;
//   * cgra_datapath    - 8 registered UPs, two 8x16 crossbars and the operand
//                        multiplexers.
// Host side (the platform's CPU link is not part of this RTL; its traffic is
// reduced to plain write strobes here):
//   cfg_wr_*  store a configuration word, cfg_act_* activate one,
//   const_wr_* write a constant.
// Streams: in_data/in_valid enter through UP A, out_data/out_valid leave from
// UP H; run = 0 freezes the array.
//
// Timing: activating a configuration takes one cycle and discards the tokens
// in flight (act_en flushes the array at the same edge). A mapped graph with L
// levels, counting the loading and writing UPs, returns the result for an input
// L cycles after accepting it, and accepts one input per cycle.
module cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned DEPTH = CFG_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration memory
  input  logic                     cfg_wr_en,
  input  logic [$clog2(DEPTH)-1:0] cfg_wr_addr,
  input  logic [CFG_W-1:0]         cfg_wr_data,
  input  logic                     cfg_act_en,
  input  logic [$clog2(DEPTH)-1:0] cfg_act_addr,
  // vector constants
  input  logic                     const_wr_en,
  input  logic [$clog2(N_CONST)-1:0] const_wr_addr,
  input  word_t                    const_wr_data,
  // streams
  input  logic                     run,
  input  word_t                    in_data,
  input  logic                     in_valid,
  output word_t                    out_data,
  output logic                     out_valid,
  // observation
  output cfg_word_t                active_cfg,
  output word_t [N_UP-1:0]         up_q,
  output logic  [N_UP-1:0]         up_q_valid
);

  word_t [N_CONST-1:0] consts;

  cgra_config_mem #(.DEPTH(DEPTH)) u_cfg (
    .clk, .rst_n,
    .wr_en(cfg_wr_en), .wr_addr(cfg_wr_addr), .wr_data(cfg_wr_data),
    .act_en(cfg_act_en), .act_addr(cfg_act_addr),
    .active(active_cfg)
  );

  cgra_const_array u_const (
    .clk, .rst_n,
    .wr_en(const_wr_en), .wr_addr(const_wr_addr), .wr_data(const_wr_data),
    .consts
  );

  cgra_datapath u_dp (
    .clk, .rst_n, .run,
    .flush(cfg_act_en),
    .cfg(active_cfg), .consts,
    .in_data, .in_valid,
    .out_data, .out_valid,
    .up_q, .up_q_valid
  );

endmodule
