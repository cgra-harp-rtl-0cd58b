// cgra_load_up: the data-loading UP (UP A).
//
// A UP whose operand a passes through one more multiplexer, in front of the
// ordinary operand multiplexer, that can replace it with the external input
// data stream. The extra configuration bit of this UP (load_ext) drives that
// multiplexer; with load_ext = 1 and operation PASS the UP loads one input word
// per advance step, and the input stream's valid flag becomes operand a's valid
// flag. With load_ext = 0 it behaves like any other UP.
//
// Timing: one cycle from in_data to y (the UP's output register).
//
// From the architecture: a dedicated loading UP with extra configuration bits
// and an extra multiplexer for external input data in front of UP A. Own
// choices: the meaning of the extra bit, the in_valid flag.
module cgra_load_up
  import cgra_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             flush,
  input  logic [OP_W-1:0]  op,
  input  logic             en,
  input  logic             load_ext,  // 1: operand a is the external input stream
  input  word_t            in_data,
  input  logic             in_valid,
  input  word_t            a,
  input  logic             a_valid,
  input  word_t            b,
  input  logic             b_valid,
  output word_t            y,
  output logic             y_valid
);

  word_t a_sel;
  logic  a_sel_valid;

  assign a_sel       = load_ext ? in_data  : a;
  assign a_sel_valid = load_ext ? in_valid : a_valid;

  cgra_up u_up (
    .clk, .rst_n, .run, .flush, .op, .en,
    .a(a_sel), .a_valid(a_sel_valid),
    .b, .b_valid,
    .y, .y_valid
  );

endmodule
