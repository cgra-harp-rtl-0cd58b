// cgra_store_up: the data-writing UP (UP H).
//
// A UP whose output register also drives the external output data stream. Its
// extra configuration bit (store_wr) enables writing: out_valid pulses for one
// cycle each time the register captures a new valid result while store_wr = 1,
// and out_data is the register's value. The register keeps feeding the UP
// crossbar like any other UP.
//
// Timing: one cycle from operands to out_data/out_valid; one output word per
// cycle at most.
//
// From the architecture: a dedicated writing UP with extra configuration bits
// that drives the external output data. Own choices: the meaning of the extra
// bit and the out_valid pulse.
module cgra_store_up
  import cgra_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             flush,
  input  logic [OP_W-1:0]  op,
  input  logic             en,
  input  logic             store_wr,  // 1: drive the output stream
  input  word_t            a,
  input  logic             a_valid,
  input  word_t            b,
  input  logic             b_valid,
  output word_t            y,
  output logic             y_valid,
  output word_t            out_data,
  output logic             out_valid
);

  logic captured;  // register took a new valid result at the last edge

  cgra_up u_up (
    .clk, .rst_n, .run, .flush, .op, .en,
    .a, .a_valid, .b, .b_valid,
    .y, .y_valid
  );

  always_ff @(posedge clk) begin
    if (!rst_n || flush) captured <= 1'b0;
    else                 captured <= run && en && a_valid && (b_valid || !op_uses_b(op));
  end

  assign out_data  = y;
  assign out_valid = captured && store_wr;

endmodule
