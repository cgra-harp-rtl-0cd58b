// cgra_up: one processing unit (UP) of the CGRA with its output register.
//
// The UP applies one of eight 16-bit word operations, chosen by its 3
// configuration bits (op), to its two operands a and b, and stores the result in
// its output register (REG A..H of the datapath). The 1 enable bit (en) of the
// configuration gates that register: a disabled UP holds its value.
//
// Each operand carries a valid flag so that a stream with gaps flows through the
// array correctly: when the array advances (run = 1) an enabled UP captures a
// new result only if every operand its operation reads is valid; otherwise it
// keeps its old value and marks it invalid. y_valid therefore says "the register
// holds a result produced in the latest advance step". flush clears y_valid
// (used when a new configuration is activated).
//
// Timing: one cycle from operands to y. Synchronous active-low reset clears the
// register and its valid flag.
//
// From the architecture: 16-bit words, 3 operation bits, 1 enable bit, a
// register after each UP. Own choices: the operation set and encoding
// (cgra_pkg::up_op_e), the valid flags, the run and flush inputs, the reset.
module cgra_up
  import cgra_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,      // array advance enable
  input  logic             flush,    // drop the token held in the register
  input  logic [OP_W-1:0]  op,
  input  logic             en,
  input  word_t            a,
  input  logic             a_valid,
  input  word_t            b,
  input  logic             b_valid,
  output word_t            y,
  output logic             y_valid
);

  word_t res;
  logic  ops_valid;

  always_comb begin
    unique case (up_op_e'(op))
      OP_PASS: res = a;
      OP_ADD:  res = a + b;
      OP_SUB:  res = a - b;
      OP_MUL:  res = a * b;   // low 16 bits of the product
      OP_AND:  res = a & b;
      OP_OR:   res = a | b;
      OP_XOR:  res = a ^ b;
      OP_NOT:  res = ~a;
      default: res = a;
    endcase
  end

  assign ops_valid = a_valid && (b_valid || !op_uses_b(op));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else if (flush) begin
      y_valid <= 1'b0;
    end else if (run && en) begin
      y_valid <= ops_valid;
      if (ops_valid) y <= res;
    end
  end

endmodule
