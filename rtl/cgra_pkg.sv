// cgra_pkg: shared sizes, operation codes and the configuration-word layout of
// the 8-UP, 16-bit word CGRA overlay.
//
// Sizes that follow the published architecture: 16-bit data words, 8 processing
// units (UP A..H), 16 UP operand inputs (two per UP), two 8x16 crossbars (one
// fed by the UP output registers, one by the 8 vector constants), 3 operation
// bits and 1 enable bit per UP, one extra bit for each of the two I/O UPs, and a
// 146-bit configuration word:
//   34 (UP bits) + 48 (UP crossbar) + 48 (constants crossbar) + 16 (operand muxes).
//
// Own choices (the architecture fixes only the bit counts, not their meaning or
// order): the operation encoding below, the field order in cfg_word_t, operand
// numbering (UP i uses inputs 2*i and 2*i+1), UP A as the loading UP and UP H as
// the writing UP, and the depth of the configuration memory.
package cgra_pkg;

  localparam int unsigned DATA_W     = 16;   // word width
  localparam int unsigned N_UP       = 8;    // UP A..H
  localparam int unsigned N_IN       = 2 * N_UP;  // UP operand inputs
  localparam int unsigned N_CONST    = 8;    // vector constants [0]..[7]
  localparam int unsigned SEL_W      = $clog2(N_UP);     // 3 bits per crossbar output
  localparam int unsigned OP_W       = 3;    // operation bits per UP
  localparam int unsigned LOAD_UP    = 0;    // UP A loads external input data
  localparam int unsigned STORE_UP   = N_UP - 1;  // UP H writes external output data
  localparam int unsigned CFG_W      = 146;  // configuration word width
  localparam int unsigned CFG_DEPTH  = 16;   // stored configuration words

  typedef logic [DATA_W-1:0] word_t;

  // UP operation, 3 bits.
  typedef enum logic [OP_W-1:0] {
    OP_PASS = 3'd0,  // y = a
    OP_ADD  = 3'd1,  // y = a + b
    OP_SUB  = 3'd2,  // y = a - b
    OP_MUL  = 3'd3,  // y = low 16 bits of a * b
    OP_AND  = 3'd4,  // y = a & b
    OP_OR   = 3'd5,  // y = a | b
    OP_XOR  = 3'd6,  // y = a ^ b
    OP_NOT  = 3'd7   // y = ~a
  } up_op_e;

  // Configuration word, most significant field first. Bit totals:
  //   src_const 16 + const_sel 48 + up_sel 48 + store_wr 1 + load_ext 1
  //   + up_en 8 + up_op 24 = 146.
  typedef struct packed {
    logic [N_IN-1:0]             src_const;  // operand mux: 1 = constants crossbar
    logic [N_IN-1:0][SEL_W-1:0]  const_sel;  // constants crossbar selects
    logic [N_IN-1:0][SEL_W-1:0]  up_sel;     // UP crossbar selects
    logic                        store_wr;   // writing UP drives the output stream
    logic                        load_ext;   // loading UP takes operand a from the input stream
    logic [N_UP-1:0]             up_en;      // UP output register enable
    logic [N_UP-1:0][OP_W-1:0]   up_op;      // UP operation
  } cfg_word_t;

  // Operations that read operand b (its validity then matters).
  function automatic logic op_uses_b(logic [OP_W-1:0] op);
    return !(op == OP_PASS || op == OP_NOT);
  endfunction

endpackage
