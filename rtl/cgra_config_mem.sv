// cgra_config_mem: configuration (program) memory of the CGRA.
//
// Holds DEPTH configuration words of CFG_W = 146 bits, each a complete setting
// of the array: UP operations and enables, the two extra I/O UP bits, both
// crossbars and the 16 operand multiplexers (layout: cgra_pkg::cfg_word_t).
// The host writes words through wr_en/wr_addr/wr_data at any time. Raising
// act_en for one cycle copies word act_addr into the active configuration
// register at the next edge; the datapath is driven only by that register, so
// the array is reconfigured between two clock cycles, without new synthesis.
//
// Timing: a write is stored at the next edge; an activation is visible on
// active one edge after act_en. A word written and activated in the same cycle
// activates the old content. Reset clears the active word (all UPs disabled);
// the memory array itself has no reset.
//
// From the architecture: a configuration memory storing the UP operations and
// interconnect settings, and the 146-bit word. Own choices: the depth, the
// ports and the separate active register.
module cgra_config_mem
  import cgra_pkg::*;
#(
  parameter int unsigned DEPTH = CFG_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [CFG_W-1:0]         wr_data,
  input  logic                     act_en,
  input  logic [$clog2(DEPTH)-1:0] act_addr,
  output cfg_word_t                active
);

  logic [CFG_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      active <= '0;
    else if (act_en) active <= cfg_word_t'(mem[act_addr]);
  end

  initial assert ($bits(cfg_word_t) == CFG_W)
    else $error("configuration word layout is %0d bits, expected %0d", $bits(cfg_word_t), CFG_W);

endmodule
