// cgra_const_array: the vector constants of the CGRA.
//
// N_CONST registers of DATA_W bits, written one at a time by the host
// (wr_en, wr_addr, wr_data) and read all at once by the constants crossbar.
// A write takes effect at the next clock edge, and constants may be rewritten
// while the array runs. Reset clears every constant to zero.
//
// From the architecture: an array of 8 constants of 16 bits that can serve as
// UP inputs. Own choices: the write port and the reset value.
module cgra_const_array
  import cgra_pkg::*;
#(
  parameter int unsigned N = N_CONST,
  parameter int unsigned W = DATA_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [$clog2(N)-1:0]   wr_addr,
  input  logic [W-1:0]           wr_data,
  output logic [N-1:0][W-1:0]    consts
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      consts <= '0;
    end else if (wr_en) begin
      consts[wr_addr] <= wr_data;
    end
  end

endmodule
