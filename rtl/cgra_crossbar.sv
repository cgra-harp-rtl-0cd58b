// cgra_crossbar: full crossbar of N_SRC word sources onto N_DST destinations.
//
// Every destination has its own SEL_W-bit select field and may take any source;
// several destinations may take the same source. It is purely combinational.
// The CGRA uses it twice ("global interconnection network"): 8 UP output
// registers onto the 16 UP operand inputs, and 8 vector constants onto the same
// 16 inputs. With 16 destinations and 3 select bits each, one instance costs 48
// configuration bits, as in the architecture. The UP instance is built W = 17
// wide so that each word's valid flag travels with it.
module cgra_crossbar #(
  parameter int unsigned N_SRC = 8,
  parameter int unsigned N_DST = 16,
  parameter int unsigned W     = 16,
  parameter int unsigned SEL_W = $clog2(N_SRC)
) (
  input  logic [N_SRC-1:0][W-1:0]     src,
  input  logic [N_DST-1:0][SEL_W-1:0] sel,
  output logic [N_DST-1:0][W-1:0]     dst
);

  always_comb begin
    for (int d = 0; d < N_DST; d++) begin
      dst[d] = '0;
      for (int s = 0; s < N_SRC; s++) begin
        if (sel[d] == SEL_W'(s)) dst[d] = src[s];
      end
    end
  end

endmodule
