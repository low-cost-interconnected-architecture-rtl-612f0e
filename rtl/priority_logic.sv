// priority_logic: one n x n fixed-priority block of the scheduler.
//
// When en is high, output has exactly one bit set: the lowest-numbered
// input that is high (in[0] has the highest priority, in[N-1] the lowest),
// or no bit when no input is high. When en is low the output is all zero.
// Purely combinational.
//
// The truth table (first set input wins, in[0] first) follows the
// document's table for this block; the enable input comes from the ring
// counter as in the scheduler diagram.
module priority_logic #(
  parameter int unsigned N = 4
) (
  input  logic         en,
  input  logic [N-1:0] in_i,
  output logic [N-1:0] out_o
);
  always_comb begin
    out_o = '0;
    if (en) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (in_i[i]) out_o = N'(1) << i;
      end
    end
  end
endmodule
