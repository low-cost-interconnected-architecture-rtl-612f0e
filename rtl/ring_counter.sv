// ring_counter: n-bit one-hot ring counter that polls the scheduler's
// priority logic blocks.
//
// After reset the output is 0...01. On every following clock edge the
// single set bit moves one place towards the MSB and wraps from bit N-1
// back to bit 0 (for N = 4: 0001, 0010, 0100, 1000, 0001, ...). The counter
// free-runs; it does not wait for requests. Bit k of rc_o enables priority
// logic block k of the scheduler for that cycle.
//
// Follows the scheduler description: the reset value 0001 and a rotation
// once per clock cycle are given there. The reset is synchronous and
// active high, which is this design's own choice.
module ring_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  output logic [N-1:0] rc_o
);
  if (N == 1) begin : g_one
    always_ff @(posedge clk) rc_o <= 1'b1;
  end else begin : g_ring
    always_ff @(posedge clk) begin
      if (rst) rc_o <= N'(1);
      else     rc_o <= {rc_o[N-2:0], rc_o[N-1]};
    end
  end
endmodule
