// scheduler: n x n arbiter of the LCIA router.
//
// It grants at most one of N requesters per cycle. Two ideas are combined:
//  * Polling. A ring counter enables one of N fixed-priority blocks per
//    cycle. Block k sees the requests rotated by k (its in[i] is request
//    (k+i) mod N), so in that cycle request k has the highest priority,
//    k+1 the next, and so on. Idle requesters are skipped at once, unlike a
//    plain round-robin arbiter that spends a cycle on each port.
//  * Shielding. The grant of the previous cycle is held in a D flip-flop
//    (the "NOT_N" block), inverted and ANDed with the requests (the
//    "AND_N" block, whose output is and_y). A port granted in cycle t
//    cannot be granted in cycle t+1, so no port can hold the output while
//    others wait.
// The outputs of the N blocks are un-rotated and ORed per port ("OR_N"
// gates) into grant; only the enabled block drives ones.
//
// Interface: req[i] is the "data present" flag of input FIFO i; grant is
// one-hot or zero and is combinational from req in the same cycle (the
// request-to-grant path is the critical path). rc_o and and_y are brought
// out for observation. Reset is synchronous and active high; after reset
// the ring counter is 0...01 and the shield register is clear.
//
// The structure (ring counter, AND gate, NOT gate with D flip-flop, N
// priority blocks with rotated request wiring, N OR gates) follows the
// document. A consequence worth knowing: a single requester alone is
// served every second cycle.
module scheduler #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic [N-1:0] rc_o,
  output logic [N-1:0] and_y
);
  logic [N-1:0]         grant_q;                // D_FF inside NOT_N
  logic [N-1:0]         pl_in  [N];
  logic [N-1:0]         pl_out [N];

  ring_counter #(.N(N)) u_rc (.clk(clk), .rst(rst), .rc_o(rc_o));

  always_ff @(posedge clk) begin
    if (rst) grant_q <= '0;
    else     grant_q <= grant;
  end

  assign and_y = req & ~grant_q;                 // AND_N with NOT_N

  for (genvar k = 0; k < N; k++) begin : g_pl
    // rotated request wiring of priority block k
    for (genvar i = 0; i < N; i++) begin : g_in
      assign pl_in[k][i] = and_y[(k + i) % N];
    end
    priority_logic #(.N(N)) u_pl (.en(rc_o[k]), .in_i(pl_in[k]), .out_o(pl_out[k]));
  end

  // OR_N gates: grant[j] collects output[(j-k) mod N] of every block k
  always_comb begin
    grant = '0;
    for (int k = 0; k < N; k++) begin
      for (int i = 0; i < N; i++) begin
        grant[(k + i) % N] = grant[(k + i) % N] | pl_out[k][i];
      end
    end
  end

`ifndef SYNTHESIS
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  a_subset: assert property (@(posedge clk) disable iff (rst) (grant & ~and_y) == '0);
  a_serve:  assert property (@(posedge clk) disable iff (rst) (and_y != '0) |-> (grant != '0));
`endif
endmodule
