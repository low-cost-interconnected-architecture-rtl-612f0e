// input_controller: turns the scheduler's grant into FIFO reads.
//
// grant (one-hot or zero) is copied to the per-channel read enables
// fifo_rd_en ("FIFOReadEN"), which pop the granted FIFO at the next clock
// edge. In the same cycle the head packet of the granted FIFO is selected
// onto the data channel towards the output controller (pkt_o, pkt_vld_o),
// and the binary number of the granted channel is given on position_o
// (the "Position" signal, shown as 1, 3, 4 in the router waveform).
// Purely combinational; the output controller registers the packet.
//
// The conversion of grant into read enables and the forwarding of the
// packet follow the document; the binary position encoding and the
// AND-OR multiplexer are this design's choices.
module input_controller #(
  parameter int unsigned N = lcia_pkg::N_CH,
  parameter int unsigned W = lcia_pkg::PKT_W
) (
  input  logic [N-1:0]         grant,
  input  logic [W-1:0]         fifo_dout [N],
  output logic [N-1:0]         fifo_rd_en,
  output logic [W-1:0]         pkt_o,
  output logic                 pkt_vld_o,
  output logic [$clog2(N+1)-1:0] position_o
);
  assign fifo_rd_en = grant;
  assign pkt_vld_o  = |grant;

  always_comb begin
    pkt_o      = '0;
    position_o = '0;
    for (int i = 0; i < N; i++) begin
      if (grant[i]) begin
        pkt_o      = pkt_o | fifo_dout[i];
        position_o = position_o | ($clog2(N+1))'(i);
      end
    end
  end
endmodule
