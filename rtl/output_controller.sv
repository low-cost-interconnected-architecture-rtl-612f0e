// output_controller: packet forwarding stage of the LCIA router.
//
// Two independent one-packet stages, each a valid register with
// back-pressure:
//  * towards the local ENA tile: a packet read by the input controller
//    (in_pkt/in_vld) is registered and presented on spikes_to_ena with
//    ena_wr_o ("WriteEn_Out") high. The write happens only while the
//    tile's input FIFO is not full (ena_full_i, "FIFOFullFlag_In"); until
//    then the packet is held. in_ready_o tells the router whether the
//    stage can take a packet this cycle; the router withholds requests
//    from the scheduler when it cannot (the "FIFOfull flag" path into the
//    scheduler).
//  * towards the next layer: a spike from the local ENA tile (ena_spk_i,
//    ena_wr_i, the "Data Channel" and "WriteEn_In") is registered and
//    written to the input FIFOs of all next-layer routers (spikes_out,
//    next_wr_o, "Spikes_Out" and "FIFOWriteEN") while their combined full
//    flag next_full_i ("NextRoutersTraffic") is low. ena_full_o
//    ("FIFOFullFlag_Out") tells the tile to wait.
// Timing: a packet accepted in cycle t appears on its output in cycle t+1
// and stays there, with its write strobe held low, for as long as the
// receiver is full. Reset (synchronous, active high) empties both stages.
//
// The signal set and the rule "test the receiver's full flag before
// transferring, otherwise wait" follow the document; the single register
// per direction is this design's choice.
module output_controller #(
  parameter int unsigned W = lcia_pkg::PKT_W
) (
  input  logic         clk,
  input  logic         rst,
  // from input controller
  input  logic [W-1:0] in_pkt,
  input  logic         in_vld,
  output logic         in_ready_o,
  // to local ENA tile
  output logic [W-1:0] spikes_to_ena,
  output logic         ena_wr_o,
  input  logic         ena_full_i,
  // from local ENA tile
  input  logic [W-1:0] ena_spk_i,
  input  logic         ena_wr_i,
  output logic         ena_full_o,
  // to next-layer routers
  output logic [W-1:0] spikes_out,
  output logic         next_wr_o,
  input  logic         next_full_i
);
  logic to_ena_vld, to_nxt_vld, nxt_ready;

  assign in_ready_o = !to_ena_vld || !ena_full_i;
  assign ena_wr_o   = to_ena_vld && !ena_full_i;

  assign nxt_ready  = !to_nxt_vld || !next_full_i;
  assign ena_full_o = !nxt_ready;
  assign next_wr_o  = to_nxt_vld && !next_full_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      to_ena_vld    <= 1'b0;
      spikes_to_ena <= '0;
    end else if (in_ready_o) begin
      to_ena_vld <= in_vld;
      if (in_vld) spikes_to_ena <= in_pkt;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      to_nxt_vld <= 1'b0;
      spikes_out <= '0;
    end else if (nxt_ready) begin
      to_nxt_vld <= ena_wr_i;
      if (ena_wr_i) spikes_out <= ena_spk_i;
    end
  end

`ifndef SYNTHESIS
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) in_vld |-> in_ready_o);
  a_ena_waits:  assert property (@(posedge clk) disable iff (rst) ena_wr_i |-> !ena_full_o);
`endif
endmodule
