// lcia_router: one node of the low cost interconnected architecture (LCIA).
//
// The router sits between one ENA neuron tile and the neighbouring layers.
// It has N input channels, one from each router of the previous layer; each
// of those routers broadcasts its local tile's spikes to every router of
// this layer. Per channel a five-packet FIFO buffers arriving spikes; the
// scheduler picks one channel with data per cycle; the input controller
// pops that FIFO and hands the packet to the output controller, which
// writes it into the local tile. In the other direction the output
// controller forwards the tile's own spikes to all next-layer routers.
//
// Multicast: when cfg_mask_en is high, a packet arriving on a channel is
// stored only if its mask field (top MASK_W bits) shares a set bit with
// cfg_mask; otherwise it is dropped at the FIFO input. With cfg_mask_en low
// every packet is accepted (broadcast).
//
// Timing: a packet written into a channel FIFO in cycle t can be granted in
// cycle t+1 and appears on spikes_to_ena with ena_wr_o in cycle t+2. With
// two or more channels holding data the router delivers one packet per
// cycle; a single busy channel is served every other cycle (see scheduler).
// While the output stage towards the tile is blocked (tile FIFO full) the
// scheduler sees no requests. ch_full[i] goes back to the sender of
// channel i. Reset is synchronous and active high.
//
// Block set (FIFO, input controller, scheduler, output controller) and
// the signal names in quotes in the sub-blocks follow the document. The
// mask field position and the back-pressure gating are this design's own.
module lcia_router #(
  parameter int unsigned N      = lcia_pkg::N_CH,
  parameter int unsigned W      = lcia_pkg::PKT_W,
  parameter int unsigned DEPTH  = lcia_pkg::FIFO_DEPTH
) (
  input  logic                   clk,
  input  logic                   rst,
  // multicast configuration
  input  logic                   cfg_mask_en,
  input  logic [lcia_pkg::MASK_W-1:0] cfg_mask,
  // input channels from previous-layer routers
  input  logic [W-1:0]           ch_spk [N],
  input  logic [N-1:0]           ch_wr,
  output logic [N-1:0]           ch_full,
  // local ENA tile, router -> tile
  output logic [W-1:0]           spikes_to_ena,
  output logic                   ena_wr_o,
  input  logic                   ena_full_i,
  // local ENA tile, tile -> router
  input  logic [W-1:0]           ena_spk_i,
  input  logic                   ena_wr_i,
  output logic                   ena_full_o,
  // next-layer routers
  output logic [W-1:0]           spikes_out,
  output logic                   next_wr_o,
  input  logic                   next_full_i,
  // observation
  output logic [N-1:0]           grant_o,
  output logic [$clog2(N+1)-1:0] position_o
);
  logic [W-1:0] fifo_dout [N];
  logic [N-1:0] present, rd_en, req, accept;
  logic [W-1:0] ic_pkt;
  logic         ic_vld, oc_ready;

  for (genvar i = 0; i < N; i++) begin : g_ch
    assign accept[i] = ch_wr[i] &&
                       lcia_pkg::mask_match(ch_spk[i][W-1 -: lcia_pkg::MASK_W], cfg_mask, cfg_mask_en);
    spike_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
      .clk(clk), .rst(rst),
      .wr_en(accept[i]), .din(ch_spk[i]), .full(ch_full[i]),
      .rd_en(rd_en[i]), .dout(fifo_dout[i]), .data_present(present[i])
    );
  end

  assign req = oc_ready ? present : '0;

  scheduler #(.N(N)) u_sched (
    .clk(clk), .rst(rst), .req(req), .grant(grant_o),
    .rc_o(), .and_y()
  );

  input_controller #(.N(N), .W(W)) u_ic (
    .grant(grant_o), .fifo_dout(fifo_dout), .fifo_rd_en(rd_en),
    .pkt_o(ic_pkt), .pkt_vld_o(ic_vld), .position_o(position_o)
  );

  output_controller #(.W(W)) u_oc (
    .clk(clk), .rst(rst),
    .in_pkt(ic_pkt), .in_vld(ic_vld), .in_ready_o(oc_ready),
    .spikes_to_ena(spikes_to_ena), .ena_wr_o(ena_wr_o), .ena_full_i(ena_full_i),
    .ena_spk_i(ena_spk_i), .ena_wr_i(ena_wr_i), .ena_full_o(ena_full_o),
    .spikes_out(spikes_out), .next_wr_o(next_wr_o), .next_full_i(next_full_i)
  );
endmodule
