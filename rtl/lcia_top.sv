// lcia_top: a multi-layer LCIA network of NODES x LAYERS routers.
//
// Each router serves one ENA neuron tile. Between two consecutive layers
// the connection is all-to-all: the spikes that tile j of layer l-1 emits
// are broadcast by its router to input channel j of every router of layer
// l. Each router therefore has NODES input channels. A sender writes only
// when none of the receiving FIFOs is full, so the full flag a router sees
// from the next layer ("NextRoutersTraffic") is the OR of channel j's full
// flags over all routers of that layer.
//
// The first layer's input channels come from outside (ext_*: source j
// broadcasts to channel j of every first-layer router); the last layer's
// routers forward their tiles' spikes to the out_* ports. The ENA tiles
// themselves are outside this module: every router's tile-side signals are
// brought out as ports indexed [layer][node].
//
// Defaults give the 16 x 2 router array used for the throughput evaluation
// (16 routers per layer, 36-bit packets, five-packet FIFOs). The equal
// router count per layer and the external first/last-layer ports are this
// design's choices. Reset is synchronous and active high.
module lcia_top #(
  parameter int unsigned LAYERS = 2,
  parameter int unsigned NODES  = lcia_pkg::N_CH,
  parameter int unsigned W      = lcia_pkg::PKT_W,
  parameter int unsigned DEPTH  = lcia_pkg::FIFO_DEPTH
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cfg_mask_en,
  input  logic [lcia_pkg::MASK_W-1:0] cfg_mask [LAYERS][NODES],
  // sources feeding the first layer
  input  logic [W-1:0]       ext_spk  [NODES],
  input  logic [NODES-1:0]   ext_wr,
  output logic [NODES-1:0]   ext_full,
  // ENA tiles, router -> tile
  output logic [W-1:0]       ena_rx_spk  [LAYERS][NODES],
  output logic               ena_rx_wr   [LAYERS][NODES],
  input  logic               ena_rx_full [LAYERS][NODES],
  // ENA tiles, tile -> router
  input  logic [W-1:0]       ena_tx_spk  [LAYERS][NODES],
  input  logic               ena_tx_wr   [LAYERS][NODES],
  output logic               ena_tx_full [LAYERS][NODES],
  // last layer towards whatever follows
  output logic [W-1:0]       out_spk  [NODES],
  output logic [NODES-1:0]   out_wr,
  input  logic [NODES-1:0]   out_full,
  // observation: grant vector of every router
  output logic [NODES-1:0]   grant    [LAYERS][NODES]
);
  // per-layer signals a router drives towards the next layer
  logic [W-1:0]     l_spk   [LAYERS][NODES];
  logic [NODES-1:0] l_wr    [LAYERS];
  logic [NODES-1:0] l_nfull [LAYERS];
  // per-router channel full flags
  logic [NODES-1:0] r_chfull [LAYERS][NODES];
  // combined full flag seen by the senders of layer l-1 (index l), per channel
  logic [NODES-1:0] in_full  [LAYERS];

  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    always_comb begin
      in_full[l] = '0;
      for (int i = 0; i < NODES; i++) in_full[l] = in_full[l] | r_chfull[l][i];
    end

    for (genvar i = 0; i < NODES; i++) begin : g_node
      logic [W-1:0]     ch_spk [NODES];
      logic [NODES-1:0] ch_wr;

      if (l == 0) begin : g_first
        assign ch_spk = ext_spk;
        assign ch_wr  = ext_wr;
      end else begin : g_inner
        assign ch_spk = l_spk[l-1];
        assign ch_wr  = l_wr[l-1];
      end

      lcia_router #(.N(NODES), .W(W), .DEPTH(DEPTH)) u_router (
        .clk(clk), .rst(rst),
        .cfg_mask_en(cfg_mask_en), .cfg_mask(cfg_mask[l][i]),
        .ch_spk(ch_spk), .ch_wr(ch_wr), .ch_full(r_chfull[l][i]),
        .spikes_to_ena(ena_rx_spk[l][i]), .ena_wr_o(ena_rx_wr[l][i]),
        .ena_full_i(ena_rx_full[l][i]),
        .ena_spk_i(ena_tx_spk[l][i]), .ena_wr_i(ena_tx_wr[l][i]),
        .ena_full_o(ena_tx_full[l][i]),
        .spikes_out(l_spk[l][i]), .next_wr_o(l_wr[l][i]),
        .next_full_i(l_nfull[l][i]),
        .grant_o(grant[l][i]), .position_o()
      );
    end

    if (l + 1 < LAYERS) begin : g_fb
      assign l_nfull[l] = in_full[l+1];
    end else begin : g_last
      assign l_nfull[l] = out_full;
    end
  end

  assign ext_full = in_full[0];
  assign out_spk  = l_spk[LAYERS-1];
  assign out_wr   = l_wr[LAYERS-1];
endmodule
