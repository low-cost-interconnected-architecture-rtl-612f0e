// tb_lcia_fig10: the 6 x 2 router array of the hardware demonstration.
// Three of the six first-layer tiles (1, 3 and 4) emit the packets
// 121211801, 141411401 and 151511801 in the same cycle, three rounds in a
// row (the worst case: all three arrive together at every second-layer
// router). Every second-layer tile must receive all nine packets, in order
// per source, the first four cycles after the first emission and the last
// no more than 13 cycles after it (nine packets, one per cycle, at most
// one idle cycle from the grant shield). Meanwhile every second-layer
// tile emits one spike of its own, which must leave the network on the
// output port of its router while the next layer signals no congestion.
module tb_lcia_fig10;
  localparam int L = 2, N = 6, W = 36;
  logic clk = 0, rst = 1;
  logic [15:0]  cfg_mask [L][N];
  logic [W-1:0] ext_spk [N];
  logic [N-1:0] ext_full, out_wr;
  logic [W-1:0] rx_spk [L][N], tx_spk [L][N], out_spk [N];
  logic         rx_wr [L][N], rx_full [L][N], tx_wr [L][N], tx_full [L][N];
  logic [N-1:0] grant [L][N];
  int checks = 0, failures = 0, cyc = 0;
  int first [N], last [N], got [N];
  logic [W-1:0] expq [N][N][$];
  int outs = 0;

  lcia_top #(.LAYERS(L), .NODES(N)) dut (
    .clk(clk), .rst(rst), .cfg_mask_en(1'b0), .cfg_mask(cfg_mask),
    .ext_spk(ext_spk), .ext_wr('0), .ext_full(ext_full),
    .ena_rx_spk(rx_spk), .ena_rx_wr(rx_wr), .ena_rx_full(rx_full),
    .ena_tx_spk(tx_spk), .ena_tx_wr(tx_wr), .ena_tx_full(tx_full),
    .out_spk(out_spk), .out_wr(out_wr), .out_full('0), .grant(grant));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    cyc++;
    for (int d = 0; d < N; d++) begin
      if (rx_wr[1][d]) begin
        int s;
        s = (rx_spk[1][d] == 36'h121211801) ? 1 : (rx_spk[1][d] == 36'h141411401) ? 3 :
            (rx_spk[1][d] == 36'h151511801) ? 4 : 0;
        got[d]++; last[d] = cyc;
        if (got[d] == 1) first[d] = cyc;
        checks++;
        if (expq[d][s].size() == 0 || expq[d][s][0] !== rx_spk[1][d]) begin
          failures++; $display("SC%0d: unexpected %h", d, rx_spk[1][d]);
        end else void'(expq[d][s].pop_front());
      end
      if (rx_wr[0][d]) begin checks++; failures++; $display("first layer got a packet"); end
      if (out_wr[d]) begin
        outs++;
        checks++;
        if (out_spk[d] !== {32'h1111_1140, 4'(d)}) begin
          failures++; $display("out %0d: %h", d, out_spk[d]);
        end
      end
    end
  end

  initial begin
    for (int l = 0; l < L; l++) for (int d = 0; d < N; d++) begin
      cfg_mask[l][d] = '0; tx_spk[l][d] = '0; tx_wr[l][d] = 0; rx_full[l][d] = 0;
    end
    for (int d = 0; d < N; d++) begin ext_spk[d] = '0; first[d] = 0; last[d] = 0; got[d] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    tx_spk[0][1] = 36'h121211801; tx_spk[0][3] = 36'h141411401; tx_spk[0][4] = 36'h151511801;
    for (int r = 0; r < 3; r++) begin
      tx_wr[0][1] = 1; tx_wr[0][3] = 1; tx_wr[0][4] = 1;
      for (int d = 0; d < N; d++) begin
        tx_spk[1][d] = {32'h1111_1140, 4'(d)};
        tx_wr[1][d]  = (r == 0);
        expq[d][1].push_back(36'h121211801);
        expq[d][3].push_back(36'h141411401);
        expq[d][4].push_back(36'h151511801);
      end
      checks++;
      if (tx_full[0][1] || tx_full[0][3] || tx_full[0][4]) begin
        failures++; $display("generator blocked in round %0d", r);
      end
      @(posedge clk); #1;
    end
    for (int d = 0; d < N; d++) begin tx_wr[0][d] = 0; tx_wr[1][d] = 0; end
    repeat (30) @(posedge clk);
    #1;
    for (int d = 0; d < N; d++) begin
      checks++;
      if (got[d] != 9 || first[d] != 4 || last[d] > 13) begin
        failures++; $display("SC%0d: %0d packets, first at %0d, last at %0d", d, got[d], first[d], last[d]);
      end
    end
    checks++;
    if (outs != N) begin failures++; $display("%0d spikes left the network, %0d expected", outs, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
