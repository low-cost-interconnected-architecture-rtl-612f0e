// tb_lcia_router: one LCIA router with six input channels (the size of the
// router-level example with three active inputs) plus random traffic.
//  1. Three packets 121211801, 141411401, 151511801 arrive together on
//     channels 1, 3 and 4, three rounds in a row: all nine reach the tile,
//     a grant in the cycle after the first write, the first delivery
//     two cycles after it, one per cycle except
//     for at most one idle cycle when a single channel is left.
//  2. Throughput: two backlogged channels give one packet per cycle; a
//     single backlogged channel gives one packet every two cycles.
//  3. Random traffic on all channels (senders honour ch_full), random tile
//     full flag, random tile spikes towards a randomly full next layer:
//     per-channel order, no loss, no duplication, both back-pressure paths
//     exercised.
//  4. Multicast: with masking on, packets whose mask field misses the
//     router mask are dropped and the others delivered.
// Packets in 3 and 4 carry {mask[15:0], channel[3:0], sequence[15:0]}.
module tb_lcia_router;
  localparam int N = 6, W = 36;
  logic clk = 0, rst = 1;
  logic         mask_en = 0;
  logic [15:0]  my_mask = '0;
  logic [W-1:0] ch_spk [N];
  logic [N-1:0] ch_wr = '0, ch_full;
  logic [W-1:0] to_ena, ena_spk = '0, to_nxt;
  logic ena_wr, ena_full = 0, ena_wr_in = 0, ena_full_o, nxt_wr, nxt_full = 0;
  logic [N-1:0] grant;
  logic [2:0]   pos;
  int checks = 0, failures = 0;
  int cyc = 0, n_del = 0, last_del_cyc = 0, first_del_cyc = 0, ch_full_seen = 0, ena_stall = 0, nxt_stall = 0;
  logic [W-1:0] chq [N][$];
  logic [W-1:0] nq [$];
  bit model_on = 0;

  lcia_router #(.N(N), .W(W), .DEPTH(5)) dut (
    .clk(clk), .rst(rst), .cfg_mask_en(mask_en), .cfg_mask(my_mask),
    .ch_spk(ch_spk), .ch_wr(ch_wr), .ch_full(ch_full),
    .spikes_to_ena(to_ena), .ena_wr_o(ena_wr), .ena_full_i(ena_full),
    .ena_spk_i(ena_spk), .ena_wr_i(ena_wr_in), .ena_full_o(ena_full_o),
    .spikes_out(to_nxt), .next_wr_o(nxt_wr), .next_full_i(nxt_full),
    .grant_o(grant), .position_o(pos));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] mkpkt(input logic [15:0] m, input int ch, input int seq);
    return {m, 4'(ch), 16'(seq)};
  endfunction

  // scoreboard
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (ena_wr) begin
      n_del++; last_del_cyc = cyc;
      if (n_del == 1) first_del_cyc = cyc;
      if (ena_full) begin checks++; failures++; $display("write into full tile"); end
      if (model_on) begin
        int c;
        c = int'(to_ena[19:16]);
        checks++;
        if (c >= N || chq[c].size() == 0 || chq[c][0] !== to_ena) begin
          failures++; $display("unexpected packet %h (queue %0d size %0d head %h)", to_ena, c, chq[c].size(), chq[c].size() ? chq[c][0] : 0);
        end else void'(chq[c].pop_front());
      end
    end
    if (nxt_wr) begin
      checks++;
      if (nxt_full || nq.size() == 0 || nq[0] !== to_nxt) begin
        failures++; $display("bad packet to next layer %h", to_nxt);
      end else void'(nq.pop_front());
    end
    if (ena_wr_in && !ena_full_o) nq.push_back(ena_spk);
    if (model_on) for (int i = 0; i < N; i++)
      if (ch_wr[i] && !ch_full[i] && (!mask_en || (ch_spk[i][35:20] & my_mask) != 0))
        chq[i].push_back(ch_spk[i]);
    if (ch_full != 0) ch_full_seen++;
    if (ena_full && ena_wr == 0 && n_del > 0) ena_stall++;
    if (ena_full_o) nxt_stall++;
  end

  initial begin
    for (int i = 0; i < N; i++) ch_spk[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // 1. three simultaneous arrivals on channels 1, 3, 4, three rounds
    begin
      int start, got [$];
      logic [W-1:0] seen [$];
      ch_spk[1] = 36'h121211801; ch_spk[3] = 36'h141411401; ch_spk[4] = 36'h151511801;
      ch_wr = 6'b011010;
      @(posedge clk); #1;
      // the request is visible now and is granted in this same cycle
      checks++;
      if (!(grant inside {6'b000010, 6'b001000, 6'b010000}) || !(pos inside {3'd1, 3'd3, 3'd4})) begin
        failures++; $display("no grant in the cycle after the write: grant=%b pos=%0d", grant, pos);
      end
      repeat (2) @(posedge clk);
      #1 ch_wr = '0;
      start = cyc - 2;          // cycle index of the first write edge
      // the first packet is written into the tile two cycles after the first write
      repeat (12) begin
        @(posedge clk); #1;
      end
      checks++;
      // nine packets, the first two cycles after the first write; the
      // shield of the previous grant may cost one idle cycle at the end,
      // when only one channel still holds data
      if (n_del != 9 || first_del_cyc != start + 2 || last_del_cyc > start + 2 + 9) begin
        failures++;
        $display("three-arrival case: %0d packets, last at %0d (first write at %0d)", n_del, last_del_cyc, start);
      end
    end

    // 2. throughput with two and with one backlogged channel
    for (int act = 2; act >= 1; act--) begin
      int d0, d1;
      logic [N-1:0] m;
      m = (act == 2) ? 6'b100100 : 6'b000100;
      ch_spk[2] = 36'h0; ch_spk[5] = 36'h0;
      for (int c = 0; c < 60; c++) begin
        ch_wr = m & ~ch_full;
        if (c == 20) d0 = n_del;
        if (c == 60 - 1) d1 = n_del;
        @(posedge clk); #1;
      end
      ch_wr = '0;
      repeat (20) @(posedge clk);
      #1;
      checks++;
      if ((act == 2 && (d1 - d0) != 39) || (act == 1 && ((d1 - d0) < 19 || (d1 - d0) > 20))) begin
        failures++; $display("%0d active channels: %0d packets in 39 cycles", act, d1 - d0);
      end
    end

    // 3. random traffic with back-pressure on all sides
    model_on = 1;
    begin
      int seq = 0;
      for (int c = 0; c < 20000; c++) begin
        int load;
        load = (c < 10000) ? 40 : 10;
        ena_full = ($urandom_range(0, 99) < 25);
        nxt_full = ($urandom_range(0, 99) < 30);
        for (int i = 0; i < N; i++) ch_spk[i] = mkpkt(16'($urandom), i, seq++);
        #1;
        for (int i = 0; i < N; i++) ch_wr[i] = !ch_full[i] && ($urandom_range(0, 99) < load);
        ena_wr_in = !ena_full_o && ($urandom_range(0, 99) < 50);
        ena_spk   = {4'($urandom), 32'($urandom)};
        @(posedge clk); #1;
      end
      ch_wr = '0; ena_wr_in = 0; ena_full = 0; nxt_full = 0;
      repeat (60) @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (chq[i].size() != 0) begin failures++; $display("channel %0d lost %0d", i, chq[i].size()); end
      end
      checks++;
      if (nq.size() != 0) begin failures++; $display("next-layer path lost %0d", nq.size()); end
    end

    // 4. multicast filtering
    begin
      int n_prev;
      mask_en = 1; my_mask = 16'h0010;
      n_prev = n_del;
      for (int i = 0; i < N; i++) ch_spk[i] = mkpkt((i % 2) ? 16'h0030 : 16'h0001, i, 7);
      #1;
      ch_wr = '1;
      @(posedge clk); #1;
      ch_wr = '0;
      repeat (20) @(posedge clk);
      #1;
      checks++;
      if (n_del - n_prev != 3) begin failures++; $display("multicast: %0d delivered, 3 expected", n_del - n_prev); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (chq[i].size() != 0) begin failures++; $display("multicast channel %0d lost", i); end
      end
      mask_en = 0;
    end

    checks++;
    if (ch_full_seen == 0 || ena_stall == 0 || nxt_stall == 0) begin
      failures++; $display("coverage: ch_full %0d ena stall %0d next stall %0d", ch_full_seen, ena_stall, nxt_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
