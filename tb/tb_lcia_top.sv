// tb_lcia_top: end-to-end test of the LCIA network at its default size,
// 16 x 2 routers, 36-bit packets, five-packet FIFOs.
//
// The tiles of the first layer act as spike generators: each injects
// packets at a spike injection rate (SIR, packets per clock cycle) into
// its router, which broadcasts them to all sixteen routers of the second
// layer. The tiles of the second layer count what they receive. Packets
// carry {mask[15:0], source[3:0], sequence[15:0]} so that every delivery
// can be checked against per-(destination, source) queues: no loss, no
// duplication, order kept per source.
//
// Phases:
//  1. Throughput sweep: 16, 8, 2 and 1 enabled generators at SIR = 1/32
//     and SIR = 1/2. Each receiving router must deliver
//     min(offered load, capacity) packets per cycle, where the capacity
//     is 1 with two or more active channels and 1/2 with a single one
//     (the previous grant is shielded for a cycle). The aggregate rate is
//     printed in Gbit/s for a 100 MHz clock.
//  2. Random traffic on every path at once: external sources into the
//     first layer, first-layer tiles into the second layer, second-layer
//     tiles out of the network, with random full flags from the tiles and
//     from the network output.
//  3. Multicast: masking switched on, each router with its own mask bit;
//     packets reach only the routers their mask selects.
// Every mechanism is counted and a failure is recorded for any that never
// occurred: broadcast, idle-port skipping, grant shielding, FIFO full
// towards a sender, tile-full stall, next-layer stall, network-output
// stall, multicast drop, mode switch.
module tb_lcia_top;
  import lcia_pkg::*;
  localparam int L = 2, N = 16, W = 36;

  logic clk = 0, rst = 1;
  logic              cfg_mask_en = 0;
  logic [MASK_W-1:0] cfg_mask [L][N];
  logic [W-1:0]      ext_spk [N];
  logic [N-1:0]      ext_wr = '0, ext_full;
  logic [W-1:0]      rx_spk  [L][N];
  logic              rx_wr   [L][N];
  logic              rx_full [L][N];
  logic [W-1:0]      tx_spk  [L][N];
  logic              tx_wr   [L][N];
  logic              tx_full [L][N];
  logic [W-1:0]      out_spk [N];
  logic [N-1:0]      out_wr, out_full = '0;
  logic [N-1:0]      grant   [L][N];

  lcia_top dut (
    .clk(clk), .rst(rst), .cfg_mask_en(cfg_mask_en), .cfg_mask(cfg_mask),
    .ext_spk(ext_spk), .ext_wr(ext_wr), .ext_full(ext_full),
    .ena_rx_spk(rx_spk), .ena_rx_wr(rx_wr), .ena_rx_full(rx_full),
    .ena_tx_spk(tx_spk), .ena_tx_wr(tx_wr), .ena_tx_full(tx_full),
    .out_spk(out_spk), .out_wr(out_wr), .out_full(out_full),
    .grant(grant));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- models
  // expected packets: layer-l tile d from source s (layer 0: external
  // source s; layer 1: first-layer tile s); out port s from second-layer tile s
  logic [W-1:0] expq [L][N][N][$];
  logic [W-1:0] outq [N][$];
  int rx_count [L][N];
  int sent_cnt = 0;

  // mechanism counters
  int m_broadcast = 0, m_skip = 0, m_shield = 0, m_fifo_full = 0, m_tile_stall = 0;
  int m_next_stall = 0, m_out_stall = 0, m_mc_drop = 0, m_mode_switch = 0;

  function automatic logic accepts(input int l, input int d, input logic [W-1:0] p);
    return !cfg_mask_en || ((p[W-1 -: MASK_W] & cfg_mask[l][d]) != '0);
  endfunction

  function automatic logic [W-1:0] mkpkt(input logic [15:0] m, input int src, input int seq);
    return {m, 4'(src), 16'(seq)};
  endfunction


  // internal signals of every router, gathered for the mechanism counters
  logic         p_oc_vld [L][N];
  logic [N-1:0] p_rc [L][N], p_req [L][N], p_andy [L][N], p_chfull [L][N];
  for (genvar gl = 0; gl < L; gl++) begin : g_probe_l
    for (genvar gd = 0; gd < N; gd++) begin : g_probe_d
      assign p_oc_vld[gl][gd] = dut.g_layer[gl].g_node[gd].u_router.u_oc.to_ena_vld;
      assign p_rc[gl][gd]     = dut.g_layer[gl].g_node[gd].u_router.u_sched.rc_o;
      assign p_req[gl][gd]    = dut.g_layer[gl].g_node[gd].u_router.u_sched.req;
      assign p_andy[gl][gd]   = dut.g_layer[gl].g_node[gd].u_router.u_sched.and_y;
      assign p_chfull[gl][gd] = dut.g_layer[gl].g_node[gd].u_router.ch_full;
    end
  end

  // scoreboard, sampled mid-cycle: the values seen here are the ones the
  // next rising edge acts on
  always @(negedge clk) if (!rst) begin
    cyc++;
    for (int l = 0; l < L; l++) begin
      for (int d = 0; d < N; d++) begin
        if (rx_wr[l][d]) begin
          int s;
          s = int'(rx_spk[l][d][19:16]);
          checks++;
          rx_count[l][d]++;
          if (rx_full[l][d]) begin failures++; $display("write into full tile %0d/%0d", l, d); end
          if (expq[l][d][s].size() == 0 || expq[l][d][s][0] !== rx_spk[l][d]) begin
            failures++;
            $display("tile %0d/%0d got %h unexpected", l, d, rx_spk[l][d]);
          end else void'(expq[l][d][s].pop_front());
        end
        if (rx_full[l][d] && p_oc_vld[l][d]) m_tile_stall++;
        // idle-port skipping: a grant goes to a channel other than the one
        // the ring counter gives top priority to
        if (grant[l][d] != '0 &&
            grant[l][d] != p_rc[l][d]) m_skip++;
        // shielding: requests pending but all of them were granted last cycle
        if (p_req[l][d] != '0 &&
            p_andy[l][d] == '0) m_shield++;
        checks++;
        if (!$onehot0(grant[l][d])) begin failures++; $display("grant not one-hot"); end
        if (p_chfull[l][d] != '0) m_fifo_full++;
      end
    end
    // first-layer tile spikes, broadcast to all second-layer routers
    for (int s = 0; s < N; s++) begin
      if (tx_wr[0][s] && !tx_full[0][s]) begin
        int hits;
        hits = 0;
        sent_cnt++;
        for (int d = 0; d < N; d++)
          if (accepts(1, d, tx_spk[0][s])) begin expq[1][d][s].push_back(tx_spk[0][s]); hits++; end
          else m_mc_drop++;
        if (hits == N) m_broadcast++;
      end
      if (tx_full[0][s]) m_next_stall++;
      if (ext_wr[s] && !ext_full[s])
        for (int d = 0; d < N; d++)
          if (accepts(0, d, ext_spk[s])) expq[0][d][s].push_back(ext_spk[s]);
          else m_mc_drop++;
      if (tx_wr[1][s] && !tx_full[1][s]) outq[s].push_back(tx_spk[1][s]);
      if (out_wr[s]) begin
        checks++;
        if (out_full[s] || outq[s].size() == 0 || outq[s][0] !== out_spk[s]) begin
          failures++; $display("out port %0d: bad %h", s, out_spk[s]);
        end else void'(outq[s].pop_front());
      end
      if (out_full[s] && tx_full[1][s]) m_out_stall++;
    end
  end

  // ------------------------------------------------------- spike generators
  // first-layer tiles: sg_period 0 = disabled; a generator that cannot
  // write (router full) keeps its packets and sends them later
  int sg_period [N];
  int sg_backlog [N];
  int sg_seq [N];
  bit sg_random = 0;
  int rand_load = 0;

  task automatic drive_cycle(input int t);
    for (int s = 0; s < N; s++) begin
      if (sg_period[s] != 0 && ((t + s) % sg_period[s]) == 0) sg_backlog[s]++;
      if (sg_random && $urandom_range(0, 99) < rand_load) sg_backlog[s]++;
      tx_wr[0][s]  = (sg_backlog[s] > 0) && !tx_full[0][s];
      tx_spk[0][s] = mkpkt(16'($urandom), s, sg_seq[s]);
      if (tx_wr[0][s]) begin sg_backlog[s]--; sg_seq[s]++; end
    end
  endtask

  task automatic clear_inputs;
    for (int s = 0; s < N; s++) begin
      sg_period[s] = 0; sg_backlog[s] = 0;
      tx_wr[0][s] = 0; tx_wr[1][s] = 0; ext_wr[s] = 0;
      rx_full[0][s] = 0; rx_full[1][s] = 0;
    end
    out_full = '0;
  endtask

  task automatic drain(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      for (int s = 0; s < N; s++) begin tx_wr[0][s] = 0; tx_wr[1][s] = 0; ext_wr[s] = 0; end
      @(posedge clk); #1;
    end
  endtask

  task automatic check_empty(input string tag);
    int left;
    left = 0;
    for (int l = 0; l < L; l++)
      for (int d = 0; d < N; d++)
        for (int s = 0; s < N; s++) left += expq[l][d][s].size();
    for (int s = 0; s < N; s++) left += outq[s].size();
    checks++;
    if (left != 0) begin failures++; $display("%s: %0d packets not delivered", tag, left); end
  endtask

  // one point of the throughput sweep
  task automatic sweep_point(input int n_en, input int period);
    int c0 [N], c1 [N];
    real rate, expect_rate, offered, gbps;
    clear_inputs();
    for (int s = 0; s < n_en; s++) sg_period[(s * 7) % N] = period;   // spread the enabled ones
    for (int t = 0; t < 2400; t++) begin
      if (t == 400)  for (int d = 0; d < N; d++) c0[d] = rx_count[1][d];
      if (t == 2400 - 1) for (int d = 0; d < N; d++) c1[d] = rx_count[1][d];
      drive_cycle(t);
      @(posedge clk); #1;
    end
    offered     = real'(n_en) / real'(period);
    expect_rate = (n_en >= 2) ? ((offered < 1.0) ? offered : 1.0) : ((offered < 0.5) ? offered : 0.5);
    rate = 0.0;
    for (int d = 0; d < N; d++) rate += real'(c1[d] - c0[d]) / 1999.0;
    rate = rate / real'(N);
    gbps = rate * real'(N) * real'(W) * 0.1;
    $display("SGs=%0d SIR=1/%0d: %0.3f packets/cycle per receiving router, %0.1f Gbit/s total at 100 MHz (expected %0.3f)",
             n_en, period, rate, gbps, expect_rate);
    checks++;
    if (rate < expect_rate * 0.97 || rate > expect_rate * 1.03) begin
      failures++; $display("throughput off");
    end
    drain(200);
    check_empty("sweep");
  endtask

  initial begin
    for (int l = 0; l < L; l++) for (int d = 0; d < N; d++) begin
      cfg_mask[l][d] = '0; tx_spk[l][d] = '0; rx_count[l][d] = 0;
    end
    for (int s = 0; s < N; s++) begin ext_spk[s] = '0; sg_seq[s] = 0; end
    clear_inputs();
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // 1. throughput sweep
    sweep_point(16, 32); sweep_point(8, 32); sweep_point(2, 32); sweep_point(1, 32);
    sweep_point(16, 2);  sweep_point(8, 2);  sweep_point(2, 2);  sweep_point(1, 2);

    // 2. random traffic on every path with random full flags
    clear_inputs();
    sg_random = 1; rand_load = 20;
    for (int t = 0; t < 6000; t++) begin
      // full flags first: the tiles' write decisions depend on them
      out_full = N'($urandom) & N'($urandom);
      for (int s = 0; s < N; s++) begin
        rx_full[0][s] = ($urandom_range(0, 99) < 20);
        rx_full[1][s] = ($urandom_range(0, 99) < 20);
      end
      #1;
      drive_cycle(t);
      for (int s = 0; s < N; s++) begin
        ext_wr[s]  = !ext_full[s] && ($urandom_range(0, 99) < 4);
        ext_spk[s] = mkpkt(16'($urandom), s, t);
        tx_wr[1][s]  = !tx_full[1][s] && ($urandom_range(0, 99) < 40);
        tx_spk[1][s] = {4'($urandom), 32'($urandom)};
      end
      @(posedge clk); #1;
    end
    sg_random = 0;
    clear_inputs();
    drain(400);
    check_empty("random traffic");

    // 3. multicast: router d of each layer answers to mask bit d
    cfg_mask_en = 1; m_mode_switch++;
    for (int l = 0; l < L; l++) for (int d = 0; d < N; d++) cfg_mask[l][d] = MASK_W'(1) << d;
    sg_random = 1; rand_load = 10;
    for (int t = 0; t < 2000; t++) begin
      drive_cycle(t);
      for (int s = 0; s < N; s++) begin
        ext_wr[s]  = !ext_full[s] && ($urandom_range(0, 99) < 10);
        ext_spk[s] = mkpkt(16'($urandom) & 16'($urandom), s, t);
      end
      @(posedge clk); #1;
    end
    sg_random = 0;
    clear_inputs();
    drain(400);
    check_empty("multicast");
    cfg_mask_en = 0; m_mode_switch++;

    // every mechanism must have happened
    $display("broadcasts=%0d skips=%0d shields=%0d fifo_full=%0d tile_stalls=%0d next_stalls=%0d out_stalls=%0d mc_drops=%0d mode_switches=%0d packets_sent=%0d",
             m_broadcast, m_skip, m_shield, m_fifo_full, m_tile_stall, m_next_stall, m_out_stall,
             m_mc_drop, m_mode_switch, sent_cnt);
    checks++; if (m_broadcast == 0)   begin failures++; $display("no broadcast"); end
    checks++; if (m_skip == 0)        begin failures++; $display("no idle-port skip"); end
    checks++; if (m_shield == 0)      begin failures++; $display("no shielded grant"); end
    checks++; if (m_fifo_full == 0)   begin failures++; $display("no full FIFO"); end
    checks++; if (m_tile_stall == 0)  begin failures++; $display("no tile-full stall"); end
    checks++; if (m_next_stall == 0)  begin failures++; $display("no next-layer stall"); end
    checks++; if (m_out_stall == 0)   begin failures++; $display("no output stall"); end
    checks++; if (m_mc_drop == 0)     begin failures++; $display("no multicast drop"); end
    checks++; if (m_mode_switch != 2) begin failures++; $display("mode switch missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
