// tb_output_controller: random traffic through both directions of the
// output controller with random full flags from the receivers.
// Checks, per direction: every packet offered while the stage was ready is
// written exactly once, in order; nothing is written while the receiver is
// full; a packet offered to an empty, unblocked stage is written in the
// next cycle; the ready / full-out flags are consistent with the model.
module tb_output_controller;
  localparam int W = 36;
  logic clk = 0, rst = 1;
  logic [W-1:0] in_pkt = '0, ena_spk = '0, to_ena, to_nxt;
  logic in_vld = 0, in_ready, ena_wr, ena_full = 0;
  logic ena_wr_in = 0, ena_full_o, nxt_wr, nxt_full = 0;
  int checks = 0, failures = 0, stalls_a = 0, stalls_b = 0, n_a = 0, n_b = 0;
  logic [W-1:0] qa [$], qb [$];

  output_controller #(.W(W)) dut (
    .clk(clk), .rst(rst),
    .in_pkt(in_pkt), .in_vld(in_vld), .in_ready_o(in_ready),
    .spikes_to_ena(to_ena), .ena_wr_o(ena_wr), .ena_full_i(ena_full),
    .ena_spk_i(ena_spk), .ena_wr_i(ena_wr_in), .ena_full_o(ena_full_o),
    .spikes_out(to_nxt), .next_wr_o(nxt_wr), .next_full_i(nxt_full));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample mid-cycle what the DUT writes and what is offered at the next edge
  always @(negedge clk) if (!rst) begin
    if (ena_wr) begin
      checks++; n_a++;
      if (ena_full) begin failures++; $display("write to full tile"); end
      if (qa.size() == 0 || to_ena !== qa[0]) begin
        failures++; $display("to tile %h unexpected", to_ena);
      end else void'(qa.pop_front());
    end
    if (nxt_wr) begin
      checks++; n_b++;
      if (nxt_full) begin failures++; $display("write to full next router"); end
      if (qb.size() == 0 || to_nxt !== qb[0]) begin
        failures++; $display("to next %h unexpected", to_nxt);
      end else void'(qb.pop_front());
    end
    if (in_vld && in_ready) qa.push_back(in_pkt);
    if (ena_wr_in && !ena_full_o) qb.push_back(ena_spk);
    if (!in_ready) stalls_a++;
    if (ena_full_o) stalls_b++;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // directed latency: one packet each way, receivers free
    in_pkt = 36'h121211801; in_vld = 1; ena_spk = 36'h111111401; ena_wr_in = 1;
    @(posedge clk); #1;
    in_vld = 0; ena_wr_in = 0;
    checks++;
    if (!(ena_wr && to_ena == 36'h121211801 && nxt_wr && to_nxt == 36'h111111401)) begin
      failures++; $display("one-cycle latency not met");
    end
    @(posedge clk); #1;
    // random
    for (int c = 0; c < 20000; c++) begin
      ena_full = ($urandom_range(0, 99) < 30);
      nxt_full = ($urandom_range(0, 99) < 30);
      #1;
      in_vld    = in_ready && ($urandom_range(0, 99) < 70);
      in_pkt    = {4'($urandom), 32'($urandom)};
      ena_wr_in = !ena_full_o && ($urandom_range(0, 99) < 70);
      ena_spk   = {4'($urandom), 32'($urandom)};
      @(posedge clk); #1;
    end
    in_vld = 0; ena_wr_in = 0; ena_full = 0; nxt_full = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin
      failures++; $display("packets lost: %0d to tile, %0d to next", qa.size(), qb.size());
    end
    checks++;
    if (stalls_a == 0 || stalls_b == 0 || n_a < 1000 || n_b < 1000) begin
      failures++; $display("coverage: stalls %0d %0d, writes %0d %0d", stalls_a, stalls_b, n_a, n_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
