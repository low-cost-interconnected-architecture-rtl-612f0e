// tb_spike_fifo: drives random writes and reads into a five-deep FIFO and
// compares order, data, full and data_present with a queue model. Also
// checks that a write while full is dropped, that a simultaneous read and
// write on a full FIFO both take effect, and that a written packet is
// visible one cycle after the write.
module tb_spike_fifo;
  localparam int W = 36, D = 5;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0, full, present;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0, full_hits = 0;
  logic [W-1:0] q [$];

  spike_fifo #(.W(W), .DEPTH(D)) dut (
    .clk(clk), .rst(rst), .wr_en(wr_en), .din(din), .full(full),
    .rd_en(rd_en), .dout(dout), .data_present(present));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state;
    checks++;
    if (present !== (q.size() != 0) || full !== (q.size() == D)) begin
      failures++;
      $display("flags: present=%b full=%b model size=%0d", present, full, q.size());
    end
    if (q.size() != 0) begin
      checks++;
      if (dout !== q[0]) begin
        failures++; $display("head %h expected %h", dout, q[0]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check_state();
    // fill to full, one more write must be dropped
    for (int i = 0; i < D + 1; i++) begin
      wr_en = 1; din = 36'h121211801 + 36'(i);
      @(posedge clk); #1;
      if (q.size() < D) q.push_back(36'h121211801 + 36'(i));
      check_state();
    end
    wr_en = 0;
    checks++;
    if (!full) begin failures++; $display("not full after %0d writes", D); end
    // read and write together while full
    wr_en = 1; rd_en = 1; din = 36'h151511801;
    @(posedge clk); #1;
    void'(q.pop_front()); q.push_back(36'h151511801);
    wr_en = 0; rd_en = 0;
    check_state();
    // random traffic
    for (int c = 0; c < 20000; c++) begin
      wr_en = ($urandom_range(0, 99) < 50);
      rd_en = ($urandom_range(0, 99) < 45);
      din   = {4'($urandom), 32'($urandom)};
      #1;
      if (full) full_hits++;
      @(posedge clk); #1;
      begin
        bit did_rd, did_wr;
        did_rd = rd_en && q.size() != 0;
        did_wr = wr_en && (q.size() < D || did_rd);
        if (did_rd) void'(q.pop_front());
        if (did_wr) q.push_back(din);
      end
      check_state();
    end
    checks++;
    if (full_hits == 0) begin failures++; $display("random run never filled the FIFO"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
