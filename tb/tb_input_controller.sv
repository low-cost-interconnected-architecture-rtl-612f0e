// tb_input_controller: applies every one-hot grant and the empty grant
// with random FIFO heads (N = 6) and checks read enables, the forwarded
// packet, its valid flag and the granted channel number.
module tb_input_controller;
  localparam int N = 6, W = 36;
  logic [N-1:0] grant, rd_en;
  logic [W-1:0] heads [N];
  logic [W-1:0] pkt;
  logic         vld;
  logic [2:0]   pos;
  int checks = 0, failures = 0;

  input_controller #(.N(N), .W(W)) dut (
    .grant(grant), .fifo_dout(heads), .fifo_rd_en(rd_en),
    .pkt_o(pkt), .pkt_vld_o(vld), .position_o(pos));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < N; i++) heads[i] = {4'($urandom), 32'($urandom)};
      for (int g = -1; g < N; g++) begin
        grant = (g < 0) ? '0 : N'(1) << g;
        #1;
        checks++;
        if (rd_en !== grant || vld !== (g >= 0)) begin
          failures++; $display("grant=%b rd_en=%b vld=%b", grant, rd_en, vld);
        end
        if (g >= 0) begin
          checks++;
          if (pkt !== heads[g] || pos !== 3'(g)) begin
            failures++; $display("grant %0d: pkt=%h pos=%0d expected %h", g, pkt, pos, heads[g]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
