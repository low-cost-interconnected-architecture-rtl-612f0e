// tb_scheduler: checks the n x n scheduler.
//  1. Directed, N = 4: the documented waveform sequence. With all four
//     requests set from ring position 0010 the grants are 0010, 0100,
//     1000, 0001 and the shielded requests 1111, 1101, 1011, 0111; then
//     req = 0111 gives 0010, 0100, 0001 (idle port 3 skipped, port 0 not
//     granted twice), and req = 0011 at ring position 0100 with port 0
//     granted just before gives 0010.
//  2. Random, N = 4 and N = 6: every cycle against an independent model
//     (search the shielded requests cyclically from the ring position).
//  3. Fairness: with constant requests every requesting port is granted
//     within 2N cycles, and the grant is never idle while a request that
//     is not the previous grant is pending (one grant per cycle).
module tb_scheduler;
  logic clk = 0, rst = 1;
  logic [3:0] req4, g4, rc4, y4;
  logic [5:0] req6, g6, rc6, y6;
  int checks = 0, failures = 0;

  scheduler #(.N(4)) dut4 (.clk(clk), .rst(rst), .req(req4), .grant(g4), .rc_o(rc4), .and_y(y4));
  scheduler #(.N(6)) dut6 (.clk(clk), .rst(rst), .req(req6), .grant(g6), .rc_o(rc6), .and_y(y6));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent reference state
  int   k4, k6;
  logic [3:0] gp4;
  logic [5:0] gp6;

  function automatic logic [5:0] ref_grant(input logic [5:0] r, input logic [5:0] gp,
                                           input int k, input int n);
    logic [5:0] m = r & ~gp;
    for (int i = 0; i < n; i++) if (m[(k + i) % n]) return 6'(1) << ((k + i) % n);
    return '0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      k4 <= 0; k6 <= 0; gp4 <= '0; gp6 <= '0;
    end else begin
      k4 <= (k4 + 1) % 4; k6 <= (k6 + 1) % 6;
      gp4 <= ref_grant({2'b0, req4}, {2'b0, gp4}, k4, 4)[3:0];
      gp6 <= ref_grant(req6, gp6, k6, 6);
    end
  end

  task automatic exp4(input logic [3:0] rc, input logic [3:0] y, input logic [3:0] g);
    checks++;
    if (rc4 !== rc || y4 !== y || g4 !== g) begin
      failures++;
      $display("directed: rc=%b and_y=%b grant=%b, expected %b %b %b", rc4, y4, g4, rc, y, g);
    end
  endtask

  task automatic cmp_model;
    checks++;
    if (g4 !== ref_grant({2'b0, req4}, {2'b0, gp4}, k4, 4)[3:0]) begin
      failures++; $display("N=4 req=%b grant=%b", req4, g4);
    end
    checks++;
    if (g6 !== ref_grant(req6, gp6, k6, 6)) begin
      failures++; $display("N=6 req=%b grant=%b", req6, g6);
    end
  endtask

  initial begin
    req4 = '0; req6 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp4(4'b0001, 4'b0000, 4'b0000);
    @(posedge clk); #1;
    req4 = 4'b1111;  #1;
    exp4(4'b0010, 4'b1111, 4'b0010); @(posedge clk); #1;
    exp4(4'b0100, 4'b1101, 4'b0100); @(posedge clk); #1;
    exp4(4'b1000, 4'b1011, 4'b1000); @(posedge clk); #1;
    exp4(4'b0001, 4'b0111, 4'b0001); @(posedge clk); #1;
    req4 = 4'b0111;  #1;
    exp4(4'b0010, 4'b0110, 4'b0010); @(posedge clk); #1;
    exp4(4'b0100, 4'b0101, 4'b0100); @(posedge clk); #1;
    exp4(4'b1000, 4'b0011, 4'b0001); @(posedge clk); #1;
    req4 = 4'b0011;  #1;
    exp4(4'b0001, 4'b0010, 4'b0010); @(posedge clk); #1;
    exp4(4'b0010, 4'b0001, 4'b0001); @(posedge clk); #1;
    exp4(4'b0100, 4'b0010, 4'b0010); @(posedge clk); #1;   // time (a)
    // single requester is served every second cycle
    req4 = 4'b0100; #1;
    exp4(4'b1000, 4'b0100, 4'b0100); @(posedge clk); #1;
    exp4(4'b0001, 4'b0000, 4'b0000); @(posedge clk); #1;
    exp4(4'b0010, 4'b0100, 4'b0100); @(posedge clk); #1;

    // random comparison with the model
    for (int c = 0; c < 3000; c++) begin
      req4 = 4'($urandom); req6 = 6'($urandom);
      #1 cmp_model();
      @(posedge clk); #1;
    end

    // fairness with constant requests
    for (int t = 0; t < 40; t++) begin
      int last [6];
      logic [5:0] r;
      r = 6'($urandom);
      if (r == '0) r = 6'b100001;
      req6 = r;
      for (int i = 0; i < 6; i++) last[i] = 0;
      for (int c = 1; c <= 24; c++) begin
        #1;
        cmp_model();
        for (int i = 0; i < 6; i++) if (g6[i]) last[i] = c;
        checks++;
        if ($countones(r) > 1 && g6 == '0) begin
          failures++; $display("idle cycle with req=%b", r);
        end
        @(posedge clk); #1;
      end
      for (int i = 0; i < 6; i++) if (r[i]) begin
        checks++;
        if (last[i] < 24 - 12) begin
          failures++; $display("port %0d starved, req=%b", i, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
