// tb_ring_counter: checks the one-hot rotation of the ring counter for
// N = 4 and N = 6 against a rotating reference, over several wraps and a
// mid-run reset.
module tb_ring_counter;
  logic clk = 0, rst = 1;
  logic [3:0] rc4;
  logic [5:0] rc6;
  int checks = 0, failures = 0;
  logic [3:0] exp4;
  logic [5:0] exp6;

  ring_counter #(.N(4)) dut4 (.clk(clk), .rst(rst), .rc_o(rc4));
  ring_counter #(.N(6)) dut6 (.clk(clk), .rst(rst), .rc_o(rc6));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check;
    checks++;
    if (rc4 !== exp4 || rc6 !== exp6) begin
      failures++;
      $display("mismatch rc4=%b exp %b rc6=%b exp %b", rc4, exp4, rc6, exp6);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp4 = 4'b0001; exp6 = 6'b000001;
    check();
    for (int c = 0; c < 30; c++) begin
      @(posedge clk); #1;
      exp4 = {exp4[2:0], exp4[3]};
      exp6 = {exp6[4:0], exp6[5]};
      check();
    end
    // reset in the middle of a rotation returns to 0...01
    rst = 1; @(posedge clk); #1 rst = 0;
    exp4 = 4'b0001; exp6 = 6'b000001;
    check();
    // the documented 4-bit sequence 0001, 0010, 0100, 1000, 0001
    for (int c = 0; c < 4; c++) begin
      @(posedge clk); #1;
      exp4 = 4'b0001 << ((c + 1) % 4);
      exp6 = 6'b000001 << ((c + 1) % 6);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
