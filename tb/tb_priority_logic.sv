// tb_priority_logic: exhaustive check of the fixed-priority block for
// N = 4 and N = 6: with enable, exactly the lowest-numbered set input is
// reflected; without enable, nothing.
module tb_priority_logic;
  int checks = 0, failures = 0;
  logic       en;
  logic [3:0] in4, out4;
  logic [5:0] in6, out6;

  priority_logic #(.N(4)) dut4 (.en(en), .in_i(in4), .out_o(out4));
  priority_logic #(.N(6)) dut6 (.en(en), .in_i(in6), .out_o(out6));

  function automatic logic [5:0] ref_pl(input logic e, input logic [5:0] v, input int n);
    if (!e) return '0;
    for (int i = 0; i < n; i++) if (v[i]) return 6'(1) << i;
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 64; v++) begin
        en = e[0]; in4 = v[3:0]; in6 = v[5:0];
        #1;
        checks++;
        if (out4 !== ref_pl(en, {2'b0, in4}, 4)) begin
          failures++; $display("N=4 en=%b in=%b out=%b", en, in4, out4);
        end
        checks++;
        if (out6 !== ref_pl(en, in6, 6)) begin
          failures++; $display("N=6 en=%b in=%b out=%b", en, in6, out6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
