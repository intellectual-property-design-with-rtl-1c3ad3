// tb_hw_trojan: exhaustive check of the combinational trojan.
//
// For every A, B and ADD it checks that the output equals the input sum
// except for the single trigger pattern (A = 0xA, B = 0x5, add mode), where
// bit 0 is inverted, and that the trigger fires exactly once.
module tb_hw_trojan;
  localparam int W = 4;
  logic [W-1:0] a, b, sum_in, sum_out;
  logic add, trig;
  int checks = 0, failures = 0, fired = 0;

  hw_trojan #(.WIDTH(W)) dut (.a, .b, .add, .sum_in, .sum_out, .triggered(trig));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic exp_t;
      a = W'(i); b = W'(i >> 4); add = i[8];
      sum_in = W'(a + b);
      #1;
      exp_t = (i == 'h15A);            // add = 1, B = 5, A = A
      checks++;
      if (trig !== exp_t || sum_out !== (exp_t ? (sum_in ^ 4'b0001) : sum_in)) begin
        failures++;
        $display("FAIL a=%h b=%h add=%b: out=%h trig=%b", a, b, add, sum_out, trig);
      end
      if (trig) fired++;
    end
    checks++;
    if (fired != 1) begin failures++; $display("FAIL trigger fired %0d times", fired); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
