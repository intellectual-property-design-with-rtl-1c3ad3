// tb_bf_puf_array: checks the Butterfly PUF array and its read-out mux.
//
// Two noise-free devices are excited and released five times. bit_out must
// equal resp[sel] for every sel, each device's response must not change
// between releases, and the two devices must differ in some bit.
module tb_bf_puf_array;
  localparam int N = 8;
  logic excite = 1'b1;
  logic [2:0] sel;
  logic bit0, bit1;
  logic [N-1:0] resp0, resp1, ref0, ref1;
  int checks = 0, failures = 0;

  bf_puf_array #(.N_CELLS(N), .DEVICE_SEED(11), .NOISE(0)) d0 (.excite, .sel, .bit_out(bit0), .resp(resp0));
  bf_puf_array #(.N_CELLS(N), .DEVICE_SEED(12), .NOISE(0)) d1 (.excite, .sel, .bit_out(bit1), .resp(resp1));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = '0;
    for (int r = 0; r < 5; r++) begin
      excite = 1'b1; #10;
      excite = 1'b0; #10;
      if (r == 0) begin ref0 = resp0; ref1 = resp1; end
      checks++;
      if (resp0 !== ref0 || resp1 !== ref1) begin failures++; $display("FAIL response changed"); end
      for (int i = 0; i < N; i++) begin
        sel = 3'(i); #1;
        checks++;
        if (bit0 !== ref0[i] || bit1 !== ref1[i]) begin
          failures++; $display("FAIL mux sel=%0d", i);
        end
      end
    end
    checks++;
    if (ref0 == ref1) begin failures++; $display("FAIL two devices identical %h", ref0); end
    checks++;
    if (ref0 == '0 || ref0 == '1) begin failures++; $display("FAIL degenerate response %h", ref0); end
    $display("device 0 %b, device 1 %b", ref0, ref1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
