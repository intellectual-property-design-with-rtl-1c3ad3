// tb_butterfly_cell: checks the Butterfly PUF cell model.
//
// Sixteen noise-free cells of different devices are excited and released ten
// times. Each must read 0 while excited, must settle to the same bit every
// time (no noise), and the sixteen devices together must give both values.
// A very noisy cell must give both values over forty releases.
module tb_butterfly_cell;
  localparam int N = 16;
  logic excite = 1'b1;
  logic [N-1:0] out;
  logic [N-1:0] first;
  logic noisy_out;
  int checks = 0, failures = 0;
  int ones_noisy = 0;

  for (genvar i = 0; i < N; i++) begin : g_dev
    butterfly_cell #(.DEVICE_SEED(100 + i), .CELL_INDEX(0), .NOISE(0)) u (.excite, .out(out[i]));
  end
  butterfly_cell #(.DEVICE_SEED(7), .CELL_INDEX(3), .NOISE(100000)) u_noisy (.excite, .out(noisy_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      excite = 1'b1; #10;
      checks++;
      if (out !== '0) begin failures++; $display("FAIL cells not at 0 while excited"); end
      excite = 1'b0; #10;
      if (noisy_out) ones_noisy++;
      if (r == 0) first = out;
      else if (r < 10) begin
        checks++;
        if (out !== first) begin failures++; $display("FAIL noise-free cell changed: %h vs %h", out, first); end
      end
    end
    checks++;
    if (first == '0 || first == '1) begin failures++; $display("FAIL all devices equal: %h", first); end
    checks++;
    if (ones_noisy == 0 || ones_noisy == 40) begin
      failures++; $display("FAIL noisy cell never changed (%0d ones)", ones_noisy);
    end
    $display("device bits %b, noisy ones %0d of 40", first, ones_noisy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
