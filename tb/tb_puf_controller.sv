// tb_puf_controller: checks the PUF excite/read-out sequence.
//
// A testbench PUF answers sel with a known pattern once excite is low (and
// with the inverse while it is high, so a read during excitation shows). For
// several patterns the test checks: excite high for exactly EXCITE_CYCLES
// clocks, done exactly EXCITE_CYCLES + 1 + SIG_WIDTH clocks after start,
// the stored signature equal to the pattern, sig_valid held after done,
// sel stepping through every cell once, and start ignored while busy.
module tb_puf_controller;
  localparam int SW = 8;
  localparam int EC = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0, excite, puf_bit, sig_valid, done, busy;
  logic [2:0] sel;
  logic [SW-1:0] signature, pattern;
  int checks = 0, failures = 0;

  puf_controller #(.SIG_WIDTH(SW), .EXCITE_CYCLES(EC)) dut (
    .clk, .rst_n, .start, .excite, .sel, .puf_bit, .signature, .sig_valid, .done, .busy
  );

  always #5 clk = ~clk;
  assign puf_bit = excite ? ~pattern[sel] : pattern[sel];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_true("idle after reset", !busy && !sig_valid && !excite && signature == '0);
    for (int t = 0; t < 6; t++) begin
      int cyc, exc_cycles;
      logic [SW-1:0] seen_sel;
      pattern = (t == 0) ? 8'hA5 : (t == 1) ? 8'h00 : (t == 2) ? 8'hFF : SW'($urandom);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 0; exc_cycles = 0; seen_sel = '0;
      // a second start while busy must be ignored
      if (t == 3) begin
        start = 1'b1; @(negedge clk); start = 1'b0; cyc++;
        if (excite) exc_cycles++;
      end
      while (!done && cyc < 100) begin
        if (excite) exc_cycles++;
        if (busy && !excite && dut.state == puf_ip_pkg::PUF_READ) seen_sel[sel] = 1'b1;
        @(negedge clk); cyc++;
      end
      expect_true($sformatf("done after %0d clocks", cyc), cyc == EC + 1 + SW);
      expect_true($sformatf("excite high for %0d clocks", exc_cycles), exc_cycles == EC);
      expect_true($sformatf("signature %h vs %h", signature, pattern), signature == pattern);
      expect_true("every cell read", seen_sel == '1);
      @(negedge clk);
      expect_true("done is a pulse", !done);
      repeat (3) @(negedge clk);
      expect_true("signature held", sig_valid && !busy && signature == pattern);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
