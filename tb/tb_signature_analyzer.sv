// tb_signature_analyzer: checks the MISR and the tamper flag.
//
// The reference signature is computed as polynomial arithmetic over GF(2):
// each step is sig * x mod (x^8 + x^6 + x^5 + x^4 + 1) plus the data word,
// reduced with an explicit degree-8 test. Random seeds and streams (with
// random en gaps) are compacted; then check with the right golden must keep
// tamper low, a wrong golden must set it, and it must stay set until the
// next seed_load.
module tb_signature_analyzer;
  localparam int SW = 8, DW = 5;
  logic clk = 1'b0, rst_n = 1'b1;
  logic seed_load = 0, en = 0, check = 0, match, tamper;
  logic [SW-1:0] seed, golden, sig;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;

  signature_analyzer #(.SIG_WIDTH(SW), .DATA_WIDTH(DW)) dut (
    .clk, .rst_n, .seed_load, .seed, .en, .data, .check, .golden, .sig, .match, .tamper
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [SW-1:0] step(input logic [SW-1:0] s, input logic [DW-1:0] d);
    logic [SW:0] p;
    p = {s, 1'b0};                          // multiply by x
    if (p[SW]) p = p ^ 9'b1_0111_0001;      // subtract the polynomial
    return p[SW-1:0] ^ {3'b000, d};
  endfunction

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [SW-1:0] r;
    golden = '0; seed = '0; data = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      seed = SW'($urandom); seed_load = 1'b1; en = 1'b1; data = DW'($urandom);
      r = seed;
      @(negedge clk);
      seed_load = 1'b0;
      expect_true("seeded", sig == r && !tamper);
      for (int i = 0; i < 40; i++) begin
        en = 1'($urandom); data = DW'($urandom);
        if (en) r = step(r, data);
        @(negedge clk);
        expect_true($sformatf("sig %h vs %h", sig, r), sig == r);
      end
      en = 1'b0;
      golden = r; check = 1'b1;
      @(negedge clk);
      expect_true("right golden keeps tamper low", !tamper && match);
      golden = r ^ SW'(1 << (t % SW));
      @(negedge clk);
      expect_true("wrong golden sets tamper", tamper && !match);
      golden = r;                      // a later matching check must not clear it
      @(negedge clk);
      check = 1'b0;
      expect_true("tamper is sticky", tamper && match);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
