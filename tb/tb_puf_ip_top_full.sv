// tb_puf_ip_top_full: one complete operation of the design at its default
// parameters (4-bit IP, 8-bit signature, device 1, PUF noise on, no trojan).
//
// It generates the device signature, runs 64 random add/subtract operations
// and checks each result, predicts the response signature from the device
// signature and the reference results, and checks that the analyser accepts
// the right reference and flags a wrong one.
module tb_puf_ip_top_full;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0] a, b, s;
  logic add, c_in, ce, bypass, sclr, sset, sinit, c_out, puf_start, sa_check;
  logic puf_busy, sig_valid, puf_excite, tamper, trojan_hit;
  logic [7:0] signature, golden, resp_sig;
  int checks = 0, failures = 0;

  puf_ip_top dut (
    .clk, .rst_n, .a, .b, .add, .c_in, .ce, .bypass, .sclr, .sset, .sinit, .s, .c_out,
    .puf_start, .puf_busy, .sig_valid, .signature, .puf_excite, .sa_check, .golden,
    .resp_sig, .tamper, .trojan_hit
  );

  always #5 clk = ~clk;

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

  function automatic logic [7:0] misr(input logic [7:0] st, input logic [4:0] d);
    logic [8:0] p;
    p = {st, 1'b0};
    if (p[8]) p = p ^ 9'b1_0111_0001;
    return p[7:0] ^ {3'b000, d};
  endfunction

  initial begin
    logic [7:0] ref_sig;
    logic [4:0] r;
    int cyc = 0;
    {a, b, add, c_in, ce, bypass, sclr, sset, sinit, puf_start, sa_check} = '0;
    golden = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    @(negedge clk) puf_start = 1'b1;
    @(negedge clk) puf_start = 1'b0;
    expect_true("excite raised", puf_excite);
    while (!sig_valid && cyc < 100) begin @(negedge clk); cyc++; end
    expect_true($sformatf("signature after %0d clocks", cyc), cyc == 13);
    @(negedge clk);                         // analyser seeded
    expect_true("analyser seeded", resp_sig == signature);
    ref_sig = signature;

    ce = 1'b1;
    for (int i = 0; i < 64; i++) begin
      a = 4'($urandom); b = 4'($urandom); add = 1'($urandom); c_in = 1'($urandom);
      if (add) r = {1'b0, a} + {1'b0, b} + 5'(c_in);
      else begin r = {1'b0, a} + {1'b0, ~b} + 5'(c_in); end
      @(negedge clk);
      expect_true($sformatf("result %h/%b vs %h/%b", s, c_out, r[3:0], r[4]), {c_out, s} == r);
      ref_sig = misr(ref_sig, r);
    end
    ce = 1'b0;
    @(negedge clk);
    expect_true($sformatf("response signature %h vs %h", resp_sig, ref_sig), resp_sig == ref_sig);
    golden = ref_sig; sa_check = 1'b1;
    @(negedge clk);
    expect_true("right reference accepted", !tamper);
    golden = ~ref_sig;
    @(negedge clk);
    sa_check = 1'b0;
    expect_true("wrong reference flagged", tamper);
    expect_true("no trojan in the default design", !trojan_hit);
    $display("device signature %h, response signature %h", signature, ref_sig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
