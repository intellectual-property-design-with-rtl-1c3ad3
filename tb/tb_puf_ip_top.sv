// tb_puf_ip_top: end-to-end test of the PUF-protected adder/subtracter.
//
// Three copies of the design run side by side on the same stimulus:
//   clean  - device 5, no trojan
//   trojan - device 5 (the same silicon), with the demonstration trojan
//   other  - device 6, no trojan
// PUF noise is off so that the device signatures are exactly repeatable.
// The test generates the signatures (and checks the PUF latency), checks that
// the same device gives the same signature and another device a different
// one, then runs random operations that exercise every IP control and hit the
// trojan trigger. The IP results are checked against an integer reference,
// and the expected response signature is built from the reference results
// seeded with the device signature. At the end the clean copy must pass the
// signature check and the trojan copy must be caught (tamper). A second PUF
// generation must re-seed and clear tamper. Each mechanism is counted and a
// failure is counted for any that never happened.
module tb_puf_ip_top;
  localparam int W = 4, SW = 8, EC = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] a, b;
  logic add, c_in, ce, bypass, sclr, sset, sinit, puf_start, sa_check;
  logic [SW-1:0] golden_c, golden_t, golden_o;

  logic [W-1:0]  s_c, s_t, s_o;
  logic          co_c, co_t, co_o;
  logic          busy_c, busy_t, busy_o, sv_c, sv_t, sv_o, ex_c, ex_t, ex_o;
  logic [SW-1:0] sig_c, sig_t, sig_o, rs_c, rs_t, rs_o;
  logic          tmp_c, tmp_t, tmp_o, hit_c, hit_t, hit_o;

  puf_ip_top #(.DEVICE_SEED(5), .NOISE(0), .TROJAN_EN(1'b0)) u_clean (
    .clk, .rst_n, .a, .b, .add, .c_in, .ce, .bypass, .sclr, .sset, .sinit,
    .s(s_c), .c_out(co_c), .puf_start, .puf_busy(busy_c), .sig_valid(sv_c),
    .signature(sig_c), .puf_excite(ex_c), .sa_check, .golden(golden_c),
    .resp_sig(rs_c), .tamper(tmp_c), .trojan_hit(hit_c));
  puf_ip_top #(.DEVICE_SEED(5), .NOISE(0), .TROJAN_EN(1'b1)) u_trojan (
    .clk, .rst_n, .a, .b, .add, .c_in, .ce, .bypass, .sclr, .sset, .sinit,
    .s(s_t), .c_out(co_t), .puf_start, .puf_busy(busy_t), .sig_valid(sv_t),
    .signature(sig_t), .puf_excite(ex_t), .sa_check, .golden(golden_t),
    .resp_sig(rs_t), .tamper(tmp_t), .trojan_hit(hit_t));
  puf_ip_top #(.DEVICE_SEED(6), .NOISE(0), .TROJAN_EN(1'b0)) u_other (
    .clk, .rst_n, .a, .b, .add, .c_in, .ce, .bypass, .sclr, .sset, .sinit,
    .s(s_o), .c_out(co_o), .puf_start, .puf_busy(busy_o), .sig_valid(sv_o),
    .signature(sig_o), .puf_excite(ex_o), .sa_check, .golden(golden_o),
    .resp_sig(rs_o), .tamper(tmp_o), .trojan_hit(hit_o));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_excite = 0, n_trigger = 0, n_corrupt = 0, n_bypass = 0, n_sclr = 0, n_sset = 0,
      n_sinit = 0, n_hold = 0, n_sub = 0, n_carry = 0, n_detect = 0, n_reseed = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [SW-1:0] misr(input logic [SW-1:0] s, input logic [W:0] d);
    logic [SW:0] p;
    p = {s, 1'b0};
    if (p[SW]) p = p ^ 9'b1_0111_0001;     // x^8 + x^6 + x^5 + x^4 + 1
    return p[SW-1:0] ^ SW'(d);
  endfunction

  task automatic gen_signature();
    int cyc = 0;
    @(negedge clk) puf_start = 1'b1;
    @(negedge clk) puf_start = 1'b0;
    if (ex_c) n_excite++;
    while (!sv_c && cyc < 100) begin @(negedge clk); cyc++; end
    // sig_valid rises with done, EXCITE + settle + 8 reads after start
    expect_true($sformatf("PUF latency %0d", cyc), cyc == EC + 1 + SW);
    expect_true("all three signatures ready", sv_c && sv_t && sv_o);
  endtask

  logic [W-1:0] ref_s;
  logic         ref_c;
  logic [SW-1:0] ref_sig;

  initial begin
    logic [SW-1:0] first_sig;
    {a, b, add, c_in, ce, bypass, sclr, sset, sinit, puf_start, sa_check} = '0;
    golden_c = '0; golden_t = '0; golden_o = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Signature generation: same device, same signature; another, different.
    gen_signature();
    first_sig = sig_c;
    expect_true("same device same signature", sig_c == sig_t);
    expect_true("different device different signature", sig_c != sig_o);
    gen_signature();
    expect_true("signature repeatable", sig_c == first_sig);
    n_reseed++;

    ref_s = s_c; ref_c = co_c;
    ref_sig = sig_c;
    // Random operations; the response register is compacted one clock after
    // each write. Drive at negedge, check after the next posedge.
    for (int i = 0; i < 600; i++) begin
      logic [W:0] r;
      logic wr;
      int pick;
      pick = int'($urandom % 20);
      a = W'($urandom); b = W'($urandom); add = 1'($urandom); c_in = 1'($urandom);
      ce = ($urandom % 6) != 0; bypass = (pick == 1);
      sclr = (pick == 2); sset = (pick == 3); sinit = (pick == 4);
      if (pick == 5) begin a = 4'hA; b = 4'h5; add = 1'b1; ce = 1'b1; end
      wr = ce | sclr | sset | sinit;
      #1;
      if (hit_t) n_trigger++;
      if (sclr) begin ref_s = '0; ref_c = 1'b0; n_sclr++; end
      else if (sset) begin ref_s = '1; ref_c = 1'b1; n_sset++; end
      else if (sinit) begin ref_s = '0; ref_c = 1'b0; n_sinit++; end
      else if (ce && bypass) begin ref_s = b; ref_c = 1'b0; n_bypass++; end
      else if (ce) begin
        if (add) r = {1'b0, a} + {1'b0, b} + (W+1)'(c_in);
        else begin r = {1'b0, a} - {1'b0, b} - (W+1)'(!c_in); r[W] = ~r[W]; n_sub++; end
        ref_s = r[W-1:0]; ref_c = r[W];
        if (r[W]) n_carry++;
      end else n_hold++;
      @(negedge clk);
      expect_true($sformatf("clean result %h/%b vs %h/%b", s_c, co_c, ref_s, ref_c),
                  s_c == ref_s && co_c == ref_c);
      if (s_t != s_c) n_corrupt++;
      if (wr) ref_sig = misr(ref_sig, {ref_c, ref_s});
    end
    {ce, sclr, sset, sinit, bypass} = '0;
    @(negedge clk);
    @(negedge clk);
    expect_true($sformatf("clean response signature %h vs %h", rs_c, ref_sig), rs_c == ref_sig);

    // Check phase: each device against the reference for its own signature.
    golden_c = ref_sig; golden_t = ref_sig; golden_o = ref_sig;
    sa_check = 1'b1;
    @(negedge clk);
    sa_check = 1'b0;
    expect_true("clean IP passes", !tmp_c);
    expect_true("trojan IP caught", tmp_t);
    expect_true("other device's response signature differs", tmp_o);
    if (tmp_t) n_detect++;

    // Re-generation re-seeds the analyser and clears tamper.
    gen_signature();
    n_reseed++;
    @(negedge clk);                    // seed loads on the clock after done
    expect_true("tamper cleared by re-seed", !tmp_t && rs_t == sig_t);

    $display("excite=%0d trigger=%0d corrupt=%0d bypass=%0d sclr=%0d sset=%0d sinit=%0d hold=%0d sub=%0d carry=%0d detect=%0d reseed=%0d",
             n_excite, n_trigger, n_corrupt, n_bypass, n_sclr, n_sset, n_sinit, n_hold, n_sub,
             n_carry, n_detect, n_reseed);
    expect_true("excite phase seen", n_excite > 0);
    expect_true("trojan triggered", n_trigger > 0);
    expect_true("trojan corrupted output", n_corrupt > 0);
    expect_true("bypass seen", n_bypass > 0);
    expect_true("sclr seen", n_sclr > 0);
    expect_true("sset seen", n_sset > 0);
    expect_true("sinit seen", n_sinit > 0);
    expect_true("ce hold seen", n_hold > 0);
    expect_true("subtract seen", n_sub > 0);
    expect_true("carry out seen", n_carry > 0);
    expect_true("tamper detected", n_detect > 0);
    expect_true("re-seed seen", n_reseed > 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
