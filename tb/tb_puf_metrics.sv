// tb_puf_metrics: uniqueness and reliability of the Butterfly PUF signature.
//
// Four sets of P = 8 devices (different device seeds per set, and a
// different excitation length per set: 2, 3, 4 and 5 clocks), each a PUF
// array with its read-out controller at the default noise level, generate
// their 8-bit signature S = 20 times. For each set the test computes
//   uniqueness  = 2 / (P (P - 1)) * sum_{i<j} HD(X_i, X_j) / n * 100 %
//   reliability = 100 % - mean over devices and reads of HD(X_i, X_i,t) / n
// with X_i the first signature of device i, and checks uniqueness within
// 35..65 % (ideal 50 %) and reliability of at least 90 % (ideal 100 %).
// The reliability must also stay below 100 % over all sets, since the noise
// model makes marginal cells flip.
module tb_puf_metrics;
  localparam int SETS = 4, P = 8, S = 20, N = 8;
  localparam int D = SETS * P;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [D-1:0] excite, pbit, sv, done, busy;
  logic [2:0]   sel [D];
  logic [N-1:0] sig [D];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < D; d++) begin : g_dev
    bf_puf_array #(.N_CELLS(N), .DEVICE_SEED(32'd1000 * (d / P + 1) + d % P)) u_puf (
      .excite(excite[d]), .sel(sel[d]), .bit_out(pbit[d]), .resp());
    puf_controller #(.SIG_WIDTH(N), .EXCITE_CYCLES(2 + d / P)) u_ctrl (
      .clk, .rst_n, .start, .excite(excite[d]), .sel(sel[d]), .puf_bit(pbit[d]),
      .signature(sig[d]), .sig_valid(sv[d]), .done(done[d]), .busy(busy[d]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hd(input logic [N-1:0] x, input logic [N-1:0] y);
    int c = 0;
    for (int k = 0; k < N; k++) if (x[k] != y[k]) c++;
    return c;
  endfunction

  logic [N-1:0] ref_sig [D];
  int intra [D];

  initial begin
    real uq, re, re_all;
    int flips_total = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int d = 0; d < D; d++) intra[d] = 0;
    for (int t = 0; t <= S; t++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (&sv);
      @(negedge clk);
      for (int d = 0; d < D; d++) begin
        if (t == 0) ref_sig[d] = sig[d];
        else intra[d] += hd(ref_sig[d], sig[d]);
      end
    end
    re_all = 0.0;
    for (int k = 0; k < SETS; k++) begin
      int inter;
      inter = 0;
      for (int i = k * P; i < (k + 1) * P - 1; i++)
        for (int j = i + 1; j < (k + 1) * P; j++) inter += hd(ref_sig[i], ref_sig[j]);
      uq = 2.0 / (P * (P - 1)) * inter / N * 100.0;
      re = 0.0;
      for (int i = k * P; i < (k + 1) * P; i++) begin
        re += 100.0 - (100.0 * intra[i]) / (S * N);
        flips_total += intra[i];
      end
      re = re / P;
      re_all += re / SETS;
      $display("set %0d: reliability %6.2f %%  uniqueness %6.2f %%", k + 1, re, uq);
      checks++;
      if (uq < 35.0 || uq > 65.0) begin failures++; $display("FAIL uniqueness out of range"); end
      checks++;
      if (re < 90.0) begin failures++; $display("FAIL reliability too low"); end
    end
    checks++;
    if (flips_total == 0) begin failures++; $display("FAIL no read-to-read noise at all"); end
    $display("average reliability %6.2f %%", re_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
