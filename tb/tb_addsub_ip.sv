// tb_addsub_ip: self-checking testbench of the adder/subtracter IP.
//
// Part 1 sweeps every A, B, ADD and C_IN value with CE high and checks S and
// C_OUT one clock later against integer arithmetic (latency 1). Part 2 drives
// random values on every control pin for many clocks and checks the output
// register against a reference that applies the priorities of the core:
// SCLR over SSET over SINIT, all three regardless of CE, and bypass only
// with CE high. Part 3 checks the power-on reset value.
module tb_addsub_ip;
  localparam int W = 4;
  localparam logic [W-1:0] INIT = 4'h9;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] a, b, s;
  logic add, c_in, ce, bypass, sclr, sset, sinit, c_out, hit;
  int checks = 0, failures = 0;

  addsub_ip #(.WIDTH(W), .INIT_VALUE(INIT)) dut (
    .clk, .rst_n, .a, .b, .add, .c_in, .ce, .bypass, .sclr, .sset, .sinit,
    .s, .c_out, .trojan_hit(hit)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] exp_s, input logic exp_c);
    checks++;
    if (s !== exp_s || c_out !== exp_c) begin
      failures++;
      $display("FAIL %s: s=%h c_out=%b expected s=%h c_out=%b", what, s, c_out, exp_s, exp_c);
    end
  endtask

  // Reference result of the arithmetic, written as signed integer math.
  function automatic void ref_arith(input int ai, input int bi, input bit ad, input bit ci,
                                    output logic [W-1:0] rs, output logic rc);
    int r;
    if (ad) begin
      r  = ai + bi + ci;
      rc = (r >= 16);
    end else begin
      r  = ai - bi - (ci ? 0 : 1);      // active-low borrow in
      rc = (r >= 0);                    // carry out 1 = no borrow
    end
    rs = W'(r & 15);
  endfunction

  logic [W-1:0] exp_s;
  logic exp_c;

  initial begin
    {a, b, add, c_in, ce, bypass, sclr, sset, sinit} = '0;
    #1 rst_n = 1'b0;
    #1;
    check("power-on value", 4'h0, 1'b0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Part 1: exhaustive arithmetic, one result per clock.
    ce = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      a = W'(i); b = W'(i >> 4); add = i[8]; c_in = i[9];
      ref_arith(int'(a), int'(b), add, c_in, exp_s, exp_c);
      @(posedge clk); #1;
      check("arith", exp_s, exp_c);
    end

    // Part 2: random controls against the priority reference.
    exp_s = s; exp_c = c_out;
    for (int i = 0; i < 4000; i++) begin
      logic [W-1:0] ns; logic nc;
      a = W'($urandom); b = W'($urandom); add = 1'($urandom); c_in = 1'($urandom);
      ce = 1'($urandom); bypass = 1'($urandom);
      sclr = ($urandom % 8) == 0; sset = ($urandom % 8) == 0; sinit = ($urandom % 8) == 0;
      ref_arith(int'(a), int'(b), add, c_in, ns, nc);
      if (sclr)        begin exp_s = '0;   exp_c = 1'b0; end
      else if (sset)   begin exp_s = '1;   exp_c = 1'b1; end
      else if (sinit)  begin exp_s = INIT; exp_c = 1'b0; end
      else if (ce && bypass) begin exp_s = b; exp_c = 1'b0; end
      else if (ce)     begin exp_s = ns;   exp_c = nc;   end
      @(posedge clk); #1;
      check("controls", exp_s, exp_c);
    end

    // Part 3: asynchronous power-on reset.
    rst_n = 1'b0; #1;
    check("reset", 4'h0, 1'b0);
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL clean IP reports a trojan"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
