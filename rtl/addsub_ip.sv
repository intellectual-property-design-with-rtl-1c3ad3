// addsub_ip: registered adder/subtracter IP core with PUF-protection hooks.
//
// The core follows the customisation of a standard FPGA adder/subtracter
// IP: a WIDTH-bit A and B, an ADD pin (1 = A + B + C_IN, 0 = subtract),
// carry in and carry out, a clock enable, a bypass that loads B into the
// output register, and synchronous clear (SCLR), set (SSET) and init (SINIT)
// controls. The priorities are those the customisation selects:
//   * reset overrides set          (SCLR wins over SSET, SSET over SINIT)
//   * sync controls override CE    (SCLR/SSET/SINIT act even when CE = 0)
//   * CE overrides bypass          (bypass only loads B when CE = 1)
// Borrow sense is active low: in subtract mode C_IN = 1 means "no borrow in"
// and C_OUT = 1 means "no borrow out", so S = A + ~B + C_IN.
//
// Timing: latency one clock. S and C_OUT are registers updated on the rising
// edge of clk. rst_n is an asynchronous, active-low power-on reset that loads
// POR_VALUE; the FPGA core has no reset pin and gets this value from its
// flip-flop init, which this port stands for.
//
// With TROJAN_EN = 1 the combinational trojan of hw_trojan is placed between
// the adder and the register; this is how the source design corrupts the IP
// to validate its protection. SSET loads all ones and SINIT loads INIT_VALUE
// into S; what C_OUT does under SSET, SINIT and bypass is not given, and
// here it is set by SSET and cleared by the others.
module addsub_ip #(
  parameter int unsigned      WIDTH      = 4,
  parameter logic [WIDTH-1:0] INIT_VALUE = '0,
  parameter logic [WIDTH-1:0] POR_VALUE  = '0,
  parameter bit               TROJAN_EN  = 1'b0,
  parameter logic [WIDTH-1:0] TRIG_A     = WIDTH'('hA),
  parameter logic [WIDTH-1:0] TRIG_B     = WIDTH'('h5)
) (
  input  logic             clk,
  input  logic             rst_n,     // power-on reset, active low, async
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             add,       // 1 = add, 0 = subtract
  input  logic             c_in,      // carry in / active-low borrow in
  input  logic             ce,        // clock enable
  input  logic             bypass,    // active high: load B
  input  logic             sclr,      // synchronous clear
  input  logic             sset,      // synchronous set
  input  logic             sinit,     // synchronous init to INIT_VALUE
  output logic [WIDTH-1:0] s,
  output logic             c_out,     // carry out / active-low borrow out
  output logic             trojan_hit // trojan trigger present (0 if none)
);

  logic [WIDTH:0]   raw;
  logic [WIDTH-1:0] sum_clean, sum_final;

  always_comb begin
    if (add) raw = {1'b0, a} + {1'b0, b}  + (WIDTH+1)'(c_in);
    else     raw = {1'b0, a} + {1'b0, ~b} + (WIDTH+1)'(c_in);
    sum_clean = raw[WIDTH-1:0];
  end

  if (TROJAN_EN) begin : g_trojan
    hw_trojan #(.WIDTH(WIDTH), .TRIG_A(TRIG_A), .TRIG_B(TRIG_B)) u_trojan (
      .a(a), .b(b), .add(add), .sum_in(sum_clean),
      .sum_out(sum_final), .triggered(trojan_hit)
    );
  end else begin : g_clean
    assign sum_final  = sum_clean;
    assign trojan_hit = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s     <= POR_VALUE;
      c_out <= 1'b0;
    end else if (sclr) begin
      s     <= '0;
      c_out <= 1'b0;
    end else if (sset) begin
      s     <= '1;
      c_out <= 1'b1;
    end else if (sinit) begin
      s     <= INIT_VALUE;
      c_out <= 1'b0;
    end else if (ce) begin
      if (bypass) begin
        s     <= b;
        c_out <= 1'b0;
      end else begin
        s     <= sum_final;
        c_out <= raw[WIDTH];
      end
    end
  end

endmodule
