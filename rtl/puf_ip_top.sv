// puf_ip_top: adder/subtracter IP protected by a Butterfly PUF signature.
//
// The design pairs a small IP core with a physically unclonable function so
// that the IP's behaviour can be tied to one physical device and checked for
// tampering. It has three parts:
//   * addsub_ip          the registered WIDTH-bit adder/subtracter (optionally
//                        carrying the demonstration trojan, TROJAN_EN = 1);
//   * bf_puf_array +     the Butterfly PUF and its controller, which excite
//     puf_controller     the cells, release them and store one response bit
//                        per clock into the 8-bit signature register;
//   * signature_analyzer a MISR seeded with the PUF signature that compacts
//                        every result the IP produces and compares it with a
//                        reference signature to raise tamper.
//
// Use: pulse puf_start; sig_valid rises EXCITE_CYCLES + 1 + SIG_WIDTH clocks
// later with the device signature on signature, and the analyser is seeded
// with it in the same clock. From then on, every clock in which the IP's
// output register was written (ce, sclr, sset or sinit high in the clock
// before) compacts {c_out, s} into resp_sig. Pulse sa_check with the
// expected signature on golden: tamper is set if they differ and stays set
// until the next PUF generation.
//
// The IP, its options and the PUF excite sequence follow the source design;
// the way the PUF signature is combined with the IP response (MISR seeding
// and golden comparison) is this design's own.
module puf_ip_top
  import puf_ip_pkg::*;
#(
  parameter int unsigned      WIDTH         = 4,
  parameter int unsigned      SIG_WIDTH     = SIG_WIDTH_DEF,
  parameter int unsigned      EXCITE_CYCLES = 4,
  parameter int unsigned      DEVICE_SEED   = 32'd1,
  parameter int unsigned      NOISE         = 32'd8,
  parameter bit               TROJAN_EN     = 1'b0,
  parameter logic [WIDTH-1:0] INIT_VALUE    = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // adder/subtracter IP
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  input  logic                 add,
  input  logic                 c_in,
  input  logic                 ce,
  input  logic                 bypass,
  input  logic                 sclr,
  input  logic                 sset,
  input  logic                 sinit,
  output logic [WIDTH-1:0]     s,
  output logic                 c_out,
  // PUF
  input  logic                 puf_start,
  output logic                 puf_busy,
  output logic                 sig_valid,
  output logic [SIG_WIDTH-1:0] signature,
  output logic                 puf_excite,
  // signature analysis
  input  logic                 sa_check,
  input  logic [SIG_WIDTH-1:0] golden,
  output logic [SIG_WIDTH-1:0] resp_sig,
  output logic                 tamper,
  // observation of the demonstration trojan (0 when TROJAN_EN = 0)
  output logic                 trojan_hit
);

  localparam int unsigned SEL_W = (SIG_WIDTH > 1) ? $clog2(SIG_WIDTH) : 1;

  logic             puf_done, puf_bit;
  logic [SEL_W-1:0] puf_sel;
  logic             resp_written;

  addsub_ip #(
    .WIDTH(WIDTH), .INIT_VALUE(INIT_VALUE), .TROJAN_EN(TROJAN_EN)
  ) u_ip (
    .clk, .rst_n, .a, .b, .add, .c_in, .ce, .bypass, .sclr, .sset, .sinit,
    .s, .c_out, .trojan_hit
  );

  bf_puf_array #(
    .N_CELLS(SIG_WIDTH), .DEVICE_SEED(DEVICE_SEED), .NOISE(NOISE)
  ) u_puf (
    .excite(puf_excite), .sel(puf_sel), .bit_out(puf_bit), .resp()
  );

  puf_controller #(
    .SIG_WIDTH(SIG_WIDTH), .EXCITE_CYCLES(EXCITE_CYCLES)
  ) u_ctrl (
    .clk, .rst_n, .start(puf_start), .excite(puf_excite), .sel(puf_sel),
    .puf_bit, .signature, .sig_valid, .done(puf_done), .busy(puf_busy)
  );

  // The IP output register was written in the previous clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) resp_written <= 1'b0;
    else        resp_written <= ce | sclr | sset | sinit;
  end

  signature_analyzer #(
    .SIG_WIDTH(SIG_WIDTH), .DATA_WIDTH(WIDTH + 1)
  ) u_sa (
    .clk, .rst_n,
    .seed_load(puf_done), .seed(signature),
    .en(resp_written && sig_valid), .data({c_out, s}),
    .check(sa_check), .golden, .sig(resp_sig), .match(), .tamper
  );

endmodule
