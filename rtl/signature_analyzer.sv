// signature_analyzer: checks the IP's responses against a PUF-keyed signature.
//
// A multiple-input signature register (MISR) compacts every response word
// of the IP into a SIG_WIDTH-bit signature. It is seeded with the device's
// PUF signature (seed_load), so the same stream of results gives a different
// signature on every device and a reference signature cannot be reused on
// another chip. Each clock with en high shifts the register left by one,
// XORs POLY in when the bit shifted out was 1 (Galois form), and XORs in the
// response word, zero-extended. On check the current signature is compared
// with golden; tamper is set if they differ and stays set until the next
// seed_load. match is the combinational comparison.
//
// Timing: seed_load, en and check are sampled on the rising clock edge; sig
// and tamper change one clock later. seed_load takes priority over en.
// rst_n is asynchronous, active low.
//
// The source design names signature analysis of the IP response with a PUF
// signature but does not describe its circuit. The MISR, its polynomial and
// the golden comparison are this design's own.
module signature_analyzer
  import puf_ip_pkg::*;
#(
  parameter int unsigned          SIG_WIDTH  = SIG_WIDTH_DEF,
  parameter int unsigned          DATA_WIDTH = 5,
  parameter logic [SIG_WIDTH-1:0] POLY       = SIG_WIDTH'(MISR_POLY_DEF)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  seed_load,  // load the PUF signature
  input  logic [SIG_WIDTH-1:0]  seed,
  input  logic                  en,         // compact data this clock
  input  logic [DATA_WIDTH-1:0] data,       // IP response word
  input  logic                  check,      // compare with golden
  input  logic [SIG_WIDTH-1:0]  golden,     // reference signature
  output logic [SIG_WIDTH-1:0]  sig,
  output logic                  match,
  output logic                  tamper      // sticky mismatch flag
);

  logic [SIG_WIDTH-1:0] next_sig;

  always_comb begin
    next_sig = {sig[SIG_WIDTH-2:0], 1'b0};
    if (sig[SIG_WIDTH-1]) next_sig = next_sig ^ POLY;
    next_sig = next_sig ^ SIG_WIDTH'(data);
    match    = (sig == golden);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig    <= '0;
      tamper <= 1'b0;
    end else begin
      if (seed_load) begin
        sig    <= seed;
        tamper <= 1'b0;
      end else begin
        if (en) sig <= next_sig;
        if (check && !match) tamper <= 1'b1;
      end
    end
  end

  initial begin
    assert (DATA_WIDTH <= SIG_WIDTH)
      else $error("signature_analyzer: DATA_WIDTH must not exceed SIG_WIDTH");
  end

endmodule
