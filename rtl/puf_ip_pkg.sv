// puf_ip_pkg: types and constants shared by the PUF-protected adder/subtracter.
//
// The signature is 8 bits wide because the Butterfly PUF is read for eight
// clock pulses to build it. The controller state type and the default
// compaction polynomial of the signature analyser also live here. The
// polynomial choice (x^8 + x^6 + x^5 + x^4 + 1, a primitive polynomial) is
// this design's own; the source design only says that the IP response is
// checked against a PUF signature.
package puf_ip_pkg;

  // Width of the PUF signature: one PUF bit per clock for eight clocks.
  localparam int unsigned SIG_WIDTH_DEF = 8;

  // Galois feedback taps (x^6, x^5, x^4, 1) of x^8 + x^6 + x^5 + x^4 + 1.
  localparam logic [7:0] MISR_POLY_DEF = 8'h71;

  // States of the PUF read-out controller.
  typedef enum logic [2:0] {
    PUF_IDLE   = 3'd0,   // waiting for start
    PUF_EXCITE = 3'd1,   // excite held high: cells at their unstable point
    PUF_SETTLE = 3'd2,   // excite released: cells fall into a stable state
    PUF_READ   = 3'd3,   // one response bit stored per clock
    PUF_DONE   = 3'd4    // signature complete, done pulse
  } puf_state_t;

endpackage
