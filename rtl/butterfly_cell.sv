// butterfly_cell: behavioural model of one Butterfly PUF cell (not synthesizable
// as a PUF; on silicon or an FPGA it is two cross-coupled latches).
//
// The real cell couples two latches so that each one's output feeds the
// other's input. While excite is high, one latch is cleared and the other
// preset, which forces the pair to an unstable operating point where the two
// nodes disagree. When excite falls the pair is released and falls into one of
// its two stable states; which one is decided by the small delay mismatch of
// the cross-coupling wires, fixed at manufacture and different from cell to
// cell and from device to device.
//
// The model replaces that physics with numbers. The mismatch is a signed
// integer in [-128, 127] drawn from a hash of DEVICE_SEED and CELL_INDEX, so
// every (device, cell) pair has its own fixed bias. On each falling edge of
// excite the model adds pseudo-random noise, uniform in [-NOISE, NOISE] and resolves to 1
// if the sum is positive. Cells whose mismatch is smaller than the noise
// sometimes resolve the other way, which is what limits the reliability of a
// real PUF. With NOISE = 8 about 2 to 3% of bits flip between reads.
//
// Interface and timing: excite is level-sensitive and asynchronous; out reads
// 0 while excite is high and holds the resolved bit from the falling edge of
// excite until excite rises again. The mismatch model and noise level are this
// design's own; the excite sequence follows the source design.
module butterfly_cell #(
  parameter int unsigned DEVICE_SEED = 32'd1,
  parameter int unsigned CELL_INDEX  = 32'd0,
  parameter int unsigned NOISE       = 32'd8
) (
  input  logic excite,  // 1 = hold at the unstable point, 0 = release
  output logic out      // settled latch value
);

  // 32-bit integer mixer (avalanche finaliser) standing in for process variation.
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  localparam int unsigned HASH     = mix32(mix32(DEVICE_SEED) ^ (CELL_INDEX * 32'h9e3779b9));
  localparam int          MISMATCH = int'(HASH[31:24]) - 128;

  // Read-to-read noise: a per-cell xorshift generator, advanced on every
  // release, gives a uniform value in [-NOISE, NOISE].
  localparam int unsigned NOISE_SEED = mix32(HASH ^ 32'h5bd1e995) | 32'd1;

  logic [31:0] noise_state;

  function automatic logic [31:0] xorshift32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  logic        settled;
  logic [31:0] noise_next;
  logic        settle_value;

  initial begin
    settled     = 1'b0;
    noise_state = NOISE_SEED;
  end

  always_comb begin
    noise_next   = xorshift32(noise_state);
    settle_value = (MISMATCH + int'(noise_next % (2 * NOISE + 1)) - int'(NOISE)) >= 0;
  end

  // Release: the pair falls into the state its mismatch plus noise favours.
  always @(negedge excite) begin
    noise_state <= noise_next;
    settled     <= settle_value;
  end

  assign out = excite ? 1'b0 : settled;

endmodule
