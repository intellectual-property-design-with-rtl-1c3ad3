// bf_puf_array: the Butterfly PUF of the design, N_CELLS cells read one bit
// per clock.
//
// All cells share one excite line. After excite has fallen each cell holds
// its own settled bit; the read-out multiplexer presents the cell chosen by
// sel on bit_out, so the controller can take one response bit per clock
// pulse and fill an N_CELLS-bit signature in N_CELLS clocks. The whole
// response word is also brought out on resp.
//
// Contains behavioural models (butterfly_cell) and is therefore a model as a
// whole; the multiplexer is plain logic. The source design reads the PUF for
// eight clock pulses to get an 8-bit signature; that the eight bits come from
// eight cells chosen in turn is this design's reading of it, since one cell
// resolves to the same value on every excitation.
module bf_puf_array #(
  parameter int unsigned N_CELLS     = 8,
  parameter int unsigned DEVICE_SEED = 32'd1,
  parameter int unsigned NOISE       = 32'd8,
  localparam int unsigned SEL_W      = (N_CELLS > 1) ? $clog2(N_CELLS) : 1
) (
  input  logic               excite,   // shared excite line
  input  logic [SEL_W-1:0]   sel,      // cell to read
  output logic               bit_out,  // settled bit of cell sel
  output logic [N_CELLS-1:0] resp      // all settled bits
);

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    butterfly_cell #(
      .DEVICE_SEED(DEVICE_SEED), .CELL_INDEX(i), .NOISE(NOISE)
    ) u_cell (
      .excite(excite), .out(resp[i])
    );
  end

  always_comb begin
    bit_out = 1'b0;
    for (int i = 0; i < N_CELLS; i++)
      if (SEL_W'(i) == sel) bit_out = resp[i];
  end

endmodule
