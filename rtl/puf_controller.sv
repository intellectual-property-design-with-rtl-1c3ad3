// puf_controller: excites the Butterfly PUF and collects its signature.
//
// On start the controller raises excite for EXCITE_CYCLES clocks, which
// drives every PUF cell to its unstable point. It then drops excite and
// waits one clock for the cells to settle. Then, for SIG_WIDTH clocks, it
// steps sel from 0 upwards and stores puf_bit into bit sel of the signature
// register: one PUF bit per clock pulse. After the last bit it pulses done
// and raises sig_valid, which stays high with the signature until the next
// start.
//
// Timing: with start sampled high at clock edge 0, done is high in the cycle
// after edge EXCITE_CYCLES + 1 + SIG_WIDTH (13 clocks at the defaults).
// start is ignored while busy. rst_n is asynchronous, active low, and clears
// the signature register.
//
// The excite-high / excite-low sequence and the 8-bit signature register
// follow the source design; "a few clock pulses" of excitation is taken as
// four, and the settle cycle and handshake are this design's own.
module puf_controller
  import puf_ip_pkg::*;
#(
  parameter int unsigned SIG_WIDTH     = SIG_WIDTH_DEF,
  parameter int unsigned EXCITE_CYCLES = 4,
  localparam int unsigned SEL_W        = (SIG_WIDTH > 1) ? $clog2(SIG_WIDTH) : 1,
  localparam int unsigned CNT_W        = $clog2(((EXCITE_CYCLES > SIG_WIDTH) ? EXCITE_CYCLES : SIG_WIDTH) + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,      // begin a signature generation
  output logic                 excite,     // to the PUF cells
  output logic [SEL_W-1:0]     sel,        // PUF cell being read
  input  logic                 puf_bit,    // settled bit of cell sel
  output logic [SIG_WIDTH-1:0] signature,  // signature register
  output logic                 sig_valid,  // signature complete and held
  output logic                 done,       // one-cycle pulse when complete
  output logic                 busy
);

  puf_state_t       state;
  logic [CNT_W-1:0] cnt;

  assign excite = (state == PUF_EXCITE);
  assign busy   = (state != PUF_IDLE) && (state != PUF_DONE);
  assign done   = (state == PUF_DONE);
  assign sel    = SEL_W'(cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= PUF_IDLE;
      cnt       <= '0;
      signature <= '0;
      sig_valid <= 1'b0;
    end else begin
      unique case (state)
        PUF_IDLE, PUF_DONE: begin
          if (start) begin
            state     <= PUF_EXCITE;
            cnt       <= '0;
            sig_valid <= 1'b0;
          end else begin
            state <= PUF_IDLE;
          end
        end
        PUF_EXCITE: begin
          if (cnt == CNT_W'(EXCITE_CYCLES - 1)) begin
            state <= PUF_SETTLE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PUF_SETTLE: begin
          state <= PUF_READ;
          cnt   <= '0;
        end
        PUF_READ: begin
          signature[sel] <= puf_bit;
          if (cnt == CNT_W'(SIG_WIDTH - 1)) begin
            state     <= PUF_DONE;
            cnt       <= '0;
            sig_valid <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= PUF_IDLE;
      endcase
    end
  end

  // excite must be released before any bit is read.
  a_no_read_while_excited: assert property (@(posedge clk) disable iff (!rst_n)
    (state == PUF_READ) |-> !excite);

endmodule
