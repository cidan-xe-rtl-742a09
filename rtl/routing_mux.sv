// routing_mux: selects the bit that drives one input of an artificial neuron.
//
// Sources (5-bit select): 0 = constant 0, 1 = constant 1, 2 = the neuron's
// own output (feedback), 3..11 = the nine neighbour lines, 12..27 = the 16
// bits of the neuron's local register (R_BUS). Codes 28..31 select 0. The
// selected bit is then inverted when inv is high.
//
// The twelve neighbour/feedback/constant sources, the 16 register bits and
// the 5-bit select follow the source design. The inversion bit is this
// design's own: the complemented inputs drawn in the source design's adder
// and comparator schedules need it. Purely combinational.
module routing_mux
  import cidan_pkg::*;
(
  input  logic [SEL_W-1:0]    sel,
  input  logic                inv,
  input  logic                fb,
  input  logic [NBR_BITS-1:0] nbr,
  input  logic [REG_BITS-1:0] rbus,
  output logic                y
);

  logic [31:0] src;

  always_comb begin
    src = '0;
    src[0] = 1'b0;
    src[1] = 1'b1;
    src[2] = fb;
    src[SRC_NBR0 +: NBR_BITS] = nbr;
    src[SRC_REG0 +: REG_BITS] = rbus;
    y = src[sel] ^ inv;
  end

endmodule
