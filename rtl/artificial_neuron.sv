// artificial_neuron: one threshold logic gate (artificial neuron, AN) with
// weights [a=1, b=1, c=1, d=2] and a run-time threshold T.
//
// On each rising clock edge with en high the output q becomes
// (a + b + c + 2*d >= T). With en low q holds. In silicon this is a
// mixed-signal, edge-triggered circuit that compares the conductance of two
// transistor networks; here its logic function is written as synthesizable
// RTL: an adder of the weighted inputs, a comparator and a flip-flop.
//
// Interface: x[0..3] are inputs a, b, c, d after routing; thr is T (the
// source design uses 1, 2 and 3; T=0 makes q=1). An input that is not in use
// is driven with 0 by its routing mux, which plays the part of the branch
// enables of the circuit. Timing: one cycle, q is registered.
// The weights, the threshold range and the edge-triggered output follow the
// source design; the synchronous active-low reset to 0 is this design's own.
module artificial_neuron
  import cidan_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [AN_INPUTS-1:0] x,
  input  logic [1:0]           thr,
  output logic                 q
);

  logic [2:0] wsum;
  logic       fire;

  always_comb begin
    wsum = 3'(x[0]) + 3'(x[1]) + 3'(x[2]) + {1'b0, x[3], 1'b0};
    fire = (wsum >= {1'b0, thr});
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= fire;
  end

endmodule
