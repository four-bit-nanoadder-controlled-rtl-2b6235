// maj3 -- three-input majority element.
//
// The output is 1 when at least two of the three inputs are 1:
//   y = x2 x1 | x2 x0 | x1 x0.
// This is the basic gate of quantum-dot cellular automata logic, where the
// centre cell takes the polarization held by most of its neighbours. Tying
// one input to 0 turns the element into a two-input AND of the other two;
// tying it to 1 turns it into a two-input OR.
//
// Interface: three one-bit inputs, one one-bit output. Purely
// combinational; no clock, no reset. The function is the published one; the
// sum-of-products form below is simply its direct transcription.
module maj3 (
  input  logic x2,
  input  logic x1,
  input  logic x0,
  output logic y
);

  always_comb y = (x2 & x1) | (x2 & x0) | (x1 & x0);

endmodule
