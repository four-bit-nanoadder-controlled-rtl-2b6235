// qca_inverter -- inverter element.
//
// The output carries the opposite value of the input. In the cellular
// automata layout this is done by splitting a wire into two branches that
// meet a cell diagonally; at the logic level it is a NOT.
//
// Interface: one-bit input a, one-bit output y. Purely combinational.
module qca_inverter (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
