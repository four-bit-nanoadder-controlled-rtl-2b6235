// nanoadder4 -- four-bit ripple-carry adder built from majority full adders.
//
// WIDTH copies of full_adder are chained: stage i adds operand bits x1[i]
// and x0[i] to the carry coming out of stage i-1 (c0 for stage 0), producing
// sum bit s[i]. The carry of the last stage is the carry out c. Each stage
// costs one three-input and one five-input majority element, and the carry
// path passes through one three-input element per stage, so the carry-out
// of stage i is ready after i+1 majority delays.
//
// Interface: operands x1 and x0 (WIDTH bits each), carry in c0; sum s
// (WIDTH bits) and carry out c, so {c, s} = x1 + x0 + c0.
// Purely combinational: no clock or reset. In the cellular automata circuit
// the signals also advance through clock zones (a delay of 15 zones for the
// four-bit circuit); that pipelining is not represented here.
//
// The ripple structure and WIDTH = 4 follow the published circuit; making
// the width a parameter is this design's choice.
module nanoadder4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] x1,
  input  logic [WIDTH-1:0] x0,
  input  logic             c0,
  output logic [WIDTH-1:0] s,
  output logic             c
);

  // carry[i] enters stage i; carry[WIDTH] leaves the last stage.
  logic [WIDTH:0] carry;

  assign carry[0] = c0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .x1 (x1[i]),
      .x0 (x0[i]),
      .c0 (carry[i]),
      .s  (s[i]),
      .c  (carry[i+1])
    );
  end

  assign c = carry[WIDTH];

endmodule
