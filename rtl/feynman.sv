// feynman: 2x2 reversible Feynman (controlled-NOT) gate.
//
// The control input a passes straight through to p; the target input b is
// inverted whenever a is 1, so q = a ^ b. The mapping is its own inverse:
// feeding (p, q) back in returns (a, b). Besides this XOR, the gate is used
// to copy a signal (b = 0 gives q = a) without breaking reversibility.
//
// Interface: a, b in; p, q out. Purely combinational, no clock.
// The mapping and pin names are the standard Feynman gate; nothing here is
// a local design choice.
module feynman (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
