// peres: 3x3 reversible Peres gate (also called the New Toffoli Gate).
//
// Mapping: p = a, q = a ^ b, r = (a & b) ^ c. It is a Toffoli gate (r)
// followed by a Feynman gate on the first two lines (q); as a quantum
// circuit it costs 4. With c = 0 the gate is a reversible half adder:
// q is the sum and r the carry of a + b.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
// The mapping and pin names are the standard Peres gate.
module peres (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;

endmodule
