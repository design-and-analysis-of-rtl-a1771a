// rev_fa_fs: one-bit reversible full adder / full subtractor built from two
// Feynman gates and two Peres gates (quantum cost 1 + 4 + 4 + 1 = 10).
//
// How it works:
//   feynman1 (ctrl, a)        -> p = ctrl, q = a' = a ^ ctrl
//   peres1   (a', b, 0)       -> p = a' (garbage g1), q = a' ^ b, r = a' & b
//   peres2   (cin, a'^b, a'b) -> p = cin (garbage g2),
//                                q = cin ^ a' ^ b,
//                                r = a'b ^ cin(a' ^ b)          = cb
//   feynman2 (ctrl, q2)       -> p = ctrl (garbage g3),
//                                q = ctrl ^ cin ^ a ^ ctrl ^ b  = sd
// peres1 with its third input tied to 0 is a half adder of a' and b; peres2
// adds cin to it and, since the two carries can never both be 1, its r
// output (an XOR) is the full carry. With ctrl = 0, a' = a and the cell is
// a full adder. With ctrl = 1, a' = ~a, which turns the carry into the
// borrow of a - b - cin, while feynman2 cancels the inversion on the
// sum line, so sd = a ^ b ^ cin in both modes.
//
// The cell has five inputs (ctrl, a, b, cin and the constant 0) and five
// outputs (sd, cb, g1, g2, g3), and the map between them is one-to-one.
//
// Interface: ctrl (0 = add, 1 = subtract), a, b, cin in; sd, cb, g1..g3 out.
// Purely combinational, no clock. The gate list, their order and the
// garbage outputs follow the published cell; which Peres pin receives which
// internal wire is read from its schematic and checked by the function.
module rev_fa_fs (
  input  logic ctrl,
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sd,
  output logic cb,
  output logic g1,
  output logic g2,
  output logic g3
);

  logic ctrl_f1;   // feynman1.p, a copy of ctrl for feynman2
  logic a_mod;     // feynman1.q = a ^ ctrl
  logic hs;        // peres1.q   = a_mod ^ b   (half-sum)
  logic hc;        // peres1.r   = a_mod & b   (half-carry)
  logic fs;        // peres2.q   = hs ^ cin

  feynman feynman1 (.a(ctrl),    .b(a),   .p(ctrl_f1), .q(a_mod));
  peres   peres1   (.a(a_mod),   .b(b),   .c(1'b0),    .p(g1), .q(hs), .r(hc));
  peres   peres2   (.a(cin),     .b(hs),  .c(hc),      .p(g2), .q(fs), .r(cb));
  feynman feynman2 (.a(ctrl_f1), .b(fs),  .p(g3),      .q(sd));

endmodule
