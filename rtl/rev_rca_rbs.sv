// rev_rca_rbs: WIDTH-bit reversible ripple-carry adder / ripple-borrow
// subtractor.
//
// WIDTH copies of the one-bit reversible cell rev_fa_fs are chained: the
// carry/borrow out of bit i is the carry/borrow in of bit i+1, and one
// shared ctrl line puts every cell in the same mode.
//   ctrl = 0: {cbout, sd} = a + b + cin          (cbout is the carry)
//   ctrl = 1: sd = (a - b - cin) mod 2**WIDTH,   cbout = 1 when a < b + cin
//             (cbout is the borrow, operands unsigned)
//
// Interface: a, b, cin, ctrl in; sd and cbout out. The ripple chain itself
// is brought out as c[WIDTH:1], c[i] being the carry/borrow out of bit i-1
// (c[WIDTH] equals cbout). The three garbage outputs of every cell are kept
// as ports g1, g2, g3 (bit i from cell i), so the circuit drops none of its
// reversible gates' outputs. Some of them are plain copies of inputs by
// nature of the gates (g3 = ctrl in every bit, g2[0] = cin).
//
// Timing: purely combinational, no clock or reset; the critical path runs
// through all WIDTH cells of the ripple chain. WIDTH defaults to 64, the
// largest size of the published evaluation (1, 8, 16, 32 and 64 bits).
// Exposing the chain and the garbage as ports is this design's choice.
module rev_rca_rbs #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             ctrl,
  output logic [WIDTH-1:0] sd,
  output logic             cbout,
  output logic [WIDTH:1]   c,
  output logic [WIDTH-1:0] g1,
  output logic [WIDTH-1:0] g2,
  output logic [WIDTH-1:0] g3
);

  // chain[i] is the carry/borrow into bit i.
  logic [WIDTH:0] chain;

  assign chain[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rev_fa_fs u_cell (
      .ctrl (ctrl),
      .a    (a[i]),
      .b    (b[i]),
      .cin  (chain[i]),
      .sd   (sd[i]),
      .cb   (chain[i+1]),
      .g1   (g1[i]),
      .g2   (g2[i]),
      .g3   (g3[i])
    );
  end

  assign c     = chain[WIDTH:1];
  assign cbout = chain[WIDTH];

  initial begin
    assert (WIDTH >= 1) else $error("rev_rca_rbs: WIDTH must be at least 1");
  end

endmodule
