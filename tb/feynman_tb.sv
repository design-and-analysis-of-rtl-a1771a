// feynman_tb: exhaustive self-check of the Feynman gate.
// Applies all four input pairs, compares (p, q) with a written-out truth
// table, checks that no two inputs share an output (reversibility) and that
// applying the gate twice returns the original inputs.
module feynman_tb;
  logic a, b, p, q;
  logic p2, q2;
  int checks = 0, failures = 0;
  bit [3:0] seen;

  feynman dut  (.a(a),  .b(b),  .p(p),  .q(q));
  feynman dut2 (.a(p),  .b(q),  .p(p2), .q(q2));

  // Truth table rows {a,b} -> {p,q}: 00->00, 01->01, 10->11, 11->10
  localparam logic [1:0] EXPECT [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXPECT[i]) begin
        failures++;
        $display("FAIL in=%b got=%b%b want=%b", 2'(i), p, q, EXPECT[i]);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b produced twice", p, q);
      end
      seen[{p, q}] = 1'b1;
      checks++;
      if ({p2, q2} !== 2'(i)) begin
        failures++;
        $display("FAIL self-inverse: in=%b back=%b%b", 2'(i), p2, q2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
