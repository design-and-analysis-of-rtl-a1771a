// peres_tb: exhaustive self-check of the Peres gate.
// Applies all eight inputs, compares (p, q, r) with a written-out truth
// table, checks that the mapping is one-to-one (reversible) and that with
// c = 0 the gate acts as a half adder (q = sum, r = carry of a + b).
module peres_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  peres dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Rows indexed by {a,b,c}; entry is {p,q,r}.
  localparam logic [2:0] EXPECT [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011,   // a=0: p=0, q=b, r=c
    3'b110, 3'b111, 3'b101, 3'b100    // a=1: p=1, q=~b, r=b^c
  };

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== EXPECT[i]) begin
        failures++;
        $display("FAIL in=%b got=%b%b%b want=%b", 3'(i), p, q, r, EXPECT[i]);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b produced twice", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
      if (c == 1'b0) begin
        checks++;
        if ({r, q} !== 2'(a + b)) begin
          failures++;
          $display("FAIL half adder a=%b b=%b got c,s=%b%b", a, b, r, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
