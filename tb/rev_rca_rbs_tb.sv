// rev_rca_rbs_tb: end-to-end check of the reversible ripple-carry adder /
// ripple-borrow subtractor at its default width (64 bits, no parameter
// override).
//
// Stimulus: the two 64-bit examples of the published waveforms
// (123456789 + 987654321 and 65000 - 50000), carries and borrows that
// ripple across the whole word, and random operands in both modes with
// random carry/borrow in. Random operands are drawn either uniformly or as
// small numbers, so that both carry-out and borrow-out cases occur.
//
// Reference: 65-bit integer arithmetic in the testbench. For every vector
// it checks sd and cbout, every tap of the ripple chain c[i] (carry or
// borrow out of the low i bits, worked out from the low i bits alone) and
// the garbage outputs.
//
// Mechanisms counted, each must occur at least once: addition, subtraction,
// carry out, borrow out, carry/borrow in = 1, and a carry/borrow that
// ripples through all bits.
module rev_rca_rbs_tb;
  localparam int W = 64;
  localparam int NRAND = 20000;

  logic [W-1:0] a, b, sd, g1, g2, g3;
  logic         cin, ctrl, cbout;
  logic [W:1]   c;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_carry = 0, n_borrow = 0, n_cin = 0, n_ripple = 0;

  rev_rca_rbs dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl), .sd(sd),
                   .cbout(cbout), .c(c), .g1(g1), .g2(g2), .g3(g3));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry (ctrl = 0) or borrow (ctrl = 1) out of the low n bits.
  function automatic logic ref_chain(logic [W-1:0] x, logic [W-1:0] y,
                                     logic ci, logic mode, int n);
    logic [W:0] xm, ym, s;
    xm = '0;
    ym = '0;
    for (int k = 0; k < n; k++) begin
      xm[k] = x[k];
      ym[k] = y[k];
    end
    if (!mode) begin
      s = xm + ym + (W+1)'(ci);
      return s[n];
    end
    return xm < ym + (W+1)'(ci);
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic ci, logic mode);
    logic [W:0] full;
    logic [W-1:0] exp_sd;
    logic exp_cb;
    logic [W:1] exp_c;
    a = x; b = y; cin = ci; ctrl = mode;
    #1;
    if (!mode) begin
      full   = {1'b0, x} + {1'b0, y} + (W+1)'(ci);
      exp_sd = full[W-1:0];
      exp_cb = full[W];
    end else begin
      exp_sd = x - y - W'(ci);
      exp_cb = {1'b0, x} < {1'b0, y} + (W+1)'(ci);
    end
    for (int i = 1; i <= W; i++) exp_c[i] = ref_chain(x, y, ci, mode, i);

    checks++;
    if (sd !== exp_sd || cbout !== exp_cb) begin
      failures++;
      $display("FAIL ctrl=%b cin=%b a=%h b=%h: sd=%h cbout=%b want %h %b",
               mode, ci, x, y, sd, cbout, exp_sd, exp_cb);
    end
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL chain ctrl=%b a=%h b=%h: c=%h want %h", mode, x, y, c, exp_c);
    end
    checks++;
    if (g1 !== (x ^ {W{mode}}) || g2 !== {exp_c[W-1:1], ci} || g3 !== {W{mode}}) begin
      failures++;
      $display("FAIL garbage ctrl=%b a=%h b=%h", mode, x, y);
    end

    if (!mode) n_add++; else n_sub++;
    if (!mode && exp_cb) n_carry++;
    if (mode && exp_cb) n_borrow++;
    if (ci) n_cin++;
    if (&exp_c) n_ripple++;
  endtask

  function automatic logic [W-1:0] rand_operand();
    logic [W-1:0] v;
    v = {$urandom, $urandom};
    if ($urandom_range(3) == 0) v = W'($urandom_range(1000));
    return v;
  endfunction

  initial begin
    // Published 64-bit examples.
    apply(64'd123456789, 64'd987654321, 1'b0, 1'b0);
    checks++;
    if (sd !== 64'd1111111110 || c[1] !== 1'b1) begin
      failures++;
      $display("FAIL 123456789 + 987654321 gave %0d, c1=%b", sd, c[1]);
    end
    apply(64'd65000, 64'd50000, 1'b0, 1'b1);
    checks++;
    if (sd !== 64'd15000 || cbout !== 1'b0) begin
      failures++;
      $display("FAIL 65000 - 50000 gave %0d", sd);
    end

    // Whole-word ripple: carry and borrow travel through all bits.
    apply({W{1'b1}}, '0, 1'b1, 1'b0);   // all ones + 0 + 1
    apply({W{1'b1}}, 64'd1, 1'b0, 1'b0);
    apply('0, 64'd1, 1'b0, 1'b1);       // 0 - 1
    apply('0, '0, 1'b1, 1'b1);          // 0 - 0 - 1
    apply({W{1'b1}}, {W{1'b1}}, 1'b1, 1'b0);
    apply(64'd5, 64'd5, 1'b0, 1'b1);    // equal operands, no borrow

    for (int n = 0; n < NRAND; n++)
      apply(rand_operand(), rand_operand(), 1'($urandom), 1'($urandom));

    $display("mechanisms: add=%0d sub=%0d carry_out=%0d borrow_out=%0d cin=%0d full_ripple=%0d",
             n_add, n_sub, n_carry, n_borrow, n_cin, n_ripple);
    if (n_add == 0)    begin failures++; $display("FAIL no addition seen"); end
    if (n_sub == 0)    begin failures++; $display("FAIL no subtraction seen"); end
    if (n_carry == 0)  begin failures++; $display("FAIL no carry out seen"); end
    if (n_borrow == 0) begin failures++; $display("FAIL no borrow out seen"); end
    if (n_cin == 0)    begin failures++; $display("FAIL no carry/borrow in seen"); end
    if (n_ripple == 0) begin failures++; $display("FAIL no full-length ripple seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
