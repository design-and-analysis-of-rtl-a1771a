// rev_fa_fs_tb: exhaustive self-check of the one-bit reversible full
// adder / full subtractor.
// For all 16 combinations of ctrl, a, b, cin it checks
//   ctrl = 0: {cb, sd} = a + b + cin
//   ctrl = 1: sd = a ^ b ^ cin, cb = 1 when a < b + cin (borrow)
// with the expected values computed by integer arithmetic, checks the
// three garbage outputs (g1 = a ^ ctrl, g2 = cin, g3 = ctrl), and checks
// that the 16 input patterns give 16 different 5-bit output patterns, i.e.
// that the cell is reversible.
module rev_fa_fs_tb;
  logic ctrl, a, b, cin;
  logic sd, cb, g1, g2, g3;
  int checks = 0, failures = 0;
  bit [31:0] seen;
  int diff;
  logic exp_sd, exp_cb;

  rev_fa_fs dut (.ctrl(ctrl), .a(a), .b(b), .cin(cin),
                 .sd(sd), .cb(cb), .g1(g1), .g2(g2), .g3(g3));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {ctrl, a, b, cin} = 4'(i);
      #1;
      if (!ctrl) begin
        diff   = int'(a) + int'(b) + int'(cin);
        exp_sd = diff[0];
        exp_cb = diff >= 2;
      end else begin
        diff   = int'(a) - int'(b) - int'(cin);
        exp_sd = (diff & 1) != 0;
        exp_cb = diff < 0;
      end
      checks++;
      if (sd !== exp_sd || cb !== exp_cb) begin
        failures++;
        $display("FAIL ctrl=%b a=%b b=%b cin=%b: sd=%b cb=%b want %b %b",
                 ctrl, a, b, cin, sd, cb, exp_sd, exp_cb);
      end
      checks++;
      if (g1 !== (a ^ ctrl) || g2 !== cin || g3 !== ctrl) begin
        failures++;
        $display("FAIL garbage ctrl=%b a=%b b=%b cin=%b: g=%b%b%b",
                 ctrl, a, b, cin, g1, g2, g3);
      end
      checks++;
      if (seen[{g1, g2, g3, sd, cb}]) begin
        failures++;
        $display("FAIL output pattern %b repeated", {g1, g2, g3, sd, cb});
      end
      seen[{g1, g2, g3, sd, cb}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
