// rev_rca_rbs_widths_tb: runs the adder/subtractor at the other word widths
// of the published evaluation, 1, 8, 16 and 32 bits, side by side.
// The 1-bit and 8-bit instances are checked exhaustively (every a, b, cin
// and mode); the 16- and 32-bit instances get random operands. Expected
// sums, differences, carries and borrows come from integer arithmetic on
// the low WIDTH bits of the shared stimulus.
module rev_rca_rbs_widths_tb;
  localparam int NRAND = 20000;

  logic [31:0] a, b;
  logic        cin, ctrl;

  logic [0:0]  sd1;   logic co1;
  logic [7:0]  sd8;   logic co8;
  logic [15:0] sd16;  logic co16;
  logic [31:0] sd32;  logic co32;

  // Ripple taps and garbage outputs: every width checks that its last tap
  // equals cbout and that g1/g3 carry a ^ ctrl and ctrl; the 32-bit
  // instance also checks g2 against the ripple taps.
  logic [1:1]  c1;   logic [0:0]  ga1,  gb1,  gc1;
  logic [8:1]  c8;   logic [7:0]  ga8,  gb8,  gc8;
  logic [16:1] c16;  logic [15:0] ga16, gb16, gc16;
  logic [32:1] c32;  logic [31:0] ga32, gb32, gc32;

  int checks = 0, failures = 0;

  rev_rca_rbs #(.WIDTH(1)) u_w1 (
    .a(a[0:0]), .b(b[0:0]), .cin(cin), .ctrl(ctrl), .sd(sd1), .cbout(co1),
    .c(c1), .g1(ga1), .g2(gb1), .g3(gc1));
  rev_rca_rbs #(.WIDTH(8)) u_w8 (
    .a(a[7:0]), .b(b[7:0]), .cin(cin), .ctrl(ctrl), .sd(sd8), .cbout(co8),
    .c(c8), .g1(ga8), .g2(gb8), .g3(gc8));
  rev_rca_rbs #(.WIDTH(16)) u_w16 (
    .a(a[15:0]), .b(b[15:0]), .cin(cin), .ctrl(ctrl), .sd(sd16), .cbout(co16),
    .c(c16), .g1(ga16), .g2(gb16), .g3(gc16));
  rev_rca_rbs #(.WIDTH(32)) u_w32 (
    .a(a), .b(b), .cin(cin), .ctrl(ctrl), .sd(sd32), .cbout(co32),
    .c(c32), .g1(ga32), .g2(gb32), .g3(gc32));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected {carry/borrow, result} for the low w bits, as a 64-bit value:
  // bit w holds the carry or borrow.
  function automatic longint unsigned expect_w(int w);
    longint unsigned x, y, m, r;
    m = (64'd1 << w) - 1;
    x = 64'(a) & m;
    y = 64'(b) & m;
    if (!ctrl) r = x + y + cin;
    else       r = ((x - y - cin) & m) | ((x < y + cin) ? (64'd1 << w) : 0);
    return r;
  endfunction

  task automatic check_w(int w, longint unsigned got);
    longint unsigned want;
    want = expect_w(w);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL W=%0d ctrl=%b cin=%b a=%h b=%h got=%h want=%h",
               w, ctrl, cin, a, b, got, want);
    end
  endtask

  task automatic check_all();
    #1;
    check_w(1,  64'({co1, sd1}));
    check_w(8,  64'({co8, sd8}));
    check_w(16, 64'({co16, sd16}));
    check_w(32, 64'({co32, sd32}));
    checks++;
    if (c1[1] !== co1 || c8[8] !== co8 || c16[16] !== co16 || c32[32] !== co32) begin
      failures++;
      $display("FAIL last ripple tap differs from cbout");
    end
    checks++;
    if (ga1 !== (a[0:0] ^ ctrl) || ga8 !== (a[7:0] ^ {8{ctrl}}) ||
        ga16 !== (a[15:0] ^ {16{ctrl}}) || gc1 !== ctrl || gc8 !== {8{ctrl}} ||
        gc16 !== {16{ctrl}} || gb1[0] !== cin || gb8 !== {c8[7:1], cin} || gb16 !== {c16[15:1], cin}) begin
      failures++;
      $display("FAIL garbage outputs of the 1/8/16-bit instances");
    end
    checks++;
    if (ga32 !== (a ^ {32{ctrl}}) || gb32 !== {c32[31:1], cin} || gc32 !== {32{ctrl}}) begin
      failures++;
      $display("FAIL W=32 garbage outputs");
    end
  endtask

  initial begin
    // Exhaustive over 8 bits (covers the 1-bit instance completely too).
    for (int m = 0; m < 4; m++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          {ctrl, cin} = 2'(m);
          a = 32'(x) | ({$urandom} & 32'hFFFF_FF00);
          b = 32'(y) | ({$urandom} & 32'hFFFF_FF00);
          check_all();
        end
    for (int n = 0; n < NRAND; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom); ctrl = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
