// tb_scdbi_inv_cmp: checks the invert decision n01 + 8*n2 > n00 + 8*n4ss
// for a 32-bit flit on ties, on the extreme counts (no overflow of the
// weighted sums) and on random legal count combinations.
module tb_scdbi_inv_cmp;
  localparam int unsigned W = 32;
  logic [5:0] n01, n00;
  logic [4:0] n2, n4ss;
  logic inv;
  int checks = 0, failures = 0;

  scdbi_inv_cmp #(.W(W)) dut (.n01(n01), .n00(n00), .n2(n2), .n4ss(n4ss), .inv(inv));

  task automatic drive(int a, int b, int c, int d);
    int lhs, rhs;
    n01 = 6'(a); n00 = 6'(b); n2 = 5'(c); n4ss = 5'(d);
    lhs = a + 8 * c;
    rhs = b + 8 * d;
    #1;
    checks++;
    if (inv !== (lhs > rhs)) begin
      failures++;
      $display("FAIL n01=%0d n00=%0d n2=%0d n4ss=%0d inv=%b", a, b, c, d, inv);
    end
  endtask

  initial begin
    drive(0, 0, 0, 0);        // tie: keep
    drive(8, 0, 0, 1);        // tie: keep
    drive(9, 0, 0, 1);        // invert
    drive(0, 7, 1, 0);        // 8 > 7: invert
    drive(0, 8, 1, 0);        // tie
    drive(32, 0, 31, 0);      // largest left side
    drive(0, 32, 0, 31);      // largest right side
    drive(1, 0, 31, 31);
    for (int i = 0; i < 2000; i++) begin
      int a, b, c, d;
      a = $urandom_range(32); b = $urandom_range(32 - a);
      c = $urandom_range(31); d = $urandom_range(31 - c);
      drive(a, b, c, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
