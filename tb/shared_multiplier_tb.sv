// shared_multiplier_tb: self-checking test of the signed shared multiplier.
//
// Applies the operand corner cases (zero, +/-1, most positive, most
// negative) in every pairing and then random operands at the default widths,
// and compares each product with a 64-bit integer multiplication done in the
// testbench. The multiplier is combinational, so each product is checked one
// time step after its operands are applied.
module shared_multiplier_tb;

  localparam int unsigned A_W = 18;
  localparam int unsigned B_W = 13;

  logic signed [A_W-1:0]     a;
  logic signed [B_W-1:0]     b;
  logic signed [A_W+B_W-1:0] p;

  int checks   = 0;
  int failures = 0;

  shared_multiplier #(.A_W(A_W), .B_W(B_W)) dut (.a(a), .b(b), .p(p));

  task automatic check(input longint av, input longint bv);
    longint expect_p;
    a = A_W'(av);
    b = B_W'(bv);
    #1;
    expect_p = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != expect_p) begin
      failures++;
      $display("FAIL a=%0d b=%0d p=%0d expected %0d", a, b, p, expect_p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ac [5];
    longint bc [5];
    ac = '{0, 1, -1, (64'sd1 <<< (A_W-1)) - 1, -(64'sd1 <<< (A_W-1))};
    bc = '{0, 1, -1, (64'sd1 <<< (B_W-1)) - 1, -(64'sd1 <<< (B_W-1))};
    foreach (ac[i]) foreach (bc[j]) check(ac[i], bc[j]);
    repeat (2000) check(longint'($signed($urandom)), longint'($signed($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
