// tb_lp_modadd: the latch-gated modular adder for m = 11, 13 and 29.
// Every operand pair is applied several times in a random order, so the
// frozen path holds many different stale operands. Checks: s = (a+b) mod m;
// the path that is closed is never the one whose result is needed; for
// m = 11 the enables follow F_R = ~a3~b3(~a2+~b2) and
// F_L = a3b2 + a2b3 + a3b3, giving 48 right-only, 33 left-only and 40 both
// cases out of 121 (40% / 27% / 33%).
module tb_lp_modadd;

  int checks = 0, failures = 0;
  int n_right = 0, n_left = 0, n_both = 0;

  logic [3:0] a11, b11, s11; logic l11, r11;
  logic [3:0] a13, b13, s13; logic l13, r13;
  logic [4:0] a29, b29, s29; logic l29, r29;

  lp_modadd #(.M(11)) dut11 (.a(a11), .b(b11), .s(s11), .en_left(l11), .en_right(r11));
  lp_modadd #(.M(13)) dut13 (.a(a13), .b(b13), .s(s13), .en_left(l13), .en_right(r13));
  lp_modadd #(.M(29)) dut29 (.a(a29), .b(b29), .s(s29), .en_left(l29), .en_right(r29));

  task automatic check(int m, int a, int b, int s, bit el, bit er);
    checks++;
    if (s != (a + b) % m) begin
      failures++; $display("FAIL m=%0d a=%0d b=%0d s=%0d", m, a, b, s);
    end
    checks++;
    if (!(el || er) || (!el && a + b >= m) || (!er && a + b < m)) begin
      failures++; $display("FAIL m=%0d a=%0d b=%0d wrong path disabled (L=%0d R=%0d)", m, a, b, el, er);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // m = 11: paper prediction equations and statistics, in order
    for (int a = 0; a < 11; a++) for (int b = 0; b < 11; b++) begin
      bit fr, fl;
      a11 = 4'(a); b11 = 4'(b); #1;
      fr = !a11[3] && !b11[3] && (!a11[2] || !b11[2]);
      fl = (a11[3] && b11[2]) || (a11[2] && b11[3]) || (a11[3] && b11[3]);
      check(11, a, b, int'(s11), l11, r11);
      checks++;
      if (r11 != !fl || l11 != !fr) begin
        failures++; $display("FAIL m=11 a=%0d b=%0d enables L=%0d R=%0d vs F_R=%0d F_L=%0d", a, b, l11, r11, fr, fl);
      end
      if (l11 && r11) n_both++; else if (r11) n_right++; else n_left++;
    end
    $display("m=11: right only %0d, left only %0d, both %0d (of 121)", n_right, n_left, n_both);
    checks++;
    if (n_right != 48 || n_left != 33 || n_both != 40) failures++;
    // random orders, all moduli
    for (int i = 0; i < 20000; i++) begin
      int a, b;
      a = $urandom_range(10); b = $urandom_range(10);
      a11 = 4'(a); b11 = 4'(b); #1; check(11, a, b, int'(s11), l11, r11);
      a = $urandom_range(12); b = $urandom_range(12);
      a13 = 4'(a); b13 = 4'(b); #1; check(13, a, b, int'(s13), l13, r13);
      a = $urandom_range(28); b = $urandom_range(28);
      a29 = 5'(a); b29 = 5'(b); #1; check(29, a, b, int'(s29), l29, r29);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
