// tb_iso_mult: exhaustive check of the isomorph multiplier for the three
// moduli of the filter (11, 13, 29): every operand pair, product compared
// with (a*b) mod m, and the IIT* flag compared with log(a)+log(b) < m-1.
module tb_iso_mult;
  import tb_rns_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_zero = 0, n_star = 0, n_plain = 0;

  logic [3:0] a11, b11, p11; logic n11;
  logic [3:0] a13, b13, p13; logic n13;
  logic [4:0] a29, b29, p29; logic n29;

  iso_mult #(.M(11)) dut11 (.a(a11), .b(b11), .p(p11), .neg(n11));
  iso_mult #(.M(13)) dut13 (.a(a13), .b(b13), .p(p13), .neg(n13));
  iso_mult #(.M(29)) dut29 (.a(a29), .b(b29), .p(p29), .neg(n29));

  task automatic check(int m, int a, int b, int p, bit neg);
    int exp_p = (a * b) % m;
    checks++;
    if (p != exp_p) begin
      failures++;
      $display("FAIL m=%0d a=%0d b=%0d p=%0d expected %0d", m, a, b, p, exp_p);
    end
    if (a != 0 && b != 0) begin
      bit exp_neg = (ref_log(m, a) + ref_log(m, b)) < (m - 1);
      checks++;
      if (neg != exp_neg) begin
        failures++;
        $display("FAIL m=%0d a=%0d b=%0d neg=%0d expected %0d", m, a, b, neg, exp_neg);
      end
      if (exp_neg) n_star++; else n_plain++;
    end else n_zero++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 11; a++) for (int b = 0; b < 11; b++) begin
      a11 = 4'(a); b11 = 4'(b); #1; check(11, a, b, int'(p11), n11);
    end
    for (int a = 0; a < 13; a++) for (int b = 0; b < 13; b++) begin
      a13 = 4'(a); b13 = 4'(b); #1; check(13, a, b, int'(p13), n13);
    end
    for (int a = 0; a < 29; a++) for (int b = 0; b < 29; b++) begin
      a29 = 5'(a); b29 = 5'(b); #1; check(29, a, b, int'(p29), n29);
    end
    $display("zero-operand bypass %0d, IIT* half %0d, IIT half %0d", n_zero, n_star, n_plain);
    if (n_zero == 0 || n_star == 0 || n_plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
