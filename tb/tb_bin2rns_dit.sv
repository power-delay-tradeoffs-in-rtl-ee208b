// tb_bin2rns_dit: every 12-bit input value through the converter for
// m = 29 and m = 11. The residue must equal v mod m, and the index must be
// the all-ones code for a zero residue or satisfy q^idx mod m = residue.
module tb_bin2rns_dit;
  import tb_rns_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [11:0] bin;
  logic [4:0]  r29, i29;
  logic [3:0]  r11, i11;

  bin2rns_dit #(.M(29), .X_W(12)) dut29 (.bin(bin), .res(r29), .idx(i29));
  bin2rns_dit #(.M(11), .X_W(12)) dut11 (.bin(bin), .res(r11), .idx(i11));

  task automatic check(int m, int v, int r, int idx, int k);
    int q = ref_root(m);
    checks++;
    if (r != v % m) begin
      failures++; $display("FAIL m=%0d v=%0d res=%0d", m, v, r);
    end
    checks++;
    if (v % m == 0) begin
      if (idx != (1 << k) - 1) begin failures++; $display("FAIL m=%0d v=%0d zero code %0d", m, v, idx); end
    end else if (idx >= m - 1 || ref_pow(q, idx, m) != v % m) begin
      failures++; $display("FAIL m=%0d v=%0d idx=%0d", m, v, idx);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      bin = 12'(v);
      #1;
      check(29, v, int'(r29), int'(i29), 5);
      check(11, v, int'(r11), int'(i11), 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
