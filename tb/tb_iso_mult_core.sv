// tb_iso_mult_core: the index-input multiplier for m = 29, driven with every
// (x, y) index pair plus the zero codes. Expected product q^(x+y) mod m is
// computed by brute force; the IIT* flag must be set exactly when
// x + y < m - 1.
module tb_iso_mult_core;
  import tb_rns_ref_pkg::*;

  localparam int M = 29;
  localparam int K = 5;

  int checks = 0, failures = 0;
  logic [K-1:0] x;
  logic [K:0]   e;
  logic [4:0]   p;
  logic         neg;

  iso_mult_core #(.M(M)) dut (.x(x), .e(e), .p(p), .neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q;
    q = ref_root(M);
    // non-zero operands
    for (int xi = 0; xi < M - 1; xi++) begin
      for (int yi = 0; yi < M - 1; yi++) begin
        x = K'(xi);
        e = (K+1)'(yi - (M - 1));
        #1;
        checks++;
        if (int'(p) != ref_pow(q, xi + yi, M) || neg != ((xi + yi) < M - 1)) begin
          failures++;
          $display("FAIL x=%0d y=%0d p=%0d neg=%0d", xi, yi, p, neg);
        end
      end
    end
    // zero operands: x all ones, or e = 0
    for (int i = 0; i < M - 1; i++) begin
      x = '1; e = (K+1)'(i - (M - 1)); #1;
      checks++;
      if (p != 0) begin failures++; $display("FAIL zero x, y=%0d p=%0d", i, p); end
      x = K'(i); e = '0; #1;
      checks++;
      if (p != 0) begin failures++; $display("FAIL zero y, x=%0d p=%0d", i, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
