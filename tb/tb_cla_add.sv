// tb_cla_add: exhaustive check of the carry-lookahead adder at 5 and 9
// bits (all operand pairs and both carry-in values at 5 bits, random pairs
// at 9 bits) against integer addition.
module tb_cla_add;
  int checks = 0, failures = 0;

  logic [4:0] a5, b5, s5; logic ci5, co5;
  logic [8:0] a9, b9, s9; logic ci9, co9;

  cla_add #(.W(5)) dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));
  cla_add #(.W(9)) dut9 (.a(a9), .b(b9), .cin(ci9), .sum(s9), .cout(co9));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) for (int b = 0; b < 32; b++) for (int c = 0; c < 2; c++) begin
      a5 = 5'(a); b5 = 5'(b); ci5 = c[0];
      #1;
      checks++;
      if (int'({co5, s5}) != a + b + c) begin
        failures++; $display("FAIL 5-bit %0d+%0d+%0d = %0d", a, b, c, {co5, s5});
      end
    end
    for (int i = 0; i < 5000; i++) begin
      int a, b, c;
      a = $urandom_range(511); b = $urandom_range(511); c = $urandom_range(1);
      a9 = 9'(a); b9 = 9'(b); ci9 = c[0];
      #1;
      checks++;
      if (int'({co9, s9}) != a + b + c) begin
        failures++; $display("FAIL 9-bit %0d+%0d+%0d = %0d", a, b, c, {co9, s9});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
