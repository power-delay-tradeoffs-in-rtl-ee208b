// cla_add: W-bit binary adder with carry-lookahead.
//
// Generate g_i = a_i & b_i and propagate p_i = a_i ^ b_i are formed per bit;
// every carry is then written directly as a sum of products of the g, p and
// the carry-in (c_i = g_(i-1) | p_(i-1) g_(i-2) | ... | p_(i-1)..p_0 c_in),
// so no carry ripples through the bits. The adders of the modular adder and
// of the isomorph multiplier are carry-lookahead adders in the published
// designs; this single-level form suits their short widths (4 to 9 bits).
// Purely combinational: sum = a + b + cin, cout is the carry out of bit W-1.
module cla_add #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] g, p;
  logic [W:0]   c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    for (int i = 0; i <= W; i++) begin
      logic term;
      c[i] = 1'b0;
      // carry-in propagated through bits 0 .. i-1
      term = cin;
      for (int j = 0; j < i; j++) term = term & p[j];
      c[i] = c[i] | term;
      // generate at bit j, propagated through bits j+1 .. i-1
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int l = j + 1; l < i; l++) term = term & p[l];
        c[i] = c[i] | term;
      end
    end
    sum  = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
