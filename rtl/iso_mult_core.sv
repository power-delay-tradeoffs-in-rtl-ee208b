// iso_mult_core: modular multiplier <a*b>_m by isomorphism, operands given
// as indices (the multiplier of the filter taps, with no DIT tables).
//
// For a prime modulus m with primitive root q, a = q^x and b = q^y give
// a*b = q^<x+y>_(m-1). The operands arrive already transformed:
//   x : K-bit index of a (K = clog2(m-1)); all-ones means a == 0
//   e : (K+1)-bit two's complement e = y - m_I, m_I = m-1; it is negative
//       for any b != 0, and e == 0 (sign clear) means b == 0
// A single (K+1)-bit adder forms w = x + e = x + y - m_I. Its sign picks
// the table half: w >= 0 means x + y >= m_I and the product is IIT[w] =
// q^w; w < 0 means x + y < m_I and the low K bits of w address IIT*, which
// holds q^(t - 2^K + m_I). The two halves are one table addressed by
// {sign, w[K-1:0]}, so no carry-save adder and no final multiplexer of a
// modular adder sit on the path. Two zero detectors force the product to 0
// when either operand is zero (zero has no index).
//
// The structure (DIT* folding -m_I into the coefficient, n-bit adder, sign
// selecting IIT or IIT*, zero detectors) follows the published scheme; the
// index encodings, the single merged table and the zero codes are this
// design's choices. The adder is a carry-lookahead adder (cla_add).
// Purely combinational; delay = adder + table.
module iso_mult_core #(
  parameter int unsigned M = 11,
  localparam int unsigned K = rns_pkg::idx_w(M),
  localparam int unsigned N = rns_pkg::res_w(M)
) (
  input  logic [K-1:0] x,   // index of a, all-ones = zero operand
  input  logic [K:0]   e,   // index of b minus (m-1), >= 0 = zero operand
  output logic [N-1:0] p,   // <a*b>_m
  output logic         neg  // sign of x+e: 1 = IIT* half used (observation)
);
  localparam int unsigned MI = M - 1;
  localparam int unsigned Q  = rns_pkg::prim_root(M);

  // the all-ones x code must not collide with a valid index
  if ((1 << K) - 1 < MI) begin : g_no_spare_code
    $error("iso_mult_core: modulus %0d leaves no spare index code", M);
  end

  // IIT (sign = 0) and IIT* (sign = 1), merged, filled at elaboration
  logic [N-1:0] iit [2**(K+1)];
  for (genvar i = 0; i < 2**(K+1); i++) begin : g_iit
    localparam int unsigned S = i >> K;
    localparam int unsigned T = i & ((1 << K) - 1);
    localparam int unsigned V =
        (S == 0) ? ((T <= MI - 2) ? rns_pkg::powmod(Q, T, M) : 0)
                 : ((T >= (1 << K) - MI) ? rns_pkg::powmod(Q, T + MI - (1 << K), M) : 0);
    assign iit[i] = N'(V);
  end

  logic [K:0] w;
  logic       zero_x, zero_e;

  // the (K+1)-bit adder x + e; its MSB is the sign
  logic unused_cout;
  cla_add #(.W(K+1)) u_add (
    .a({1'b0, x}), .b(e), .cin(1'b0), .sum(w), .cout(unused_cout)
  );

  always_comb begin
    zero_x = &x;       // det. 0 on x
    zero_e = ~e[K];    // det. 0 on e
    neg    = w[K];
    p      = (zero_x || zero_e) ? '0 : iit[w];
  end

endmodule
