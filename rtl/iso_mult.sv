// iso_mult: complete modular multiplier <a*b>_m by isomorphism, in the form
// that needs no carry-save adder and no modular-adder multiplexer.
//
// Operand a goes through the direct isomorphic transformation (DIT) table,
// giving its index x = log_q(a). Operand b goes through a modified table
// (DIT*) that already subtracts m_I = m-1 from the index: e = log_q(b) - m_I.
// iso_mult_core then adds x + e with one adder, and the sign of the sum
// picks the inverse table half (IIT for x+y >= m_I, IIT* otherwise). Zero
// has no index: DIT maps 0 to the all-ones code and DIT* maps 0 to e = 0,
// and the zero detectors in the core force the product to 0.
//
// The table contents are computed while elaborating from the primitive root
// of M, so any prime modulus whose m-1 is not a power of two works. The DIT
// / DIT* / adder / IIT-IIT* arrangement is the published one; the zero codes
// and widths are this design's choices. Purely combinational.
//
// Interface: a, b are residues in [0, M-1] (N = clog2(M) bits); p = <a*b>_M.
// Inputs >= M are outside the contract and give an unspecified p.
module iso_mult #(
  parameter int unsigned M = 11,
  localparam int unsigned K = rns_pkg::idx_w(M),
  localparam int unsigned N = rns_pkg::res_w(M)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,
  output logic         neg   // IIT* half used (observation only)
);
  localparam int unsigned MI = M - 1;

  // DIT: residue -> index (zero -> all ones)
  // DIT*: residue -> index - m_I as K+1 bit two's complement (zero -> 0)
  logic [K-1:0] dit      [2**N];
  logic [K:0]   dit_star [2**N];
  for (genvar r = 0; r < 2**N; r++) begin : g_dit
    localparam int unsigned L = (r >= 1 && r < M) ? rns_pkg::dlog(M, r) : 0;
    localparam int          E = (r >= 1 && r < M) ? int'(L) - int'(MI) : 0;
    assign dit[r]      = (r >= 1 && r < M) ? K'(L) : '1;
    assign dit_star[r] = (K+1)'(E);
  end

  logic [K-1:0] x;
  logic [K:0]   e;

  always_comb begin
    x = dit[a];
    e = dit_star[b];
  end

  iso_mult_core #(.M(M)) u_core (.x(x), .e(e), .p(p), .neg(neg));

endmodule
