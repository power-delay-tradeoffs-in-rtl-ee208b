// bin2rns_dit: binary-to-residue converter for one modulus, with the direct
// isomorphic transformation (DIT) folded in.
//
// In the filter every tap multiplies the same input sample, so instead of
// one DIT table per multiplier the input is converted once: the binary
// sample is reduced modulo M and the residue is replaced by its index
// log_q(residue), q being the primitive root of M. A zero residue has no
// index and is sent as the all-ones code, which the multipliers' zero
// detectors recognise.
//
// Folding DIT into the input conversion follows the published filter; how
// the reduction is done (a constant modulo, i.e. plain logic) and the zero
// code are this design's choices. Purely combinational.
//
// Interface: bin is an unsigned X_W-bit sample; idx is the K-bit index
// code (K = clog2(M-1)); res is the plain residue bin mod M, for reference.
module bin2rns_dit #(
  parameter int unsigned M   = 11,
  parameter int unsigned X_W = 12,
  localparam int unsigned K = rns_pkg::idx_w(M),
  localparam int unsigned N = rns_pkg::res_w(M)
) (
  input  logic [X_W-1:0] bin,
  output logic [N-1:0]   res,
  output logic [K-1:0]   idx
);
  logic [K-1:0] dit [M];
  for (genvar r = 0; r < M; r++) begin : g_dit
    localparam int unsigned L = (r >= 1) ? rns_pkg::dlog(M, r) : 0;
    assign dit[r] = (r >= 1) ? K'(L) : '1;
  end

  always_comb begin
    res = N'(bin % X_W'(M));
    idx = dit[res];
  end

endmodule
