// rns_fir: 16-tap programmable FIR filter in the residue number system,
// moduli {11, 13, 29} (dynamic range 4147, just over 12 bits).
//
// The binary input sample is converted once per modulus into the index of
// its residue (bin2rns_dit, the direct isomorphic transformation folded into
// the conversion). Three independent channels (fir_channel) then run the
// transposed-form filter, each with one isomorph multiplier (adder + IIT/
// IIT* table) and one carry-save adder per tap. No signal crosses between
// channels: the output is the filter result in residue form,
// y_res[i] = (sum_k h_k * x(t-k)) mod MODULI[i].
//
// Coefficients are loaded as isomorphism indices, one tap at a time: for
// each modulus the index y with q^y = h mod m (q = primitive root of m), or
// coef_zero[i] = 1 when h mod m is 0. Samples are unsigned X_W-bit values;
// results are exact modulo 4147. Conversion back to binary is left to the
// user. Each y_res entry is 5 bits (the width of the largest modulus); for
// 11 and 13 its top bit is always 0. Latency from x_valid to y_valid is 3 cycles, one sample per cycle.
//
// The filter organisation (16 taps, moduli set, transposed carry-save form,
// DIT folded into the input conversion, coefficients loaded as indices) is
// the published one; the input width, pipeline and port layout are this
// design's choices.
module rns_fir #(
  parameter int unsigned TAPS = 16,
  parameter int unsigned X_W  = 12,
  localparam int unsigned NM = rns_pkg::NUM_MOD,
  localparam int unsigned RW = rns_pkg::RES_W,
  localparam int unsigned TW = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [TW-1:0] coef_tap,
  input  logic          coef_zero [NM],
  input  logic [RW-1:0] coef_idx  [NM],
  input  logic          x_valid,
  input  logic [X_W-1:0] x_in,
  output logic          y_valid,
  output logic [RW-1:0] y_res     [NM]
);
  logic ch_valid [NM];

  for (genvar i = 0; i < NM; i++) begin : g_ch
    localparam int unsigned M = rns_pkg::MODULI[i];
    localparam int unsigned K = rns_pkg::idx_w(M);
    localparam int unsigned N = rns_pkg::res_w(M);

    logic [K-1:0] x_idx;
    logic [N-1:0] x_res_unused;
    logic [N-1:0] y;

    bin2rns_dit #(.M(M), .X_W(X_W)) u_conv (
      .bin(x_in), .res(x_res_unused), .idx(x_idx)
    );

    fir_channel #(.M(M), .TAPS(TAPS)) u_ch (
      .clk      (clk),
      .rst_n    (rst_n),
      .coef_we  (coef_we),
      .coef_tap (coef_tap),
      .coef_zero(coef_zero[i]),
      .coef_idx (coef_idx[i][K-1:0]),
      .x_valid  (x_valid),
      .x_idx    (x_idx),
      .y_valid  (ch_valid[i]),
      .y        (y)
    );

    assign y_res[i] = RW'(y);
  end

  // all channels run in lock step
  assign y_valid = ch_valid[0];

endmodule
