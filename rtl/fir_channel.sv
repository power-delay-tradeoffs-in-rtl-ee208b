// fir_channel: one residue channel (modulus M) of the programmable RNS FIR
// filter, in transposed form with carry-save accumulation.
//
// Each tap k holds its coefficient as an isomorphism index already shifted
// by -m_I (the DIT* value e_k = log_q(h_k) - (M-1), loaded at start-up), so
// the tap multiplier is iso_mult_core: one adder and one IIT/IIT* table.
// The input sample arrives as an index too (bin2rns_dit), so no DIT table
// sits in the taps. Each tap adds its product into the partial sum coming
// from the tap to its right with a 3:2 carry-save adder, and the partial sum
// is kept in carry-save form (sum and carry registers) along the delay line.
// The modulo-M reduction is therefore not done per tap: the partial sums
// are plain binary numbers, wide enough (AW bits) to hold TAPS*(M-1), and a
// single carry-propagate addition and reduction mod M is done once, in the
// output stage. The critical path of a tap is multiplier + one CSA level.
//
// Published: transposed form, one isomorph multiplier and one carry-save
// adder per tap, coefficients loaded as indices, DIT in the input
// conversion. This design's choices: deferring the modular reduction to
// the output, the widths, the three pipeline stages, the load port.
//
// Timing (one sample per cycle at most):
//   edge 1: x_valid/x_idx captured in the input register
//   edge 2: the tap registers take the new partial sums
//   edge 3: y = sum_k h_k * x(t-k) mod M appears with y_valid
// Latency is 3 cycles. Cycles without x_valid leave the delay line as it is
// (the filter works on the sequence of valid samples only). Coefficients
// may be written at any time with coef_we; a zero coefficient is loaded
// with coef_zero = 1. Reset (rst_n low, asynchronous) clears the delay line
// and sets every coefficient to zero.
module fir_channel #(
  parameter int unsigned M    = 11,
  parameter int unsigned TAPS = 16,
  localparam int unsigned K  = rns_pkg::idx_w(M),
  localparam int unsigned N  = rns_pkg::res_w(M),
  localparam int unsigned TW = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // coefficient load: index y of h_k (ignored when coef_zero)
  input  logic          coef_we,
  input  logic [TW-1:0] coef_tap,
  input  logic          coef_zero,
  input  logic [K-1:0]  coef_idx,
  // input sample as index code (all ones = zero residue)
  input  logic          x_valid,
  input  logic [K-1:0]  x_idx,
  // filter output residue
  output logic          y_valid,
  output logic [N-1:0]  y
);
  localparam int unsigned MI = M - 1;
  localparam int unsigned AW = $clog2(TAPS * MI + 1);

  typedef struct packed {
    logic [AW-1:0] s;
    logic [AW-1:0] c;
  } cs_t;

  logic [K:0]   coef_e [TAPS];   // e_k = y_k - m_I; 0 = zero coefficient
  logic         v1, v2;
  logic [K-1:0] xi;
  cs_t          acc    [TAPS];
  logic [N-1:0] prod   [TAPS];
  cs_t          acc_nx [TAPS];

  // coefficient registers (DIT* value computed at load)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) coef_e[k] <= '0;
    end else if (coef_we) begin
      coef_e[coef_tap] <= coef_zero ? '0 : ({1'b0, coef_idx} - (K+1)'(MI));
    end
  end

  // input register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      xi <= '1;
    end else begin
      v1 <= x_valid;
      if (x_valid) xi <= x_idx;
    end
  end

  // one new isomorph multiplier per tap
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    logic unused_neg;
    iso_mult_core #(.M(M)) u_mul (
      .x(xi), .e(coef_e[k]), .p(prod[k]), .neg(unused_neg)
    );
  end

  // carry-save adders: tap k adds its product to the partial sum of tap k+1
  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      logic [AW-1:0] p, s_in, c_in;
      p = AW'(prod[k]);
      if (k == TAPS - 1) begin
        s_in = '0;
        c_in = '0;
      end else begin
        s_in = acc[k+1].s;
        c_in = acc[k+1].c;
      end
      acc_nx[k].s = p ^ s_in ^ c_in;
      acc_nx[k].c = ((p & s_in) | (p & c_in) | (s_in & c_in)) << 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) acc[k] <= '0;
      v2 <= 1'b0;
    end else begin
      v2 <= v1;
      if (v1) acc <= acc_nx;
    end
  end

  // output stage: carry-propagate addition and reduction mod M
  logic [AW-1:0] total;
  logic          unused_cout;
  cla_add #(.W(AW)) u_cpa (
    .a(acc[0].s), .b(acc[0].c), .cin(1'b0), .sum(total), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= v2;
      if (v2) y <= N'(total % AW'(M));
    end
  end

endmodule
