// rns_top: the three low-switching-activity RNS circuits side by side.
//
//   * rns_fir   : the 16-tap programmable RNS FIR filter, moduli {11,13,29},
//                 carry-save transposed form with the adder+table isomorph
//                 multipliers (the main design).
//   * lp_modadd : a stand-alone modulo-11 adder whose unused half is frozen
//                 by prediction-controlled transparent latches.
//   * iso_mult  : a stand-alone modulo-11 isomorph multiplier with its DIT
//                 and DIT* tables (residues in, residue out).
// The three share nothing but the package; each has its own ports. The
// filter is clocked (3-cycle latency, one sample per cycle); the adder and
// the multiplier are combinational. See the blocks for their interfaces.
module rns_top #(
  parameter int unsigned TAPS  = 16,
  parameter int unsigned X_W   = 12,
  parameter int unsigned ADD_M = 11,
  parameter int unsigned MUL_M = 11,
  localparam int unsigned NM = rns_pkg::NUM_MOD,
  localparam int unsigned RW = rns_pkg::RES_W,
  localparam int unsigned TW = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned AN = rns_pkg::res_w(ADD_M),
  localparam int unsigned MN = rns_pkg::res_w(MUL_M)
) (
  input  logic           clk,
  input  logic           rst_n,
  // FIR filter
  input  logic           coef_we,
  input  logic [TW-1:0]  coef_tap,
  input  logic           coef_zero [NM],
  input  logic [RW-1:0]  coef_idx  [NM],
  input  logic           x_valid,
  input  logic [X_W-1:0] x_in,
  output logic           y_valid,
  output logic [RW-1:0]  y_res     [NM],
  // latch-gated modular adder
  input  logic [AN-1:0]  add_a,
  input  logic [AN-1:0]  add_b,
  output logic [AN-1:0]  add_s,
  output logic           add_en_left,
  output logic           add_en_right,
  // isomorph multiplier
  input  logic [MN-1:0]  mul_a,
  input  logic [MN-1:0]  mul_b,
  output logic [MN-1:0]  mul_p,
  output logic           mul_neg
);

  rns_fir #(.TAPS(TAPS), .X_W(X_W)) u_fir (
    .clk, .rst_n, .coef_we, .coef_tap, .coef_zero, .coef_idx,
    .x_valid, .x_in, .y_valid, .y_res
  );

  lp_modadd #(.M(ADD_M)) u_add (
    .a(add_a), .b(add_b), .s(add_s), .en_left(add_en_left), .en_right(add_en_right)
  );

  iso_mult #(.M(MUL_M)) u_mul (
    .a(mul_a), .b(mul_b), .p(mul_p), .neg(mul_neg)
  );

endmodule
