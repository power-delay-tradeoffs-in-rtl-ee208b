// lp_modadd: modular adder <a+b>_M whose unused half is frozen by
// transparent latches, to cut switching activity.
//
// The plain modular adder computes a+b and a+b-M side by side (left path:
// a 3:2 carry-save adder with the constant -M followed by an (n+1)-bit
// adder whose MSB is the sign of a+b-M; right path: an n-bit adder for a+b)
// and lets the sign pick one. Here a cheap prediction function looks only
// at the two top bits of each operand and decides one of three cases:
//   PRED_RIGHT : a+b <  M is certain, only the right adder is needed
//   PRED_LEFT  : a+b >= M is certain, only the left path is needed
//   PRED_BOTH  : undecided, both run and the sign decides as usual
// The operands reach each path through a pair of transparent latches that
// are open only while that path is enabled; a disabled path keeps its old
// inputs and does not toggle. The small "logic" block turns the prediction
// and the left sign into the multiplexer select.
//
// The prediction is derived from the operand ranges the top bits allow:
// RIGHT if the largest possible sum is below M, LEFT if the smallest one is
// at least M. For M = 11 this is exactly F_R = ~a3 ~b3 (~a2 + ~b2) and
// F_L = a3 b2 + a2 b3 + a3 b3, which enable the right adder alone for 48,
// the left path alone for 33 and both for 40 of the 121 operand pairs.
//
// Both adders are carry-lookahead adders (cla_add).
//
// The latches are the purpose of this block and are intended. Behaviour is
// combinational from a, b to s (delay = prediction + latch + modular add).
// The latch contents are not reset: a path is only read while its latches
// are open. Operands must be residues in [0, M-1]; M must be at least 4.
module lp_modadd #(
  parameter int unsigned M = 11,
  localparam int unsigned N = rns_pkg::res_w(M)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         en_left,   // left path (a+b-M) latches open
  output logic         en_right   // right path (a+b) latches open
);
  localparam int unsigned SH = N - 2;   // weight of the two top bits

  typedef enum logic [1:0] {PRED_BOTH, PRED_RIGHT, PRED_LEFT} pred_e;

  pred_e        pred;
  logic [N:0]   min_sum, max_sum;

  // prediction function on the two top bits of each operand
  always_comb begin
    min_sum = (N+1)'({a[N-1:N-2], SH'(0)}) + (N+1)'({b[N-1:N-2], SH'(0)});
    max_sum = (N+1)'({a[N-1:N-2], {SH{1'b1}}}) + (N+1)'({b[N-1:N-2], {SH{1'b1}}});
    if (max_sum < (N+1)'(M))       pred = PRED_RIGHT;
    else if (min_sum >= (N+1)'(M)) pred = PRED_LEFT;
    else                           pred = PRED_BOTH;
    en_left  = (pred != PRED_RIGHT);
    en_right = (pred != PRED_LEFT);
  end

  // operand latches of the two paths
  logic [N-1:0] la, lb, ra, rb;

  always_latch begin
    if (en_left) begin
      la = a;
      lb = b;
    end
  end

  always_latch begin
    if (en_right) begin
      ra = a;
      rb = b;
    end
  end

  // left path: carry-save adder with -M, then (n+1)-bit adder
  localparam logic [N:0] NEG_M = (N+1)'(-M);
  logic [N:0] cs_s, cs_c, left_sum;
  logic       left_neg;
  // right path: n-bit adder
  logic [N-1:0] right_sum;
  logic         sel_right;

  logic unused_cout_l, unused_cout_r;

  always_comb begin
    cs_s = {1'b0, la} ^ {1'b0, lb} ^ NEG_M;
    cs_c = (({1'b0, la} & {1'b0, lb}) | ({1'b0, la} & NEG_M) | ({1'b0, lb} & NEG_M)) << 1;
  end

  // a + b - M, MSB = sign (a + b < M)
  cla_add #(.W(N+1)) u_left (
    .a(cs_s), .b(cs_c), .cin(1'b0), .sum(left_sum), .cout(unused_cout_l)
  );
  // a + b
  cla_add #(.W(N)) u_right (
    .a(ra), .b(rb), .cin(1'b0), .sum(right_sum), .cout(unused_cout_r)
  );

  always_comb begin
    left_neg = left_sum[N];
    // select logic
    unique case (pred)
      PRED_RIGHT: sel_right = 1'b1;
      PRED_LEFT:  sel_right = 1'b0;
      default:    sel_right = left_neg;
    endcase
    s = sel_right ? right_sum : left_sum[N-1:0];
  end

endmodule
