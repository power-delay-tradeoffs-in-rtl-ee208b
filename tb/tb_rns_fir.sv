// tb_rns_fir: the 16-tap RNS filter at its default size. Coefficients are
// random binary values in [0, 4146], loaded as per-modulus indices. First
// an impulse must reproduce the coefficients in order; then a random
// 12-bit sample stream with idle cycles is filtered and every output is
// compared, residue by residue and after Chinese-remainder reconstruction,
// with sum_k h_k x(t-k) mod 4147 computed in plain integers.
module tb_rns_fir;
  import tb_rns_ref_pkg::*;

  localparam int TAPS = 16;
  localparam int NM = 3;
  localparam int MOD [NM] = '{11, 13, 29};
  localparam int MR = 11 * 13 * 29;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        coef_we = 0;
  logic [3:0]  coef_tap = '0;
  logic        coef_zero [NM];
  logic [4:0]  coef_idx  [NM];
  logic        x_valid = 0;
  logic [11:0] x_in = '0;
  logic        y_valid;
  logic [4:0]  y_res [NM];

  rns_fir dut (.*);

  always #5 clk = ~clk;

  longint h [TAPS];
  longint hist [TAPS];
  longint exp_q [$];

  // y from its residues by the Chinese remainder theorem
  function automatic longint crt(int r0, int r1, int r2);
    longint acc = 0;
    int r [NM];
    r = '{r0, r1, r2};
    for (int i = 0; i < NM; i++) begin
      longint mi = MR / MOD[i];
      longint inv = 0;
      for (int t = 1; t < MOD[i]; t++) if ((mi * t) % MOD[i] == 1) inv = t;
      acc += r[i] * mi * inv;
    end
    return acc % MR;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      longint e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        for (int i = 0; i < NM; i++)
          if (int'(y_res[i]) != int'(e % MOD[i])) begin
            failures++; $display("FAIL residue %0d: %0d expected %0d", MOD[i], y_res[i], e % MOD[i]);
          end
        if (crt(int'(y_res[0]), int'(y_res[1]), int'(y_res[2])) != e) begin
          failures++; $display("FAIL y expected %0d", e);
        end
      end
    end
  end

  task automatic push(longint v);
    longint acc = 0;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    for (int k = 0; k < TAPS; k++) acc += h[k] * hist[k];
    exp_q.push_back(acc % MR);
    x_valid = 1;
    x_in = 12'(v);
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < TAPS; k++) begin
      h[k] = $urandom_range(MR - 1);
      @(negedge clk);
      coef_we = 1; coef_tap = 4'(k);
      for (int i = 0; i < NM; i++) begin
        int r;
        r = int'(h[k] % MOD[i]);
        coef_zero[i] = (r == 0);
        coef_idx[i]  = (r == 0) ? '0 : 5'(ref_log(MOD[i], r));
      end
    end
    @(negedge clk);
    coef_we = 0;
    // impulse response
    @(negedge clk); push(1);
    for (int i = 0; i < TAPS + 2; i++) begin @(negedge clk); push(0); end
    // random stream with idle cycles
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if ($urandom_range(4) == 0) x_valid = 0;
      else push(longint'($urandom_range(4095)));
    end
    @(negedge clk);
    x_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
