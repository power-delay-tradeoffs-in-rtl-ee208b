// tb_rns_top: end-to-end test of the whole design at its default size
// (16-tap filter over {11, 13, 29}, modulo-11 adder and multiplier).
//
// Filter: two coefficient sets (the second loaded after flushing the delay
// line with zero samples), each with some coefficients that are zero in one
// or more moduli; an impulse to read the coefficients back; random 12-bit
// samples, multiples of 11, 13 and 29 among them, with idle cycles. Every
// output is checked per residue and after CRT reconstruction against plain
// integer convolution mod 4147, and must come 3 cycles after its sample.
// Adder and multiplier: every operand pair, several times in random order.
// The test counts how often each mechanism occurred and fails if one never
// did: idle cycles, zero sample and zero coefficient bypass in the taps,
// IIT and IIT* table halves in the taps, coefficient reload, and for the
// adder right-only, left-only and both-enabled cases (with the sign picking
// either side), and for the multiplier zero bypass, IIT and IIT*.
module tb_rns_top;
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
  logic [3:0]  add_a = '0, add_b = '0, add_s;
  logic        add_en_left, add_en_right;
  logic [3:0]  mul_a = '0, mul_b = '0, mul_p;
  logic        mul_neg;

  rns_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_idle = 0, n_zero_x = 0, n_zero_h = 0, n_iit = 0, n_iit_star = 0, n_reload = 0;
  int n_add_r = 0, n_add_l = 0, n_add_b_r = 0, n_add_b_l = 0;
  int n_mul_zero = 0, n_mul_iit = 0, n_mul_star = 0;

  int     logt [NM][32];
  longint h [TAPS];
  longint hist [TAPS];
  longint exp_q [$];
  int     vld_pipe [4];

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- filter checking ----------------
  always @(posedge clk) begin
    vld_pipe[3] <= vld_pipe[2];
    vld_pipe[2] <= vld_pipe[1];
    vld_pipe[1] <= int'(x_valid);
    if (rst_n) begin
      checks++;
      if (int'(y_valid) != vld_pipe[3]) begin
        failures++; $display("FAIL latency: y_valid=%0d expected %0d", y_valid, vld_pipe[3]);
      end
    end
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
    // what the taps will do with this sample
    for (int i = 0; i < NM; i++) begin
      int xr;
      xr = int'(v % MOD[i]);
      if (xr == 0) n_zero_x++;
      for (int k = 0; k < TAPS; k++) begin
        int hr;
        hr = int'(h[k] % MOD[i]);
        if (hr == 0) n_zero_h++;
        else if (xr != 0) begin
          if (logt[i][xr] + logt[i][hr] < MOD[i] - 1) n_iit_star++; else n_iit++;
        end
      end
    end
    x_valid = 1;
    x_in = 12'(v);
  endtask

  task automatic load_coefs(int set);
    for (int k = 0; k < TAPS; k++) begin
      case (k)
        3:       h[k] = 0;
        5:       h[k] = 11 * (1 + set);
        9:       h[k] = 13 * 29;
        default: h[k] = $urandom_range(MR - 1);
      endcase
      @(negedge clk);
      coef_we = 1; coef_tap = 4'(k);
      for (int i = 0; i < NM; i++) begin
        int r;
        r = int'(h[k] % MOD[i]);
        coef_zero[i] = (r == 0);
        coef_idx[i]  = (r == 0) ? '0 : 5'(logt[i][r]);
      end
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  task automatic run_filter();
    @(negedge clk); push(1);
    for (int i = 0; i < TAPS + 2; i++) begin @(negedge clk); push(0); end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      case ($urandom_range(9))
        0, 1: begin x_valid = 0; n_idle++; end
        2:       push(longint'(MOD[$urandom_range(2)] * $urandom_range(100)));
        default: push(longint'($urandom_range(4095)));
      endcase
    end
    // flush with zero samples so the delay line is empty
    for (int i = 0; i < TAPS; i++) begin @(negedge clk); push(0); end
    @(negedge clk);
    x_valid = 0;
    repeat (6) @(negedge clk);
  endtask

  // ---------------- adder and multiplier ----------------
  task automatic check_add(int a, int b);
    add_a = 4'(a); add_b = 4'(b);
    #1;
    checks++;
    if (int'(add_s) != (a + b) % 11) begin
      failures++; $display("FAIL add %0d+%0d = %0d", a, b, add_s);
    end
    if (add_en_right && !add_en_left) n_add_r++;
    else if (add_en_left && !add_en_right) n_add_l++;
    else if (a + b < 11) n_add_b_r++;
    else n_add_b_l++;
  endtask

  task automatic check_mul(int a, int b);
    mul_a = 4'(a); mul_b = 4'(b);
    #1;
    checks++;
    if (int'(mul_p) != (a * b) % 11) begin
      failures++; $display("FAIL mul %0d*%0d = %0d", a, b, mul_p);
    end
    if (a == 0 || b == 0) n_mul_zero++;
    else if (mul_neg) n_mul_star++;
    else n_mul_iit++;
  endtask

  initial begin
    for (int i = 0; i < NM; i++)
      for (int r = 0; r < 32; r++)
        logt[i][r] = (r >= 1 && r < MOD[i]) ? ref_log(MOD[i], r) : 0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    for (int i = 0; i < 4; i++) vld_pipe[i] = 0;
    for (int i = 0; i < NM; i++) begin coef_zero[i] = 1; coef_idx[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    load_coefs(0);
    run_filter();
    load_coefs(1);
    n_reload++;
    run_filter();
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end

    for (int a = 0; a < 11; a++) for (int b = 0; b < 11; b++) check_add(a, b);
    for (int i = 0; i < 3000; i++) check_add($urandom_range(10), $urandom_range(10));
    for (int a = 0; a < 11; a++) for (int b = 0; b < 11; b++) check_mul(a, b);
    for (int i = 0; i < 3000; i++) check_mul($urandom_range(10), $urandom_range(10));

    $display("filter: idle %0d, zero sample %0d, zero coef %0d, IIT %0d, IIT* %0d, reload %0d",
             n_idle, n_zero_x, n_zero_h, n_iit, n_iit_star, n_reload);
    $display("adder: right only %0d, left only %0d, both->right %0d, both->left %0d",
             n_add_r, n_add_l, n_add_b_r, n_add_b_l);
    $display("multiplier: zero %0d, IIT %0d, IIT* %0d", n_mul_zero, n_mul_iit, n_mul_star);
    begin
      int cnt [13];
      cnt = '{n_idle, n_zero_x, n_zero_h, n_iit, n_iit_star, n_reload,
              n_add_r, n_add_l, n_add_b_r, n_add_b_l, n_mul_zero, n_mul_iit, n_mul_star};
      for (int i = 0; i < 13; i++) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never occurred", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
