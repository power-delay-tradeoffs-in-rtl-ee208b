// tb_fir_channel: one filter channel, m = 13, 16 taps. Random coefficients
// (about one in six zero) are loaded as indices, then a random sample
// stream with idle cycles is filtered. A reference model keeps the last 16
// valid samples and computes sum h_k x(t-k) mod 13; y_valid must come
// exactly 3 cycles after each x_valid. Coefficients are reloaded halfway.
module tb_fir_channel;
  import tb_rns_ref_pkg::*;

  localparam int M = 13;
  localparam int TAPS = 16;
  localparam int K = 4;

  int checks = 0, failures = 0;
  int n_gap = 0, n_zero_x = 0;

  logic         clk = 0, rst_n = 0;
  logic         coef_we = 0, coef_zero = 0;
  logic [3:0]   coef_tap = '0;
  logic [K-1:0] coef_idx = '0;
  logic         x_valid = 0;
  logic [K-1:0] x_idx = '0;
  logic         y_valid;
  logic [3:0]   y;

  fir_channel #(.M(M), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  int h [TAPS];
  int hist [TAPS];
  int exp_q [$];
  int vld_pipe [4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_coefs();
    for (int k = 0; k < TAPS; k++) begin
      h[k] = ($urandom_range(5) == 0) ? 0 : $urandom_range(M - 1);
      @(negedge clk);
      coef_we = 1; coef_tap = 4'(k);
      coef_zero = (h[k] == 0);
      coef_idx = (h[k] == 0) ? '0 : K'(ref_log(M, h[k]));
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  // output checker: compare in order, check the 3-cycle latency
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
      int e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (int'(y) != e) begin failures++; $display("FAIL y=%0d expected %0d", y, e); end
      end
    end
  end

  task automatic send(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        x_valid = 0; n_gap++;
      end else begin
        int v, acc;
        v = $urandom_range(M - 1);
        if (v == 0) n_zero_x++;
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = v;
        acc = 0;
        for (int k = 0; k < TAPS; k++) acc += h[k] * hist[k];
        exp_q.push_back(acc % M);
        x_valid = 1;
        x_idx = (v == 0) ? '1 : K'(ref_log(M, v));
      end
    end
    @(negedge clk);
    x_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  // 16 zero samples: the transposed delay line then holds only zeros, so
  // new coefficients can be loaded without mixing old and new products
  task automatic flush();
    for (int i = 0; i < TAPS; i++) begin
      int acc;
      @(negedge clk);
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = 0;
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += h[k] * hist[k];
      exp_q.push_back(acc % M);
      x_valid = 1;
      x_idx = '1;
    end
    @(negedge clk);
    x_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    for (int i = 0; i < 4; i++) vld_pipe[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_coefs();
    send(400);
    flush();
    load_coefs();
    send(400);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("idle cycles %0d, zero samples %0d", n_gap, n_zero_x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
