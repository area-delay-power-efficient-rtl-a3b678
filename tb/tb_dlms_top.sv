// tb_dlms_top: end-to-end test of the modified DLMS adaptive filter at its
// default parameters (N = 16 taps, L = 8, W = 16, n1 = 2, n2 = 1, mu = 2^-4),
// used as a system-identification run: an unknown 16-tap FIR "plant" h is
// driven by random samples x, its output is the desired signal d, and the
// filter must learn h.
//
// Checks:
//   * cycle-exact agreement with an independent integer model of
//       e(n) = d(n) - y(n),  y(n) = W bits of (w(n-n2)^T x(n)) from bit L-1
//       w(n+1) = w(n) + W bits of ((e(n-n1) * x(n-n1-k)) >>> (L-1+MU_SHIFT))
//     on y_out (= y(n-1)), e_out (= e(n-n1)) and all weights, every cycle;
//   * convergence: the mean |e| over the last 256 cycles must be below 1/20
//     of that over the first 256 cycles after the error first appears, and
//     every learned weight must lie within 64 LSBs of the plant's;
//   * the stand-alone Wallace-tree multiplier against a * b every cycle.
// Mechanisms counted (each must occur): weight updates, negative input
// samples (signed most-significant digit in the PPGs), positive and negative
// errors, and Wallace products.
module tb_dlms_top;
  import lms_pkg::*;
  localparam int N  = LMS_N;
  localparam int L  = LMS_L;
  localparam int W  = LMS_W;
  localparam int N1 = LMS_N1;
  localparam int N2 = LMS_N2;
  localparam int MU = LMS_MU_SHIFT;
  localparam int T  = 4000;

  logic clk = 0, rst_n = 0;
  logic signed [L-1:0] x_in = '0;
  logic signed [W-1:0] d_in = '0;
  logic signed [W-1:0] y_out, e_out;
  logic signed [W-1:0] w_out [N];
  logic [7:0]  mult_a = '0, mult_b = '0;
  logic [15:0] mult_p;

  dlms_top dut (.clk, .rst_n, .x_in, .d_in, .y_out, .e_out, .w_out,
                .mult_a, .mult_b, .mult_p);

  always #5 clk = ~clk;

  longint h [N];
  longint xh [T];
  longint ym [T];
  longint em [T];
  longint wm [T+1][N];
  int checks = 0, failures = 0;
  int n_updates = 0, n_neg_x = 0, n_pos_e = 0, n_neg_e = 0, n_mult = 0;
  longint err_first = 0, err_last = 0;

  initial begin : watchdog
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap_w(longint v);
    logic signed [W-1:0] t;
    t = v[W-1:0];
    return longint'(t);
  endfunction

  function automatic longint x_at(int m);
    return (m >= 0) ? xh[m] : 0;
  endfunction

  function automatic longint absl(longint v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic expect_eq(string what, int n, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d %s=%0d expected %0d", n, what, got, exp);
    end
  endtask

  initial begin
    longint acc_d, acc_y, ed;
    // plant: decaying random impulse response, |h| < 0.5
    for (int k = 0; k < N; k++)
      h[k] = longint'($signed($urandom % 32768) - 16384) / (k / 4 + 1);
    for (int k = 0; k < N; k++) wm[0][k] = 0;

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int n = 0; n < T; n++) begin
      // stimulus
      x_in = L'($urandom);
      xh[n] = longint'(x_in);
      acc_d = 0;
      for (int k = 0; k < N; k++) acc_d += x_at(n - k) * h[k];
      d_in = W'(acc_d >>> (L - 1));
      mult_a = 8'($urandom);
      mult_b = 8'($urandom);

      // model of cycle n
      acc_y = 0;
      for (int k = 0; k < N; k++)
        acc_y += x_at(n - k) * ((n - N2 >= 0) ? wm[n-N2][k] : 0);
      ym[n] = wrap_w(acc_y >>> (L - 1));
      em[n] = wrap_w(longint'(d_in) - ym[n]);
      ed = (n >= N1) ? em[n-N1] : 0;
      for (int k = 0; k < N; k++)
        wm[n+1][k] = wrap_w(wm[n][k] + wrap_w((ed * x_at(n - N1 - k)) >>> (L - 1 + MU)));

      #1;
      expect_eq("y", n, longint'(y_out), (n >= 1) ? ym[n-1] : 0);
      expect_eq("e", n, longint'(e_out), ed);
      for (int k = 0; k < N; k++) expect_eq("w", n, longint'(w_out[k]), wm[n][k]);
      expect_eq("mult", n, longint'(mult_p), longint'(mult_a) * longint'(mult_b));
      n_mult++;

      // mechanism counters and error statistics
      if (x_in < 0) n_neg_x++;
      if (ed > 0) n_pos_e++;
      if (ed < 0) n_neg_e++;
      for (int k = 0; k < N; k++)
        if (wm[n+1][k] != wm[n][k]) begin
          n_updates++;
          break;
        end
      if (n >= N1 && n < N1 + 256) err_first += absl(ed);
      if (n >= T - 256) err_last += absl(ed);
      @(negedge clk);
    end

    checks++;
    if (err_last * 20 >= err_first) begin
      failures++;
      $display("FAIL no convergence: mean |e| first %0d last %0d", err_first / 256, err_last / 256);
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (absl(longint'(w_out[k]) - h[k]) > 64) begin
        failures++;
        $display("FAIL weight %0d = %0d, plant %0d", k, w_out[k], h[k]);
      end
    end
    $display("mean |e|: first 256 cycles %0d, last 256 cycles %0d", err_first / 256, err_last / 256);
    $display("mechanisms: weight updates %0d, negative samples %0d, e>0 %0d, e<0 %0d, products %0d",
             n_updates, n_neg_x, n_pos_e, n_neg_e, n_mult);
    checks += 5;
    if (n_updates == 0) failures++;
    if (n_neg_x == 0)   failures++;
    if (n_pos_e == 0)   failures++;
    if (n_neg_e == 0)   failures++;
    if (n_mult == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
