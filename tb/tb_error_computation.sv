// tb_error_computation: self-checking test of the error-computation block at
// its default size (N = 16 taps, L = 8, W = 16).
//
// Every cycle a random sample x(n), desired value d(n) and weight vector are
// applied. A reference model computes, with plain integer arithmetic,
//   y(n) = W bits of (sum_k x(n-k) * w_k(n)) starting at bit L-1,
//   e(n) = d(n) - y(n) (W-bit wrap-around),
// and the test checks the block's 2-cycle latency exactly: in cycle n the
// output y must equal y(n-1) and e_out must equal e(n-2). The tapped delay
// line outputs x_taps[k] are checked against x(n-k). The reset values (zero)
// are checked before the first sample.
module tb_error_computation;
  localparam int N = 16, L = 8, W = 16, T = 600;

  logic clk = 0, rst_n = 0;
  logic signed [L-1:0] x_in = '0;
  logic signed [W-1:0] d_in = '0;
  logic signed [W-1:0] w [N];
  logic signed [L-1:0] x_taps [N];
  logic signed [W-1:0] y, e_out;

  longint xh [T];
  longint ym [T];
  longint em [T];
  int checks = 0, failures = 0;

  error_computation #(.N(N), .L(L), .W(W)) dut (
    .clk, .rst_n, .x_in, .d_in, .w, .x_taps, .y, .e_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (T * 4) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap_w(longint v);
    logic signed [W-1:0] t;
    t = v[W-1:0];
    return longint'(t);
  endfunction

  task automatic expect_eq(string what, int n, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d %s=%0d expected %0d", n, what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) w[k] = '0;
    repeat (2) @(posedge clk);
    expect_eq("reset e", -1, longint'(e_out), 0);
    expect_eq("reset y", -1, longint'(y), 0);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < T; n++) begin
      longint acc;
      acc = 0;
      // new inputs for cycle n
      x_in = L'($urandom);
      d_in = W'($urandom);
      for (int k = 0; k < N; k++)
        w[k] = (n % 3 == 0) ? W'($urandom) : W'($signed($urandom % 4096) - 2048);
      xh[n] = longint'(x_in);
      for (int k = 0; k < N; k++)
        if (n - k >= 0) acc += xh[n-k] * longint'(w[k]);
      ym[n] = wrap_w(acc >>> (L - 1));
      em[n] = wrap_w(longint'(d_in) - ym[n]);
      #1;
      for (int k = 0; k < N; k++)
        expect_eq("x_tap", n, longint'(x_taps[k]), (n - k >= 0) ? xh[n-k] : 0);
      expect_eq("y", n, longint'(y), (n >= 1) ? ym[n-1] : 0);
      expect_eq("e", n, longint'(e_out), (n >= 2) ? em[n-2] : 0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
