// tb_weight_update: self-checking test of the weight-update block at its
// default size (N = 16, L = 8, W = 16, mu = 2^-4).
//
// Every cycle a random error e and random delayed samples xd[k] are applied.
// A reference model keeps its own weights and applies
//   w_k += W bits of ((e * xd[k]) >>> (L - 1 + MU_SHIFT))
// with wrap-around; after each clock every weight register must match. The
// error is drawn from a wide range so that positive, negative and full-scale
// products all occur; resetting must clear every weight.
module tb_weight_update;
  localparam int N = 16, L = 8, W = 16, MU = 4, T = 800;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] e = '0;
  logic signed [L-1:0] xd [N];
  logic signed [W-1:0] w [N];
  longint wm [N];
  int checks = 0, failures = 0;

  weight_update #(.N(N), .L(L), .W(W), .MU_SHIFT(MU)) dut (.clk, .rst_n, .e, .xd, .w);

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

  initial begin
    for (int k = 0; k < N; k++) begin
      xd[k] = '0;
      wm[k] = 0;
    end
    repeat (2) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (w[k] != '0) failures++;
    end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < T; n++) begin
      case (n % 4)
        0: e = {1'b1, {(W-1){1'b0}}};
        1: e = W'($urandom);
        default: e = W'($signed($urandom % 2001) - 1000);
      endcase
      for (int k = 0; k < N; k++) xd[k] = L'($urandom);
      @(posedge clk);
      for (int k = 0; k < N; k++)
        wm[k] = wrap_w(wm[k] + wrap_w((longint'(e) * longint'(xd[k])) >>> (L - 1 + MU)));
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (longint'(w[k]) != wm[k]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d w[%0d]=%0d expected %0d", n, k, w[k], wm[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
