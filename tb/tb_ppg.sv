// tb_ppg: self-checking test of the 2-bit partial product generator at its
// default size (L = 8, W = 16). Every 8-bit multiplier value is combined with
// random multiplicands and the extremes of w. Each partial product is checked
// against digit * w, where the digits come from an independent radix-4
// decomposition of x (top digit signed), and the weighted sum of the partial
// products is checked against the plain product x * w.
module tb_ppg;
  localparam int L = 8;
  localparam int W = 16;
  localparam int K = L / 2;

  logic signed [L-1:0] x;
  logic signed [W-1:0] w;
  logic signed [W+1:0] p [K];
  int checks = 0, failures = 0;

  ppg #(.L(L), .W(W)) dut (.x(x), .w(w), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint digit, acc, expect_p;
    acc = 0;
    for (int l = 0; l < K; l++) begin
      digit = (longint'(x) >>> (2 * l)) & 3;
      if (l == K - 1 && digit >= 2) digit -= 4;    // signed top digit
      expect_p = digit * longint'(w);
      checks++;
      if (longint'(p[l]) != expect_p) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d w=%0d l=%0d p=%0d expected %0d", x, w, l, p[l], expect_p);
      end
      acc += longint'(p[l]) <<< (2 * l);
    end
    checks++;
    if (acc != longint'(x) * longint'(w)) begin
      failures++;
      $display("FAIL x=%0d w=%0d sum=%0d", x, w, acc);
    end
  endtask

  initial begin
    for (int xi = 0; xi < (1 << L); xi++) begin
      x = L'(xi);
      for (int r = 0; r < 8; r++) begin
        case (r)
          0: w = {1'b1, {(W-1){1'b0}}};   // most negative
          1: w = {1'b0, {(W-1){1'b1}}};   // most positive
          2: w = '1;                      // -1
          default: w = W'($urandom);
        endcase
        #1;
        check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
