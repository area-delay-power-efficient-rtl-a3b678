// tb_shift_add_tree: self-checking test of the shift-add tree. An instance
// at the default size (4 digit sums of 22 bits) and one with 3 inputs are fed
// random and extreme words; the outputs are compared with sum q[l] * 4^l.
module tb_shift_add_tree;
  localparam int K0 = 4, IW0 = 22;
  localparam int K1 = 3, IW1 = 6;

  logic signed [IW0-1:0] q0 [K0];
  logic signed [IW0+2*K0-2:0] s0;
  logic signed [IW1-1:0] q1 [K1];
  logic signed [IW1+2*K1-2:0] s1;
  int checks = 0, failures = 0;

  shift_add_tree #(.K(K0), .IW(IW0)) dut0 (.q(q0), .sum(s0));
  shift_add_tree #(.K(K1), .IW(IW1)) dut1 (.q(q1), .sum(s1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint e0, e1;
      e0 = 0;
      e1 = 0;
      for (int i = 0; i < K0; i++) begin
        q0[i] = (t == 0) ? {1'b1, {(IW0-1){1'b0}}} :
                (t == 1) ? {1'b0, {(IW0-1){1'b1}}} : IW0'($urandom);
        e0 += longint'(q0[i]) <<< (2 * i);
      end
      for (int i = 0; i < K1; i++) begin
        q1[i] = (t == 0) ? {1'b1, {(IW1-1){1'b0}}} :
                (t == 1) ? {1'b0, {(IW1-1){1'b1}}} : IW1'($urandom);
        e1 += longint'(q1[i]) <<< (2 * i);
      end
      #1;
      checks += 2;
      if (longint'(s0) != e0) begin
        failures++;
        if (failures < 10) $display("FAIL K=4 sum=%0d expected %0d", s0, e0);
      end
      if (longint'(s1) != e1) begin
        failures++;
        if (failures < 10) $display("FAIL K=3 sum=%0d expected %0d", s1, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
