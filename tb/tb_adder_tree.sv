// tb_adder_tree: self-checking test of the binary adder tree. One instance at
// the default size (16 inputs of 18 bits) and one with 5 inputs (not a power
// of two, so zero leaves are used) are fed random and extreme words; their
// sums are compared with a plain loop sum.
module tb_adder_tree;
  localparam int N0 = 16, IW0 = 18;
  localparam int N1 = 5,  IW1 = 7;

  logic signed [IW0-1:0] a0 [N0];
  logic signed [IW0+3:0] s0;
  logic signed [IW1-1:0] a1 [N1];
  logic signed [IW1+2:0] s1;
  int checks = 0, failures = 0;

  adder_tree #(.N_IN(N0), .IW(IW0)) dut0 (.in_data(a0), .sum(s0));
  adder_tree #(.N_IN(N1), .IW(IW1)) dut1 (.in_data(a1), .sum(s1));

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
      for (int i = 0; i < N0; i++) begin
        a0[i] = (t == 0) ? {1'b1, {(IW0-1){1'b0}}} :
                (t == 1) ? {1'b0, {(IW0-1){1'b1}}} : IW0'($urandom);
        e0 += longint'(a0[i]);
      end
      for (int i = 0; i < N1; i++) begin
        a1[i] = (t == 0) ? {1'b1, {(IW1-1){1'b0}}} :
                (t == 1) ? {1'b0, {(IW1-1){1'b1}}} : IW1'($urandom);
        e1 += longint'(a1[i]);
      end
      #1;
      checks += 2;
      if (longint'(s0) != e0) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 sum=%0d expected %0d", s0, e0);
      end
      if (longint'(s1) != e1) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 sum=%0d expected %0d", s1, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
