// tb_delay_line: self-checking test of the register chain. A 3-deep, 12-bit
// line is fed random words; after reset every tap must read zero, and tap i
// must then hold the word applied i+1 clocks earlier.
module tb_delay_line;
  localparam int WID = 12, DEP = 3;

  logic clk = 0, rst_n = 0;
  logic [WID-1:0] din = '0;
  logic [WID-1:0] taps [DEP];
  logic [WID-1:0] dout;
  logic [WID-1:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.WIDTH(WID), .DEPTH(DEP)) dut (.clk, .rst_n, .din, .taps, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int i = 0; i < DEP; i++) begin
      checks++;
      if (taps[i] != '0) failures++;
    end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < DEP; i++) hist.push_front('0);
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int i = 0; i < DEP; i++) begin
        checks++;
        if (taps[i] != hist[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d tap %0d = %h expected %h", t, i, taps[i], hist[i]);
        end
      end
      checks++;
      if (dout != hist[DEP-1]) failures++;
      din = WID'($urandom);
      hist.push_front(din);
      void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
