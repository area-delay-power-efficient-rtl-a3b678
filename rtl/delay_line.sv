// delay_line: chain of DEPTH registers (the "n D" boxes of the filter).
//
// taps[i] is the input delayed by i+1 clock cycles; dout is the last tap.
// The filter uses it for the n2-cycle delay of the weights into the
// error-computation block and for extending the input-sample delay line by
// n1 taps for the weight-update block. Registers clear on the asynchronous,
// active-low reset (this design's choice; the document gives no reset).
module delay_line #(
  parameter int unsigned WIDTH = lms_pkg::LMS_L,
  parameter int unsigned DEPTH = lms_pkg::LMS_N1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] taps [DEPTH],
  output logic [WIDTH-1:0] dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) taps[i] <= '0;
    end else begin
      taps[0] <= din;
      for (int unsigned i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

  assign dout = taps[DEPTH-1];
endmodule
