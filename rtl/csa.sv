// csa: WIDTH-bit carry-save adder (a row of full adders). Reduces three
// operands to two with a + b + c == sum + carry (mod 2^WIDTH); carry is
// already shifted one place left. Purely combinational.
module csa #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a, b, c,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);
  logic [WIDTH-1:0] maj;
  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[WIDTH-2:0], 1'b0};
  end
endmodule
