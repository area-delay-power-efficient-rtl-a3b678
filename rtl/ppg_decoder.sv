// ppg_decoder: 2-to-3 decoder of one radix-4 digit (u1 u0) for the partial
// product generator. Exactly one output is high for digit values 1, 2 and 3
// (b0, b1, b2 respectively); all are low for 0. Purely combinational.
module ppg_decoder (
  input  logic [1:0] u,   // digit {u1, u0}
  output logic       b0,  // digit == 1
  output logic       b1,  // digit == 2
  output logic       b2   // digit == 3
);
  always_comb begin
    b0 =  u[0] & ~u[1];
    b1 = ~u[0] &  u[1];
    b2 =  u[0] &  u[1];
  end
endmodule
