// ppg_aoc: AND/OR cell of the partial product generator. Each of the three
// one-hot select lines from a 2-to-3 decoder gates one precomputed multiple
// of the multiplicand; the gated words are ORed. With no select line high
// the output is zero. Purely combinational; WIDTH is the multiple's width.
module ppg_aoc #(
  parameter int unsigned WIDTH = 18
) (
  input  logic             b0, b1, b2,   // one-hot (or all-zero) selects
  input  logic [WIDTH-1:0] m0, m1, m2,   // multiples selected by b0, b1, b2
  output logic [WIDTH-1:0] p
);
  always_comb
    p = ({WIDTH{b0}} & m0) | ({WIDTH{b1}} & m1) | ({WIDTH{b2}} & m2);
endmodule
