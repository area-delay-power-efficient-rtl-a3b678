// wallace_multiplier: 8 x 8 unsigned Wallace-tree multiplier.
//
// Three steps, as the document describes: (1) AND every bit of b with a,
// giving the eight partial products AB0..AB7 (ABi = (a & {8{b[i]}}) << i);
// (2) reduce them to two words with six carry-save adders in four levels;
// (3) add the two words with a carry-propagate adder. The reduction follows
// the tree drawn in the document: level 1 takes AB5, AB4, AB3 and AB2, AB1,
// AB0; level 2 takes AB7, AB6 and one word of the first level-1 CSA, and the
// other three level-1 words; level 3 takes one word of the first level-2 CSA
// and both words of the second; level 4 takes the remaining level-2 word and
// both level-3 words. Which of a CSA's two words (sum or carry) goes where is
// this design's choice; any assignment gives the same product.
//
// Interface: a, b in; p = a * b (16 bits) out. Timing: purely combinational.
module wallace_multiplier (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [15:0] ab [8];
  always_comb
    for (int unsigned i = 0; i < 8; i++)
      ab[i] = {8'b0, a & {8{b[i]}}} << i;

  logic [15:0] s1, c1, s2, c2, s3, c3, s4, c4, s5, c5, s6, c6;
  csa #(.WIDTH(16)) u_csa1 (.a(ab[5]), .b(ab[4]), .c(ab[3]), .sum(s1), .carry(c1));
  csa #(.WIDTH(16)) u_csa2 (.a(ab[2]), .b(ab[1]), .c(ab[0]), .sum(s2), .carry(c2));
  csa #(.WIDTH(16)) u_csa3 (.a(ab[7]), .b(ab[6]), .c(c1),    .sum(s3), .carry(c3));
  csa #(.WIDTH(16)) u_csa4 (.a(s1),    .b(s2),    .c(c2),    .sum(s4), .carry(c4));
  csa #(.WIDTH(16)) u_csa5 (.a(c3),    .b(s4),    .c(c4),    .sum(s5), .carry(c5));
  csa #(.WIDTH(16)) u_csa6 (.a(s3),    .b(s5),    .c(c5),    .sum(s6), .carry(c6));

  assign p = s6 + c6;   // carry-propagate adder
endmodule
