// shift_add_tree: combines the digit sums q[0..K-1] of a radix-4 multiplication
// into sum_l q[l] * 4^l.
//
// The tree has ceil(log2 K) stages (log2 L - 1 for K = L/2 digits, as in the
// document). Stage s adds pairs of neighbouring nodes, the upper one shifted
// left by 2 * 2^s bits, so every shift is wiring and every stage is one row of
// adders. Missing leaves (K not a power of two) are zero. Every node is
// computed at the output width, IW + 2K - 1 bits, which holds sum q[l]*4^l for
// any IW-bit inputs.
//
// Interface: q[0..K-1] (IW bits each) in, sum out.
// Timing: purely combinational.
module shift_add_tree #(
  parameter int unsigned K  = lms_pkg::LMS_L / 2,
  parameter int unsigned IW = lms_pkg::LMS_W + 2 + $clog2(lms_pkg::LMS_N),
  localparam int unsigned STAGES = (K > 1) ? $clog2(K) : 0,
  localparam int unsigned OW     = IW + 2 * K - 1
) (
  input  logic signed [IW-1:0] q [K],
  output logic signed [OW-1:0] sum
);
  localparam int unsigned LEAVES = 1 << STAGES;

  logic signed [OW-1:0] node [STAGES+1][LEAVES];

  always_comb begin
    for (int unsigned i = 0; i < LEAVES; i++) begin
      if (i < K) node[0][i] = OW'(q[i]);   // sign-extends
      else       node[0][i] = '0;
    end
    for (int unsigned s = 0; s < STAGES; s++)
      for (int unsigned i = 0; i < LEAVES; i++) begin
        if (i < (LEAVES >> (s + 1)))
          node[s+1][i] = node[s][2*i] + (node[s][2*i+1] <<< (2 * (1 << s)));
        else
          node[s+1][i] = '0;
      end
  end

  assign sum = node[STAGES][0];
endmodule
