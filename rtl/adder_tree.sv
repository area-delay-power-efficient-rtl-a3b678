// adder_tree: binary adder tree summing N_IN signed words.
//
// In the error-computation block there is one such tree per digit position l:
// it adds the l-th partial products of all N PPGs (one per tap). The tree has
// ceil(log2 N_IN) stages of two-input adders, as in the document; when N_IN is
// not a power of two the missing leaves are zero. The output is wide enough
// that no sum can overflow (IW + ceil(log2 N_IN) bits).
//
// Interface: in_data[0..N_IN-1] (IW bits each) in, sum out.
// Timing: purely combinational; any pipeline register is placed by the user.
module adder_tree #(
  parameter int unsigned N_IN = lms_pkg::LMS_N,
  parameter int unsigned IW   = lms_pkg::LMS_W + 2,
  localparam int unsigned STAGES = (N_IN > 1) ? $clog2(N_IN) : 0,
  localparam int unsigned OW     = IW + STAGES
) (
  input  logic signed [IW-1:0] in_data [N_IN],
  output logic signed [OW-1:0] sum
);
  localparam int unsigned LEAVES = 1 << STAGES;

  // node[s][i]: the i-th partial sum after s stages
  logic signed [OW-1:0] node [STAGES+1][LEAVES];

  always_comb begin
    for (int unsigned i = 0; i < LEAVES; i++) begin
      if (i < N_IN) node[0][i] = OW'(in_data[i]);   // sign-extends
      else          node[0][i] = '0;
    end
    for (int unsigned s = 0; s < STAGES; s++)
      for (int unsigned i = 0; i < LEAVES; i++) begin
        if (i < (LEAVES >> (s + 1))) node[s+1][i] = node[s][2*i] + node[s][2*i+1];
        else                         node[s+1][i] = '0;
      end
  end

  assign sum = node[STAGES][0];
endmodule
