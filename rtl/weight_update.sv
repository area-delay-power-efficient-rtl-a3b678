// weight_update: weight-update block of the modified DLMS filter.
//
// Holds the N filter weights and, every clock, applies the delayed LMS rule
//   w[k](n+1) = w[k](n) + mu * e(n-n1) * x(n-n1-k)
// where e(n-n1) and the samples x(n-n1-k) are supplied already delayed.
// Each of the N weight cells multiplies the error by its sample with a 2-bit
// PPG (the error is the multiplicand, the sample supplies the radix-4 digits)
// and a shift-add tree, as the document builds its weight-update block with
// PPGs. mu = 2^-MU_SHIFT is a right shift. The product has (W-1)+(L-1)
// fraction bits; its L-1+MU_SHIFT least significant bits are truncated so
// the increment has the weights' W-bit format, and the weight adder wraps.
//
// Interface: e and xd[0..N-1] in, w[0..N-1] (the weight registers) out.
// Timing: one update per clock; w changes on each rising edge.
// Reset: asynchronous, active low, clears every weight to zero.
module weight_update #(
  parameter int unsigned N        = lms_pkg::LMS_N,
  parameter int unsigned L        = lms_pkg::LMS_L,
  parameter int unsigned W        = lms_pkg::LMS_W,
  parameter int unsigned MU_SHIFT = lms_pkg::LMS_MU_SHIFT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] e,        // e(n-n1)
  input  logic signed [L-1:0] xd [N],   // x(n-n1-k)
  output logic signed [W-1:0] w [N]
);
  localparam int unsigned K  = L / 2;
  localparam int unsigned PW = W + 2;
  localparam int unsigned MW = PW + 2 * K - 1;     // product width
  localparam int unsigned SH = L - 1 + MU_SHIFT;   // truncated LSBs

  for (genvar k = 0; k < N; k++) begin : g_cell
    logic signed [PW-1:0] pp [K];
    logic signed [MW-1:0] prod;
    logic signed [MW-1:0] prod_sh;
    logic signed [W-1:0]  inc;

    ppg #(.L(L), .W(W)) u_ppg (.x(xd[k]), .w(e), .p(pp));
    shift_add_tree #(.K(K), .IW(PW)) u_sat (.q(pp), .sum(prod));

    always_comb begin
      prod_sh = prod >>> SH;
      inc     = prod_sh[W-1:0];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) w[k] <= '0;
      else        w[k] <= w[k] + inc;
    end
  end
endmodule
