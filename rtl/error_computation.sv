// error_computation: error-computation block of the modified DLMS filter.
//
// Computes e = d - y with y = w^T x over an N-tap window of input samples.
// The filter output and the subtraction are merged into one block, as the
// document proposes. Structure, following the document:
//   * a tapped delay line of N-1 registers holding x(n) .. x(n-N+1);
//   * N 2-bit PPGs, PPG-k multiplying weight w[k] by sample x(n-k) digit by
//     digit (L/2 partial products each);
//   * L/2 adder trees (log2 N stages each), tree l adding the l-th partial
//     products of all N PPGs into q[l];
//   * one shift-add tree (log2 L - 1 stages) forming y = sum_l q[l] * 4^l;
//   * the subtractor d - y and the error register.
// Pipelining (this design's choice of where to cut): the q[l] are registered
// between the adder trees and the shift-add tree, and d is delayed by one
// cycle to stay aligned; the error is registered. The block's latency n1 is
// therefore 2 cycles: e_out in cycle n is e(n-2).
//
// Fixed point: the full-precision inner product has (L-1)+(W-1) fraction
// bits; y keeps W bits of it starting at bit L-1 (the L-1 LSBs are truncated),
// which gives y the weights' format. d, y and e share that W-bit format; the
// subtraction wraps, relying on the LMS property that y follows d in sign.
//
// Interface: x_in, d_in are one new sample per clock; w[k] are the weights
// the filter is to use (already delayed by n2 outside); x_taps[k] = x(n-k)
// (x_taps[0] is x_in itself) are brought out for the weight-update block;
// y is the filter output of the previous sample, e_out the registered error.
// Reset: asynchronous, active low, clears all registers.
module error_computation #(
  parameter int unsigned N = lms_pkg::LMS_N,
  parameter int unsigned L = lms_pkg::LMS_L,
  parameter int unsigned W = lms_pkg::LMS_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [L-1:0] x_in,
  input  logic signed [W-1:0] d_in,
  input  logic signed [W-1:0] w [N],
  output logic signed [L-1:0] x_taps [N],
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] e_out
);
  localparam int unsigned K  = L / 2;                       // digits per sample
  localparam int unsigned PW = W + 2;                       // partial product
  localparam int unsigned QW = PW + ((N > 1) ? $clog2(N) : 0); // digit sum
  localparam int unsigned SW = QW + 2 * K - 1;              // inner product

  // ---- tapped delay line --------------------------------------------------
  logic signed [L-1:0] x_reg [N];   // x_reg[0] unused

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 1; k < N; k++) x_reg[k] <= '0;
    end else begin
      for (int unsigned k = 1; k < N; k++) x_reg[k] <= x_taps[k-1];
    end
  end

  always_comb begin
    x_taps[0] = x_in;
    for (int unsigned k = 1; k < N; k++) x_taps[k] = x_reg[k];
  end
  assign x_reg[0] = '0;

  // ---- PPGs ---------------------------------------------------------------
  logic signed [PW-1:0] pp [N][K];      // pp[k][l] from PPG-k
  for (genvar k = 0; k < N; k++) begin : g_ppg
    ppg #(.L(L), .W(W)) u_ppg (.x(x_taps[k]), .w(w[k]), .p(pp[k]));
  end

  // ---- adder trees, one per digit position --------------------------------
  logic signed [QW-1:0] q [K];
  logic signed [QW-1:0] q_r [K];
  for (genvar l = 0; l < K; l++) begin : g_tree
    logic signed [PW-1:0] col [N];
    for (genvar k = 0; k < N; k++) begin : g_col
      assign col[k] = pp[k][l];
    end
    adder_tree #(.N_IN(N), .IW(PW)) u_tree (.in_data(col), .sum(q[l]));
  end

  // ---- pipeline register between the trees --------------------------------
  logic signed [W-1:0] d_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned l = 0; l < K; l++) q_r[l] <= '0;
      d_r <= '0;
    end else begin
      q_r <= q;
      d_r <= d_in;
    end
  end

  // ---- shift-add tree, subtractor and error register ----------------------
  logic signed [SW-1:0] ip;   // full-precision inner product
  shift_add_tree #(.K(K), .IW(QW)) u_sat (.q(q_r), .sum(ip));

  assign y = ip[L-1 +: W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) e_out <= '0;
    else        e_out <= d_r - y;
  end
endmodule
