// dlms_top: modified delayed-LMS (DLMS) adaptive filter, plus a stand-alone
// Wallace-tree multiplier.
//
// The filter adapts N weights so that its output y = w^T x tracks a desired
// signal d. It splits the adaptation delay of a conventional DLMS filter in
// two, as the document proposes:
//   * n1 = 2 cycles: latency of the error-computation block, so the error
//     reaching the weight-update block in cycle n is e(n-n1); the samples
//     multiplied with it are delayed by the same n1 cycles (the input delay
//     line is extended by n1 taps to supply them);
//   * n2 = N2 cycles: register stages between the weight registers and the
//     filter, so the filter computes with w(n-n2).
// The resulting recursion is
//   e(n)   = d(n) - w(n-n2)^T x(n)
//   w(n+1) = w(n) + mu * e(n-n1) * x(n-n1).
// One input sample x_in and one desired sample d_in are accepted every clock;
// e_out in cycle n is e(n-2), y_out is y(n-1), w_out are the weight registers.
//
// The Wallace-tree multiplier (mult_a * mult_b -> mult_p, combinational) is a
// separate unit: the document presents it alongside the filter but does not
// connect it, so it has its own ports here.
//
// Lint note: the intermediate taps of the n2 weight delay and the last tap of
// the n1 sample extension are not needed here and are left unconnected.
//
// Reset: asynchronous, active low; weights, delay lines and the error start
// at zero (this design's choice).
module dlms_top #(
  parameter int unsigned N        = lms_pkg::LMS_N,
  parameter int unsigned L        = lms_pkg::LMS_L,
  parameter int unsigned W        = lms_pkg::LMS_W,
  parameter int unsigned N2       = lms_pkg::LMS_N2,       // >= 1
  parameter int unsigned MU_SHIFT = lms_pkg::LMS_MU_SHIFT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [L-1:0] x_in,
  input  logic signed [W-1:0] d_in,
  output logic signed [W-1:0] y_out,
  output logic signed [W-1:0] e_out,
  output logic signed [W-1:0] w_out [N],
  // stand-alone Wallace-tree multiplier
  input  logic        [7:0]   mult_a,
  input  logic        [7:0]   mult_b,
  output logic        [15:0]  mult_p
);
  localparam int unsigned N1 = lms_pkg::LMS_N1;

  logic signed [W-1:0] w_now [N];     // w(n)
  logic signed [W-1:0] w_filt [N];    // w(n-n2)
  logic signed [L-1:0] x_taps [N];    // x(n-k), k < N
  logic signed [L-1:0] xd [N];        // x(n-n1-k)
  logic signed [W-1:0] e_d;           // e(n-n1)

  // ---- n2 D: weights into the filter --------------------------------------
  logic [N*W-1:0] w_now_flat, w_filt_flat;
  logic [N*W-1:0] w_dly_taps [N2];
  always_comb
    for (int unsigned k = 0; k < N; k++) w_now_flat[k*W +: W] = w_now[k];
  delay_line #(.WIDTH(N*W), .DEPTH(N2)) u_n2d (
    .clk, .rst_n, .din(w_now_flat), .taps(w_dly_taps), .dout(w_filt_flat));
  always_comb
    for (int unsigned k = 0; k < N; k++) w_filt[k] = w_filt_flat[k*W +: W];

  // ---- error-computation block --------------------------------------------
  error_computation #(.N(N), .L(L), .W(W)) u_ecb (
    .clk, .rst_n, .x_in, .d_in, .w(w_filt), .x_taps, .y(y_out), .e_out(e_d));
  assign e_out = e_d;

  // ---- n1 D: input samples for the weight update ---------------------------
  // The error-computation delay line already holds x(n)..x(n-N+1); n1 more
  // registers after its last tap give x(n-N)..x(n-N-n1+1).
  logic [L-1:0] x_ext [N1];
  logic [L-1:0] x_ext_last;
  delay_line #(.WIDTH(L), .DEPTH(N1)) u_n1d (
    .clk, .rst_n, .din(x_taps[N-1]), .taps(x_ext), .dout(x_ext_last));
  always_comb
    for (int unsigned k = 0; k < N; k++)
      xd[k] = (k + N1 < N) ? x_taps[k + N1] : x_ext[k + N1 - N];

  // ---- weight-update block ------------------------------------------------
  weight_update #(.N(N), .L(L), .W(W), .MU_SHIFT(MU_SHIFT)) u_wub (
    .clk, .rst_n, .e(e_d), .xd, .w(w_now));
  assign w_out = w_now;

  // ---- stand-alone Wallace-tree multiplier --------------------------------
  wallace_multiplier u_wallace (.a(mult_a), .b(mult_b), .p(mult_p));
endmodule
