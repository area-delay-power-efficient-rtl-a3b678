// ppg: 2-bit partial product generator (PPG).
//
// Multiplies a W-bit two's-complement multiplicand w by an L-bit
// two's-complement multiplier x, one radix-4 digit at a time, and returns the
// L/2 partial products p[l] = digit_l * w, so that x*w = sum_l p[l] * 4^l.
// As in the document, there are L/2 2-to-3 decoders and L/2 AND/OR cells:
// each decoder turns digit (x[2l+1], x[2l]) into one-hot selects for the
// multiples 1, 2 and 3, and its AND/OR cell picks w, 2w or 3w (or zero).
// The most significant digit carries the sign of x: its value is
// -2*x[L-1] + x[L-2], one of 0, 1, -2, -1, so its AND/OR cell is fed with
// w, -2w and -w instead. The multiples 2w (a shift), 3w (one adder) and the
// negations are this design's way of forming them; the document does not say.
//
// Interface: x, w in; p[0..L/2-1] out, each W+2 bits, sign-extended.
// Timing: purely combinational.
module ppg #(
  parameter int unsigned L = lms_pkg::LMS_L,  // multiplier width (even)
  parameter int unsigned W = lms_pkg::LMS_W   // multiplicand width
) (
  input  logic signed [L-1:0] x,
  input  logic signed [W-1:0] w,
  output logic signed [W+1:0] p [L/2]
);
  localparam int unsigned D = L / 2;

  logic signed [W+1:0] w1, w2, w3, wn1, wn2;

  always_comb begin
    w1  = {{2{w[W-1]}}, w};      // sign-extend to W+2 bits
    w2  = w1 <<< 1;
    w3  = w1 + w2;
    wn1 = -w1;
    wn2 = -w2;
  end

  for (genvar l = 0; l < D; l++) begin : g_digit
    logic b0, b1, b2;
    ppg_decoder u_dec (.u(x[2*l +: 2]), .b0(b0), .b1(b1), .b2(b2));
    if (l == D - 1) begin : g_msd
      // (x[L-1] x[L-2]) = 01 -> +w, 10 -> -2w, 11 -> -w
      ppg_aoc #(.WIDTH(W+2)) u_aoc (.b0(b0), .b1(b1), .b2(b2),
                                    .m0(w1), .m1(wn2), .m2(wn1), .p(p[l]));
    end else begin : g_lsd
      ppg_aoc #(.WIDTH(W+2)) u_aoc (.b0(b0), .b1(b1), .b2(b2),
                                    .m0(w1), .m1(w2), .m2(w3), .p(p[l]));
    end
  end
endmodule
