// twiddle_mul: multiplies a complex sample by the constant twiddle factor
// W_N^K = exp(-j*2*pi*K/N).
//
// The butterflies of the FFT mark this operation with a circled cross; only
// its function is specified, so the circuit is this design's own. The factor
// is fixed at elaboration, so the block is purely combinational:
//   * K = 0 (W = 1) passes the sample through unchanged;
//   * K = N/4 (W = -j) swaps real and imaginary parts and negates one;
//   * K = N/2 (W = -1) negates both parts;
//   * any other K uses four signed constant products with a coefficient of
//     TW_FRAC fraction bits, summed at full precision and rounded once
//     (round half up) back to the input scale.
// Trivial factors are exact, so a stage that only uses W = 1 and W = -j adds
// no rounding error, as in the first two stages of the 8-point FFTs.
// The caller chooses W wide enough that the result cannot overflow
// (|W_N^K| = 1, so a result never exceeds the input magnitude by more than
// rounding and sqrt(2) per component).
module twiddle_mul #(
  parameter int unsigned W       = fft16_pkg::INT_W_DEF,   // word width of each part
  parameter int unsigned N       = 8,                      // transform size of the factor
  parameter int unsigned K       = 1,                      // exponent k of W_N^k
  parameter int unsigned TW_FRAC = fft16_pkg::TW_FRAC_DEF  // coefficient fraction bits
) (
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned KM   = K % N;
  localparam int unsigned TW_W = TW_FRAC + 2;   // sign, one integer bit, fraction
  localparam int unsigned P_W  = W + TW_W + 1;  // sum of two products

  localparam logic signed [TW_W-1:0] C_RE = TW_W'(fft16_pkg::tw_re(KM, N, TW_FRAC));
  localparam logic signed [TW_W-1:0] C_IM = TW_W'(fft16_pkg::tw_im(KM, N, TW_FRAC));

  generate
    if (KM == 0) begin : g_one
      assign out_re = in_re;
      assign out_im = in_im;
    end else if (4 * KM == N) begin : g_minus_j
      // (a + jb) * (-j) = b - ja
      assign out_re = in_im;
      assign out_im = -in_re;
    end else if (2 * KM == N) begin : g_minus_one
      assign out_re = -in_re;
      assign out_im = -in_im;
    end else if (4 * KM == 3 * N) begin : g_plus_j
      // (a + jb) * (+j) = -b + ja
      assign out_re = -in_im;
      assign out_im = in_re;
    end else begin : g_mult
      logic signed [P_W-1:0] p_re, p_im;
      localparam logic signed [P_W-1:0] HALF = P_W'(1) <<< (TW_FRAC - 1);
      always_comb begin
        p_re = P_W'(in_re) * P_W'(C_RE) - P_W'(in_im) * P_W'(C_IM);
        p_im = P_W'(in_re) * P_W'(C_IM) + P_W'(in_im) * P_W'(C_RE);
        out_re = W'((p_re + HALF) >>> TW_FRAC);
        out_im = W'((p_im + HALF) >>> TW_FRAC);
      end
    end
  endgenerate

endmodule
