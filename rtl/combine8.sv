// combine8: the N/2 = 8 radix-2 butterflies that merge two 8-point spectra
// into one 16-point spectrum.
//
// With E(k) the 8-point DFT of the even samples and O(k) that of the odd
// samples, the 16-point DFT is
//   X(k)     = E(k) + W16^k * O(k)
//   X(k + 8) = E(k) - W16^k * O(k),   k = 0..7
// Each butterfly is a bf2_dit with twiddle W16^k applied to the odd input.
// W16^0 and W16^4 (= -j) are exact; the other six use constant multipliers.
// Purely combinational, word width W throughout.
module combine8 #(
  parameter int unsigned W       = fft16_pkg::INT_W_DEF,
  parameter int unsigned TW_FRAC = fft16_pkg::TW_FRAC_DEF
) (
  input  logic signed [W-1:0] e_re   [8],   // even-sample spectrum E(k)
  input  logic signed [W-1:0] e_im   [8],
  input  logic signed [W-1:0] o_re   [8],   // odd-sample spectrum O(k)
  input  logic signed [W-1:0] o_im   [8],
  output logic signed [W-1:0] out_re [16],  // X(k), natural order
  output logic signed [W-1:0] out_im [16]
);

  for (genvar k = 0; k < 8; k++) begin : g_bf
    bf2_dit #(.W(W), .N(16), .K(k), .TW_FRAC(TW_FRAC)) u_bf (
      .a_re (e_re[k]),     .a_im (e_im[k]),
      .c_re (o_re[k]),     .c_im (o_im[k]),
      .o1_re(out_re[k]),   .o1_im(out_im[k]),
      .o2_re(out_re[k+8]), .o2_im(out_im[k+8])
    );
  end

endmodule
