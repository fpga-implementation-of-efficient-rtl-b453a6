// fft8_dit: 8-point decimation-in-time FFT, built from 12 radix-2 DIT
// butterflies in 3 stages of 4.
//
// In the 16-point FFT this block transforms the even samples
// x(0), x(2), ..., x(14), presented on in_*[0..7] in natural order. The
// inputs are wired to the first stage in bit-reversed order (0,4,2,6,1,5,3,7),
// and each stage multiplies by its twiddle before the add/subtract:
//   stage 1: butterfly span 1, W8^0
//   stage 2: butterfly span 2, W8^0 and W8^2 (= -j)
//   stage 3: butterfly span 4, W8^0, W8^1, W8^2, W8^3
// so out_*[k] is X(k) in natural order. Only W8^1 and W8^3 need real
// multipliers; the others are exact wiring.
// Purely combinational, word width W throughout; the caller sizes W for the
// growth (an 8-point transform grows by at most 8*sqrt(2) per component).
module fft8_dit #(
  parameter int unsigned W       = fft16_pkg::INT_W_DEF,
  parameter int unsigned TW_FRAC = fft16_pkg::TW_FRAC_DEF
) (
  input  logic signed [W-1:0] in_re  [8],
  input  logic signed [W-1:0] in_im  [8],
  output logic signed [W-1:0] out_re [8],
  output logic signed [W-1:0] out_im [8]
);

  // s<n>_* holds the 8 values entering stage n; s3_* is the last stage's
  // result.
  logic signed [W-1:0] s0_re [8], s1_re [8], s2_re [8], s3_re [8];
  logic signed [W-1:0] s0_im [8], s1_im [8], s2_im [8], s3_im [8];

  for (genvar i = 0; i < 8; i++) begin : g_in
    assign s0_re[i] = in_re[fft16_pkg::bitrev(i, 3)];
    assign s0_im[i] = in_im[fft16_pkg::bitrev(i, 3)];
    assign out_re[i]  = s3_re[i];
    assign out_im[i]  = s3_im[i];
  end

  fft8_stage #(.W(W), .SPAN(1), .DIF(1'b0), .TW_FRAC(TW_FRAC)) u_stage1 (
    .in_re (s0_re), .in_im (s0_im),
    .out_re(s1_re), .out_im(s1_im)
  );

  fft8_stage #(.W(W), .SPAN(2), .DIF(1'b0), .TW_FRAC(TW_FRAC)) u_stage2 (
    .in_re (s1_re), .in_im (s1_im),
    .out_re(s2_re), .out_im(s2_im)
  );

  fft8_stage #(.W(W), .SPAN(4), .DIF(1'b0), .TW_FRAC(TW_FRAC)) u_stage3 (
    .in_re (s2_re), .in_im (s2_im),
    .out_re(s3_re), .out_im(s3_im)
  );

endmodule
