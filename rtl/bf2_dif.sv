// bf2_dif: radix-2 decimation-in-frequency butterfly.
//
// Inputs a = a_re + j*a_im and c = c_re + j*c_im. The sum leaves the
// butterfly directly; the difference is multiplied by the constant twiddle
// factor W_N^K afterwards (twiddle after the butterfly, as in a DIF flow
// graph):
//   o1 = a + c
//   o2 = (a - c) * W_N^K
// Combinational; the word width W is kept from input to output, so the
// caller must size W for the growth of the whole transform. Rounding happens
// only inside twiddle_mul.
module bf2_dif #(
  parameter int unsigned W       = fft16_pkg::INT_W_DEF,
  parameter int unsigned N       = 8,
  parameter int unsigned K       = 0,
  parameter int unsigned TW_FRAC = fft16_pkg::TW_FRAC_DEF
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] c_re,
  input  logic signed [W-1:0] c_im,
  output logic signed [W-1:0] o1_re,
  output logic signed [W-1:0] o1_im,
  output logic signed [W-1:0] o2_re,
  output logic signed [W-1:0] o2_im
);

  logic signed [W-1:0] d_re, d_im;

  always_comb begin
    o1_re = a_re + c_re;
    o1_im = a_im + c_im;
    d_re  = a_re - c_re;
    d_im  = a_im - c_im;
  end

  twiddle_mul #(.W(W), .N(N), .K(K), .TW_FRAC(TW_FRAC)) u_tw (
    .in_re (d_re),
    .in_im (d_im),
    .out_re(o2_re),
    .out_im(o2_im)
  );

endmodule
