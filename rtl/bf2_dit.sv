// bf2_dit: radix-2 decimation-in-time butterfly.
//
// Inputs a = a_re + j*a_im and c = c_re + j*c_im. The second input is first
// multiplied by the constant twiddle factor W_N^K (twiddle before the
// butterfly, as in a DIT flow graph), then
//   o1 = a + c*W_N^K
//   o2 = a - c*W_N^K
// Combinational; the word width W is kept from input to output, so the
// caller must size W for the growth of the whole transform (no overflow
// check is made here). Rounding happens only inside twiddle_mul.
module bf2_dit #(
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

  logic signed [W-1:0] t_re, t_im;

  twiddle_mul #(.W(W), .N(N), .K(K), .TW_FRAC(TW_FRAC)) u_tw (
    .in_re (c_re),
    .in_im (c_im),
    .out_re(t_re),
    .out_im(t_im)
  );

  always_comb begin
    o1_re = a_re + t_re;
    o1_im = a_im + t_im;
    o2_re = a_re - t_re;
    o2_im = a_im - t_im;
  end

endmodule
