// fft8_stage: one stage of an 8-point radix-2 FFT: 4 butterflies side by
// side on an 8-value vector.
//
// SPAN is the distance between the two inputs of a butterfly (1, 2 or 4).
// The butterfly at position j of its group of 2*SPAN values joins indices p
// and p + SPAN and uses the twiddle W8^(j * 4/SPAN). DIF = 0 builds the stage
// from DIT butterflies (twiddle before the add/subtract), DIF = 1 from DIF
// butterflies (twiddle after the subtraction). Purely combinational.
// It is a helper of fft8_dit and fft8_dif, which chain three of these.
module fft8_stage #(
  parameter int unsigned W       = fft16_pkg::INT_W_DEF,
  parameter int unsigned SPAN    = 1,
  parameter bit          DIF     = 1'b0,
  parameter int unsigned TW_FRAC = fft16_pkg::TW_FRAC_DEF
) (
  input  logic signed [W-1:0] in_re  [8],
  input  logic signed [W-1:0] in_im  [8],
  output logic signed [W-1:0] out_re [8],
  output logic signed [W-1:0] out_im [8]
);

  for (genvar b = 0; b < 4; b++) begin : g_bf
    localparam int unsigned J = b % SPAN;                 // position in group
    localparam int unsigned P = (b / SPAN) * 2 * SPAN + J;
    localparam int unsigned Q = P + SPAN;
    localparam int unsigned K = J * (4 / SPAN);           // exponent of W8
    if (DIF) begin : g_dif
      bf2_dif #(.W(W), .N(8), .K(K), .TW_FRAC(TW_FRAC)) u_bf (
        .a_re (in_re[P]),  .a_im (in_im[P]),
        .c_re (in_re[Q]),  .c_im (in_im[Q]),
        .o1_re(out_re[P]), .o1_im(out_im[P]),
        .o2_re(out_re[Q]), .o2_im(out_im[Q])
      );
    end else begin : g_dit
      bf2_dit #(.W(W), .N(8), .K(K), .TW_FRAC(TW_FRAC)) u_bf (
        .a_re (in_re[P]),  .a_im (in_im[P]),
        .c_re (in_re[Q]),  .c_im (in_im[Q]),
        .o1_re(out_re[P]), .o1_im(out_im[P]),
        .o2_re(out_re[Q]), .o2_im(out_im[Q])
      );
    end
  end

endmodule
