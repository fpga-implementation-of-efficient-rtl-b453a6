// fft16: 16-point FFT that splits its input into two 8-point streams.
//
// The 16 input samples are split into the even samples x(0), x(2), ..., x(14)
// and the odd samples x(1), x(3), ..., x(15). An 8-point decimation-in-time
// FFT (fft8_dit) transforms the even half into E(k) while an 8-point
// decimation-in-frequency FFT (fft8_dif) transforms the odd half into O(k) at
// the same time. Eight radix-2 butterflies (combine8) then form
//   X(k) = E(k) + W16^k O(k),  X(k+8) = E(k) - W16^k O(k),  k = 0..7.
// That structure, the butterflies and their twiddles follow the published
// architecture; the fixed-point format, the rounding, the saturation and the
// registers are this design's own choices.
//
// Number format: inputs and outputs are DATA_W-bit two's complement integers
// (8 bits by default). Inside, samples are scaled up by FRAC_W fraction bits
// and carried at DATA_W + 5 + FRAC_W bits, enough for the growth of a
// 16-point transform, so nothing overflows inside. Twiddle products are
// rounded to the internal scale; the final result is rounded to an integer
// and saturated to DATA_W bits. out_sat flags a transform in which any output
// part was clipped.
//
// Interface and timing: all 16 complex samples arrive in parallel in one
// cycle with in_valid high. They are registered, the whole transform is
// computed combinationally in the next cycle, and the 16 results are
// registered; out_valid rises exactly 2 cycles after in_valid and stays high
// for one cycle per transform. A new transform can be started every cycle.
// There is no back-pressure. Reset (rst_n, active low, asynchronous) clears
// only the valid flags; data registers are loaded when valid.
module fft16 #(
  parameter int unsigned DATA_W  = fft16_pkg::DATA_W_DEF,
  parameter int unsigned FRAC_W  = fft16_pkg::FRAC_W_DEF,
  parameter int unsigned TW_FRAC = fft16_pkg::TW_FRAC_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_re   [16],
  input  logic signed [DATA_W-1:0] in_im   [16],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_re  [16],  // X(k), natural order
  output logic signed [DATA_W-1:0] out_im  [16],
  output logic                     out_sat         // an output was clipped
);

  localparam int unsigned W = DATA_W + fft16_pkg::GROWTH_W + FRAC_W;

  // ---- input register ----------------------------------------------------
  logic signed [DATA_W-1:0] x_re [16];
  logic signed [DATA_W-1:0] x_im [16];
  logic                     x_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_valid <= 1'b0;
    else        x_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x_re <= in_re;
      x_im <= in_im;
    end
  end

  // ---- even/odd split, scaled to the internal format ---------------------
  logic signed [W-1:0] ev_re [8], ev_im [8];
  logic signed [W-1:0] od_re [8], od_im [8];

  for (genvar i = 0; i < 8; i++) begin : g_split
    assign ev_re[i] = W'(x_re[2*i])   <<< FRAC_W;
    assign ev_im[i] = W'(x_im[2*i])   <<< FRAC_W;
    assign od_re[i] = W'(x_re[2*i+1]) <<< FRAC_W;
    assign od_im[i] = W'(x_im[2*i+1]) <<< FRAC_W;
  end

  // ---- the two 8-point FFTs, side by side --------------------------------
  logic signed [W-1:0] e_re [8], e_im [8];
  logic signed [W-1:0] o_re [8], o_im [8];

  fft8_dit #(.W(W), .TW_FRAC(TW_FRAC)) u_dit (
    .in_re (ev_re), .in_im (ev_im),
    .out_re(e_re),  .out_im(e_im)
  );

  fft8_dif #(.W(W), .TW_FRAC(TW_FRAC)) u_dif (
    .in_re (od_re), .in_im (od_im),
    .out_re(o_re),  .out_im(o_im)
  );

  // ---- 8 combining butterflies -------------------------------------------
  logic signed [W-1:0] y_re [16], y_im [16];

  combine8 #(.W(W), .TW_FRAC(TW_FRAC)) u_comb (
    .e_re  (e_re), .e_im  (e_im),
    .o_re  (o_re), .o_im  (o_im),
    .out_re(y_re), .out_im(y_im)
  );

  // ---- round, saturate, output register ----------------------------------
  logic signed [DATA_W-1:0] q_re [16], q_im [16];
  logic [15:0]              s_re, s_im;

  for (genvar i = 0; i < 16; i++) begin : g_out
    round_sat #(.IN_W(W), .FRAC_W(FRAC_W), .OUT_W(DATA_W)) u_rs_re (
      .din(y_re[i]), .dout(q_re[i]), .sat(s_re[i])
    );
    round_sat #(.IN_W(W), .FRAC_W(FRAC_W), .OUT_W(DATA_W)) u_rs_im (
      .din(y_im[i]), .dout(q_im[i]), .sat(s_im[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= x_valid;
  end

  always_ff @(posedge clk) begin
    if (x_valid) begin
      out_re  <= q_re;
      out_im  <= q_im;
      out_sat <= |{s_re, s_im};
    end
  end

endmodule
