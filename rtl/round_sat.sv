// round_sat: brings one internal fixed-point value back to the output width.
//
// The input carries FRAC_W fraction bits. It is rounded to an integer (round
// half up: add one half, then drop the fraction) and clipped to the signed
// range of OUT_W bits. `sat` is high when clipping took place. Purely
// combinational. Rounding and saturation are this design's own choices; the
// FFT is only specified to deliver 8-bit two's complement outputs.
module round_sat #(
  parameter int unsigned IN_W   = fft16_pkg::INT_W_DEF,
  parameter int unsigned FRAC_W = fft16_pkg::FRAC_W_DEF,
  parameter int unsigned OUT_W  = fft16_pkg::DATA_W_DEF
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    sat
);

  localparam int unsigned R_W = IN_W - FRAC_W + 1;
  localparam logic signed [R_W-1:0] MAX_V = R_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [R_W-1:0] MIN_V = -R_W'(64'sd1 <<< (OUT_W - 1));

  logic signed [IN_W:0]  rnd;   // one extra bit so adding one half cannot wrap
  logic signed [R_W-1:0] ival;

  always_comb begin
    if (FRAC_W == 0) rnd = (IN_W+1)'(din);
    else             rnd = (IN_W+1)'(din) + ((IN_W+1)'(1) <<< (FRAC_W - 1));
    ival = R_W'(rnd >>> FRAC_W);
    if (ival > MAX_V) begin
      dout = OUT_W'(MAX_V);
      sat  = 1'b1;
    end else if (ival < MIN_V) begin
      dout = OUT_W'(MIN_V);
      sat  = 1'b1;
    end else begin
      dout = OUT_W'(ival);
      sat  = 1'b0;
    end
  end

endmodule
