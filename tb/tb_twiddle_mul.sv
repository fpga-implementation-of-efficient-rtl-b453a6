// tb_twiddle_mul: checks constant twiddle multipliers for every factor the
// FFT uses (W8^0..W8^3 and W16^0..W16^7) against an independent integer
// model, on random and extreme inputs. Trivial factors must be exact; the
// others must equal the full-precision product rounded half up.
module tb_twiddle_mul;
  import tb_dft_pkg::*;

  localparam int unsigned W  = 17;
  localparam int unsigned TF = 10;
  localparam int NF = 12;
  // factor list: {N, K}
  localparam int FN [NF] = '{8, 8, 8, 8, 16, 16, 16, 16, 16, 16, 16, 16};
  localparam int FK [NF] = '{0, 1, 2, 3,  0,  1,  2,  3,  4,  5,  6,  7};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a_re, a_im;
  logic signed [W-1:0] y_re [NF];
  logic signed [W-1:0] y_im [NF];

  for (genvar f = 0; f < NF; f++) begin : g_dut
    twiddle_mul #(.W(W), .N(FN[f]), .K(FK[f]), .TW_FRAC(TF)) dut (
      .in_re(a_re), .in_im(a_im), .out_re(y_re[f]), .out_im(y_im[f])
    );
  end

  int checks = 0, failures = 0;

  task automatic check_all();
    longint er, ei;
    #1;
    for (int f = 0; f < NF; f++) begin
      cmul_ref(longint'(a_re), longint'(a_im), FK[f], FN[f], TF, er, ei);
      checks++;
      if (longint'(y_re[f]) != er || longint'(y_im[f]) != ei) begin
        failures++;
        $display("FAIL W%0d^%0d * (%0d,%0d): got (%0d,%0d) exp (%0d,%0d)",
                 FN[f], FK[f], a_re, a_im, y_re[f], y_im[f], er, ei);
      end
    end
  endtask

  initial begin
    // 16-point growth bound: |component| < 2^(W-2)
    int lim;
    lim = 1 << (W - 3);
    a_re = W'(lim - 1); a_im = -W'(lim);     check_all();
    a_re = -W'(lim);    a_im = -W'(lim);     check_all();
    a_re = 0;           a_im = 1;            check_all();
    for (int t = 0; t < 500; t++) begin
      a_re = W'($signed($urandom_range(2 * lim - 1)) - lim);
      a_im = W'($signed($urandom_range(2 * lim - 1)) - lim);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
