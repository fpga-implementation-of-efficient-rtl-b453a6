// tb_fft8_dif: checks the 8-point DIF FFT against a double-precision
// DFT computed in the testbench.
//
// Inputs are 8-bit integers scaled by 2^FRAC (the internal format of the
// 16-point FFT). The first vector is the odd samples x(1), x(3), ..., x(15)
// of the 16-point example [0,1,4,2,6,4,2,1,0,0,7,5,3,2,4,1]; then come an
// impulse, full-scale vectors and random vectors. Every output bin must lie
// within TOL internal LSBs (a quarter of an output LSB) of the exact DFT.
module tb_fft8_dif;
  import tb_dft_pkg::*;

  localparam int unsigned W    = 17;
  localparam int unsigned FRAC = 4;
  localparam int unsigned TF   = 10;
  localparam real         TOL  = 4.0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] in_re [8], in_im [8], out_re [8], out_im [8];

  fft8_dif #(.W(W), .TW_FRAC(TF)) dut (
    .in_re(in_re), .in_im(in_im), .out_re(out_re), .out_im(out_im)
  );

  int checks = 0, failures = 0;
  real worst = 0.0;

  task automatic run_vec(input int xr [8], input int xi [8]);
    real ar [], ai [], yr [], yi [];
    ar = new[8];
    ai = new[8];
    for (int i = 0; i < 8; i++) begin
      in_re[i] = W'(xr[i] * (1 << FRAC));
      in_im[i] = W'(xi[i] * (1 << FRAC));
      ar[i] = real'(xr[i] * (1 << FRAC));
      ai[i] = real'(xi[i] * (1 << FRAC));
    end
    dft(ar, ai, yr, yi);
    #1;
    for (int k = 0; k < 8; k++) begin
      real dr, di;
      dr = fabs(real'(out_re[k]) - yr[k]);
      di = fabs(real'(out_im[k]) - yi[k]);
      if (dr > worst) worst = dr;
      if (di > worst) worst = di;
      checks++;
      if (dr > TOL || di > TOL) begin
        failures++;
        $display("FAIL bin %0d: got (%0d,%0d) exp (%f,%f)", k, out_re[k], out_im[k], yr[k], yi[k]);
      end
    end
  endtask

  initial begin
    int xr [8], xi [8];
    xr = '{1, 2, 4, 1, 0, 5, 2, 1};
    xi = '{default: 0};
    run_vec(xr, xi);
    xr = '{1, 0, 0, 0, 0, 0, 0, 0};
    run_vec(xr, xi);
    xr = '{default: 127};
    xi = '{default: -128};
    run_vec(xr, xi);
    xr = '{127, -128, 127, -128, 127, -128, 127, -128};
    xi = '{-128, -128, 127, 127, -128, -128, 127, 127};
    run_vec(xr, xi);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 8; i++) begin
        xr[i] = $signed($urandom_range(255)) - 128;
        xi[i] = $signed($urandom_range(255)) - 128;
      end
      run_vec(xr, xi);
    end
    $display("largest error %f internal LSB", worst);
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
