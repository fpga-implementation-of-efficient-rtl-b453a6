// tb_combine8: checks the 8 combining butterflies,
//   X(k) = E(k) + W16^k O(k),  X(k+8) = E(k) - W16^k O(k),
// on random even and odd spectra against an independent integer model
// (exact match), and also against double precision within TOL LSBs.
module tb_combine8;
  import tb_dft_pkg::*;

  localparam int unsigned W   = 17;
  localparam int unsigned TF  = 10;
  localparam real         TOL = 5.0;  // coefficient quantization + rounding

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] e_re [8], e_im [8], o_re [8], o_im [8];
  logic signed [W-1:0] out_re [16], out_im [16];

  combine8 #(.W(W), .TW_FRAC(TF)) dut (
    .e_re(e_re), .e_im(e_im), .o_re(o_re), .o_im(o_im),
    .out_re(out_re), .out_im(out_im)
  );

  int checks = 0, failures = 0;

  task automatic check_all();
    #1;
    for (int k = 0; k < 8; k++) begin
      longint tr, ti;
      real a, fr, fi;
      cmul_ref(longint'(o_re[k]), longint'(o_im[k]), k, 16, TF, tr, ti);
      checks++;
      if (longint'(out_re[k])   != longint'(e_re[k]) + tr ||
          longint'(out_im[k])   != longint'(e_im[k]) + ti ||
          longint'(out_re[k+8]) != longint'(e_re[k]) - tr ||
          longint'(out_im[k+8]) != longint'(e_im[k]) - ti) begin
        failures++;
        $display("FAIL k=%0d: X(k)=(%0d,%0d) X(k+8)=(%0d,%0d)",
                 k, out_re[k], out_im[k], out_re[k+8], out_im[k+8]);
      end
      // double-precision cross-check of X(k)
      a  = -2.0 * PI * real'(k) / 16.0;
      fr = real'(e_re[k]) + real'(o_re[k]) * $cos(a) - real'(o_im[k]) * $sin(a);
      fi = real'(e_im[k]) + real'(o_re[k]) * $sin(a) + real'(o_im[k]) * $cos(a);
      checks++;
      if (fabs(real'(out_re[k]) - fr) > TOL || fabs(real'(out_im[k]) - fi) > TOL) begin
        failures++;
        $display("FAIL k=%0d: X(k)=(%0d,%0d) exact (%f,%f)", k, out_re[k], out_im[k], fr, fi);
      end
    end
  endtask

  initial begin
    int lim;
    lim = 1 << 14;   // range of an 8-point spectrum of 8-bit samples << 4
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < 8; k++) begin
        e_re[k] = W'($signed($urandom_range(2 * lim - 1)) - lim);
        e_im[k] = W'($signed($urandom_range(2 * lim - 1)) - lim);
        o_re[k] = W'($signed($urandom_range(2 * lim - 1)) - lim);
        o_im[k] = W'($signed($urandom_range(2 * lim - 1)) - lim);
      end
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
