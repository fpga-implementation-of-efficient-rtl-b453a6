// tb_bf2_dit: checks the radix-2 DIT butterfly,
// o1 = a + c*W, o2 = a - c*W (twiddle applied to c before the add/subtract),
// for the twiddles W8^0..W8^3 on random inputs against an independent
// integer model of the butterfly.
module tb_bf2_dit;
  import tb_dft_pkg::*;

  localparam int unsigned W  = 17;
  localparam int unsigned TF = 10;
  localparam int KS [4] = '{0, 1, 2, 3};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a_re, a_im, c_re, c_im;
  logic signed [W-1:0] o1_re [4], o1_im [4], o2_re [4], o2_im [4];

  for (genvar f = 0; f < 4; f++) begin : g_dut
    bf2_dit #(.W(W), .N(8), .K(KS[f]), .TW_FRAC(TF)) dut (
      .a_re(a_re), .a_im(a_im), .c_re(c_re), .c_im(c_im),
      .o1_re(o1_re[f]), .o1_im(o1_im[f]), .o2_re(o2_re[f]), .o2_im(o2_im[f])
    );
  end

  int checks = 0, failures = 0;

  task automatic check_all();
    longint tr, ti, e1r, e1i, e2r, e2i;
    #1;
    for (int f = 0; f < 4; f++) begin
      cmul_ref(longint'(c_re), longint'(c_im), KS[f], 8, TF, tr, ti);
      e1r = longint'(a_re) + tr; e1i = longint'(a_im) + ti;
      e2r = longint'(a_re) - tr; e2i = longint'(a_im) - ti;
      checks++;
      if (longint'(o1_re[f]) != e1r || longint'(o1_im[f]) != e1i ||
          longint'(o2_re[f]) != e2r || longint'(o2_im[f]) != e2i) begin
        failures++;
        $display("FAIL K=%0d a=(%0d,%0d) c=(%0d,%0d): o1=(%0d,%0d) exp (%0d,%0d) o2=(%0d,%0d) exp (%0d,%0d)",
                 KS[f], a_re, a_im, c_re, c_im, o1_re[f], o1_im[f], e1r, e1i,
                 o2_re[f], o2_im[f], e2r, e2i);
      end
    end
  endtask

  initial begin
    int lim;
    lim = 1 << (W - 4);   // keeps every sum inside the word
    for (int t = 0; t < 400; t++) begin
      a_re = W'($signed($urandom_range(2 * lim - 1)) - lim);
      a_im = W'($signed($urandom_range(2 * lim - 1)) - lim);
      c_re = W'($signed($urandom_range(2 * lim - 1)) - lim);
      c_im = W'($signed($urandom_range(2 * lim - 1)) - lim);
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
