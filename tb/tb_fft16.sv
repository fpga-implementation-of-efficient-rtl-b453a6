// tb_fft16: end-to-end test of the 16-point FFT at its default parameters
// (8-bit samples in and out).
//
// A driver issues transforms with in_valid, sometimes back to back, sometimes
// with idle cycles between them; a monitor compares each result with a
// double-precision DFT of the same input computed here, clipped to the 8-bit
// range. An output part must lie within 1 LSB of that value (0.5 from the
// final rounding plus the small internal error). It also checks:
//   * the 16-point example [0,1,4,2,6,4,2,1,0,0,7,5,3,2,4,1] against the
//     published result, within 1 LSB per part;
//   * the latency: out_valid exactly 2 cycles after in_valid;
//   * the saturation flag, set when an exact output lies clearly outside the
//     8-bit range and clear when all lie clearly in_rng;
//   * that a reset drops a transform in flight.
// Each mechanism (back-to-back input, idle gaps, saturation, clean
// transforms, reset flush) is counted; one that never happened is a failure.
module tb_fft16;
  import tb_dft_pkg::*;

  localparam int NTX     = 600;   // transforms issued
  localparam int LATENCY = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n;
  logic              in_valid;
  logic signed [7:0] in_re [16], in_im [16];
  logic              out_valid, out_sat;
  logic signed [7:0] out_re [16], out_im [16];

  fft16 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_sat(out_sat)
  );

  int checks = 0, failures = 0;
  int n_b2b = 0, n_gap = 0, n_sat = 0, n_clean = 0, n_flush = 0, n_done = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, by transaction number
  real    exp_re [NTX][16];
  real    exp_im [NTX][16];
  longint issue_cycle [NTX];
  bit     is_example [NTX];
  int     pend [$];     // transactions in flight, oldest first

  // the published 16-point result for the example input
  localparam int PUB_RE [16] = '{42, -2, -16, 6, -8, -4, -2, 1, 10, 1, -2, -4, -8, 6, -16, -2};
  localparam int PUB_IM [16] = '{0, 1, -5, 5, 2, -8, 5, 1, 0, -1, -5, 8, -2, -5, 5, -1};
  localparam int EX_X   [16] = '{0, 1, 4, 2, 6, 4, 2, 1, 0, 0, 7, 5, 3, 2, 4, 1};

  function automatic real clip(input real v);
    if (v > 127.0)  return 127.0;
    if (v < -128.0) return -128.0;
    return v;
  endfunction

  // ---------------- monitor ----------------
  always @(posedge clk) begin
    if (out_valid) begin
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid at cycle %0d", cycle);
      end else begin
        int   id;
        bit   over, in_rng;
        id = pend.pop_front();
        n_done++;
        checks++;
        if (cycle - issue_cycle[id] != LATENCY) begin
          failures++;
          $display("FAIL tx %0d latency %0d", id, cycle - issue_cycle[id]);
        end
        over   = 1'b0;
        in_rng = 1'b1;
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (fabs(real'(out_re[k]) - clip(exp_re[id][k])) >= 1.0 ||
              fabs(real'(out_im[k]) - clip(exp_im[id][k])) >= 1.0) begin
            failures++;
            $display("FAIL tx %0d bin %0d: got (%0d,%0d) exp (%f,%f)", id, k,
                     out_re[k], out_im[k], exp_re[id][k], exp_im[id][k]);
          end
          if (exp_re[id][k] > 128.5 || exp_re[id][k] < -129.5 ||
              exp_im[id][k] > 128.5 || exp_im[id][k] < -129.5) over = 1'b1;
          if (exp_re[id][k] > 126.5 || exp_re[id][k] < -127.5 ||
              exp_im[id][k] > 126.5 || exp_im[id][k] < -127.5) in_rng = 1'b0;
          if (is_example[id]) begin
            checks++;
            if ((out_re[k] - PUB_RE[k]) > 1 || (PUB_RE[k] - out_re[k]) > 1 ||
                (out_im[k] - PUB_IM[k]) > 1 || (PUB_IM[k] - out_im[k]) > 1) begin
              failures++;
              $display("FAIL example bin %0d: got (%0d,%0d) published (%0d,%0d)",
                       k, out_re[k], out_im[k], PUB_RE[k], PUB_IM[k]);
            end
          end
        end
        if (over) begin
          n_sat++;
          checks++;
          if (!out_sat) begin
            failures++;
            $display("FAIL tx %0d: out_sat low on an overflowing transform", id);
          end
        end else if (in_rng) begin
          n_clean++;
          checks++;
          if (out_sat) begin
            failures++;
            $display("FAIL tx %0d: out_sat high on an in-range transform", id);
          end
        end
      end
    end
  end

  // ---------------- driver ----------------
  task automatic issue(input int id, input int xr [16], input int xi [16]);
    real ar [], ai [], yr [], yi [];
    ar = new[16];
    ai = new[16];
    for (int i = 0; i < 16; i++) begin
      ar[i] = real'(xr[i]);
      ai[i] = real'(xi[i]);
    end
    dft(ar, ai, yr, yi);
    for (int k = 0; k < 16; k++) begin
      exp_re[id][k] = yr[k];
      exp_im[id][k] = yi[k];
    end
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      in_re[i] = 8'(xr[i]);
      in_im[i] = 8'(xi[i]);
    end
    in_valid = 1'b1;
    issue_cycle[id] = cycle;
    pend.push_back(id);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    int xr [16], xi [16];
    int amp;
    bit last_was_issue;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < 16; i++) begin
      in_re[i] = '0;
      in_im[i] = '0;
    end
    is_example = '{default: 1'b0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // transaction 0: the published example
    xr = EX_X;
    xi = '{default: 0};
    is_example[0] = 1'b1;
    issue(0, xr, xi);
    repeat (4) @(posedge clk);

    // reset flush: start a transform and reset before it comes out
    @(negedge clk);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    begin
      bit seen;
      seen = 1'b0;
      repeat (4) begin
        @(posedge clk);
        #1 if (out_valid) seen = 1'b1;
      end
      checks++;
      if (seen) begin
        failures++;
        $display("FAIL a reset did not drop the transform in flight");
      end else n_flush++;
    end

    // random transforms: small, full-scale and constant inputs
    last_was_issue = 1'b0;
    for (int id = 1; id < NTX; id++) begin
      case ($urandom_range(3))
        0:       amp = 8;
        1:       amp = 40;
        default: amp = 128;
      endcase
      for (int i = 0; i < 16; i++) begin
        xr[i] = $signed($urandom_range(2 * amp - 1)) - amp;
        xi[i] = $signed($urandom_range(2 * amp - 1)) - amp;
      end
      if (id % 50 == 7) begin
        xr = '{default: 127};
        xi = '{default: -128};
      end
      // in_valid is already high for one cycle in_rng issue(); a gap of
      // zero cycles means back-to-back transforms
      if ($urandom_range(1) == 0) begin
        if (last_was_issue) n_gap++;
        repeat ($urandom_range(3) + 1) @(posedge clk);
      end else if (last_was_issue) n_b2b++;
      issue(id, xr, xi);
      last_was_issue = 1'b1;
    end
    repeat (LATENCY + 3) @(posedge clk);

    checks++;
    if (n_done != NTX || pend.size() != 0) begin
      failures++;
      $display("FAIL %0d results for %0d transforms", n_done, NTX);
    end
    $display("transforms %0d, back-to-back %0d, after a gap %0d, saturated %0d, in range %0d, reset flushes %0d",
             n_done, n_b2b, n_gap, n_sat, n_clean, n_flush);
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back input"); end
    if (n_gap == 0)   begin failures++; $display("FAIL no idle gap"); end
    if (n_sat == 0)   begin failures++; $display("FAIL no saturation"); end
    if (n_clean == 0) begin failures++; $display("FAIL no in-range transform"); end
    if (n_flush == 0) begin failures++; $display("FAIL no reset flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
