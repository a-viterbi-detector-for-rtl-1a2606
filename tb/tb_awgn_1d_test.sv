// tb_awgn_1d_test: bit error rate of the 1-D detector against the threshold
// detector on a 1-D channel with additive white Gaussian noise, as in the
// first laboratory test of the detector.
//
// The test set-up is rebuilt from the design's own blocks: the PRS generator,
// inverted, drives a precoder with one delay element (1/(1-D)); the channel
// is y_k = (2a_k - 1) - (2a_{k-1} - 1) + n_k, quantised to 7 bits over -2..+2.
// The same samples go to a 7-bit 1-D Viterbi detector, to a 4-bit one that
// sees only the top four bits (the reduced-quantisation experiment), and to
// the threshold detector. Each decision stream is inverted and counted by its
// own error detector, which locks to the sequence by itself.
//
// The signal-to-noise ratio is the mean signal power at the sampling
// instants over the noise variance. The levels -2, 0, +2 occur with
// probabilities 1/4, 1/2, 1/4, so the signal power is 2 and
// sigma^2 = 2 / 10^(SNR/10). Four points, 7, 9, 11 and 13 dB, are run for
// NPT bits each after a noise-free start.
//
// Checks:
//   * no error flags while there is no noise (after the error detectors
//     have locked);
//   * the threshold detector's error detector counts exactly the errors
//     found by comparing its decisions with the sent bits;
//   * the threshold error count lies within 5 standard deviations (plus 3 %)
//     of 1.5 Q(1/sigma), the error probability of slicing at +-1 (a 0 level
//     fails on either side, a +-2 level on one);
//   * at every point the 7-bit Viterbi detector makes fewer errors than the
//     threshold detector, and so does the 4-bit one;
//   * the error counts of all three fall as the SNR rises;
//   * over all points the 4-bit detector makes more errors than the 7-bit
//     one, the loss expected from coarser quantisation under Gaussian noise.
// The measured rates are printed for comparison with published curves.
module tb_awgn_1d_test;
  import tb_vd_ref_pkg::*;

  localparam int W     = 7;
  localparam int NPT   = 1000000;
  localparam int NQUIET = 1000;
  localparam int NP    = 4;
  localparam real SNR_DB [NP] = '{7.0, 9.0, 11.0, 13.0};

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         prs, tx;
  logic [W-1:0] sample7 = '0;
  logic [3:0]   sample4;
  logic         v7_data, v7_ovf, v7_upd, v7_dat;
  logic         v4_data, v4_ovf, v4_upd, v4_dat;
  logic         t_pulse;
  logic         e_v7, e_v4, e_t;
  logic         c_v7, c_v4, c_t;

  int checks = 0, failures = 0;

  prs_generator u_prs (.clk, .rst_n, .en(1'b1), .prs_out(prs));
  precoder #(.LAG(1)) u_pre (.clk, .rst_n, .en(1'b1), .data_in(~prs), .data_out(tx));

  assign sample4 = sample7[W-1 -: 4];

  viterbi_1d #(.W(W)) u_v7 (.clk, .rst_n, .en(1'b1), .sample_in(sample7), .data_out(v7_data),
                            .overflow(v7_ovf), .update(v7_upd), .data(v7_dat));
  viterbi_1d #(.W(4)) u_v4 (.clk, .rst_n, .en(1'b1), .sample_in(sample4), .data_out(v4_data),
                            .overflow(v4_ovf), .update(v4_upd), .data(v4_dat));
  threshold_detector #(.W(W)) u_thr (.sample(sample7), .pulse(t_pulse));

  error_detector u_ev7 (.clk, .rst_n, .en(1'b1), .data_in(~v7_data), .error(e_v7), .cancel_clear(c_v7));
  error_detector u_ev4 (.clk, .rst_n, .en(1'b1), .data_in(~v4_data), .error(e_v4), .cancel_clear(c_v4));
  error_detector u_et  (.clk, .rst_n, .en(1'b1), .data_in(~t_pulse), .error(e_t),  .cancel_clear(c_t));

  always #5 clk = ~clk;

  initial begin
    repeat (NQUIET + NP * NPT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gaussian tail probability, from the rational approximation of erfc in
  // Abramowitz and Stegun 7.1.26 (absolute error below 1.5e-7).
  function automatic real qfunc(real x);
    real z, t, poly;
    z = x / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    poly = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 +
           t * (-1.453152027 + t * 1.061405429))));
    return 0.5 * poly * $exp(-z * z);
  endfunction

  initial begin
    int  n_v7 [NP], n_v4 [NP], n_t [NP], n_tdir [NP];
    bit  a1, b;
    real y, sigma, expect_t, tol;
    n_v7 = '{default: 0};
    n_v4 = '{default: 0};
    n_t = '{default: 0};
    n_tdir = '{default: 0};
    a1 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NQUIET + NP * NPT; t++) begin
      int p;
      p = t < NQUIET ? -1 : (t - NQUIET) / NPT;
      sigma = p < 0 ? 0.0 : $sqrt(2.0 / (10.0 ** (SNR_DB[p] / 10.0)));
      // Channel output for the bit the precoder gives in this clock.
      b = ~prs;
      y = real'(2 * int'(tx) - 1) - real'(2 * int'(a1) - 1);
      if (p >= 0) y += sigma * gauss();
      sample7 = W'(quant(y, W));
      #1;
      if (p < 0) begin
        if (t > 300) begin
          checks++;
          if (e_v7 || e_v4 || e_t) begin
            failures++;
            if (failures < 10) $display("t=%0d: error flag without noise", t);
          end
        end
      end else begin
        n_tdir[p] += int'(t_pulse != b);
        n_t[p]    += int'(e_t);
        n_v7[p]   += int'(e_v7);
        n_v4[p]   += int'(e_v4);
      end
      @(posedge clk);
      a1 = tx;
      @(negedge clk);
    end

    for (int p = 0; p < NP; p++) begin
      sigma = $sqrt(2.0 / (10.0 ** (SNR_DB[p] / 10.0)));
      expect_t = 1.5 * qfunc(1.0 / sigma) * real'(NPT);
      tol = 5.0 * $sqrt(expect_t) + 0.03 * expect_t;
      $display("S/N %4.1f dB: BER threshold %.2e (expected %.2e), Viterbi 7 bit %.2e, Viterbi 4 bit %.2e",
               SNR_DB[p], real'(n_t[p]) / NPT, expect_t / NPT, real'(n_v7[p]) / NPT,
               real'(n_v4[p]) / NPT);
      checks++;
      if (n_t[p] != n_tdir[p]) begin
        failures++;
        $display("  threshold errors: error detector %0d, direct count %0d", n_t[p], n_tdir[p]);
      end
      checks++;
      if (real'(n_t[p]) < expect_t - tol || real'(n_t[p]) > expect_t + tol) begin
        failures++;
        $display("  threshold errors %0d outside %.0f +- %.0f", n_t[p], expect_t, tol);
      end
      checks++;
      if (!(n_v7[p] < n_t[p])) begin
        failures++;
        $display("  7-bit Viterbi errors %0d not below threshold errors %0d", n_v7[p], n_t[p]);
      end
      checks++;
      if (!(n_v4[p] < n_t[p])) begin
        failures++;
        $display("  4-bit Viterbi errors %0d not below threshold errors %0d", n_v4[p], n_t[p]);
      end
      if (p > 0) begin
        checks++;
        if (!(n_t[p] < n_t[p-1] && n_v7[p] <= n_v7[p-1] && n_v4[p] <= n_v4[p-1])) begin
          failures++;
          $display("  error counts do not fall with the S/N");
        end
      end
    end
    checks++;
    if (!(n_v4.sum() > n_v7.sum())) begin
      failures++;
      $display("4-bit Viterbi errors %0d not above 7-bit ones %0d", n_v4.sum(), n_v7.sum());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
