// tb_viterbi_1d: self-checking testbench of the 1-D Viterbi detector, with
// the pointer path memory and with the exchange path memory.
//
// A random bit stream b is precoded by 1/(1-D) (a_k = b_k xor a_{k-1}), sent
// through a 1-D channel (y = (2a_k - 1) - (2a_{k-1} - 1), levels -2/0/+2)
// and quantised to 7 bits over -2..+2. Phases: noise-free, Gaussian noise,
// and a dropout (signal gone) that forces a path memory overflow. Checks:
//   * after every enabled edge, data_out and overflow of both detectors match
//     the reference algorithm with a 28-bit path memory;
//   * the decision of each sample reaches data_out exactly 28 enabled edges
//     after the edge that captured the sample;
//   * in the noise-free phase every decision equals the data bit b.
module tb_viterbi_1d;
  import tb_vd_ref_pkg::*;
  import vd_pkg::*;

  localparam int W = 7;
  localparam int L = 28;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0;
  logic [W-1:0] sample_in = '0;
  logic         out_p, ovf_p, upd_p, dat_p;
  logic         out_x, ovf_x, upd_x, dat_x;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_pulse = 0, n_exact = 0, n_noisy_err = 0, n_noisy = 0;

  viterbi_1d #(.W(W)) dut_p (
    .clk, .rst_n, .en, .sample_in,
    .data_out(out_p), .overflow(ovf_p), .update(upd_p), .data(dat_p));

  viterbi_1d #(.W(W), .RAM_STYLE(RAM_EXCHANGE)) dut_x (
    .clk, .rst_n, .en, .sample_in,
    .data_out(out_x), .overflow(ovf_x), .update(upd_x), .data(dat_x));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vd1_ref rp, rx;
    int     model_yk;
    bit     a_prev, a, b;
    bit     bq[$];      // data bit of each step (step 0 is the reset content)
    bit     noisy[$];
    real    y;
    int     phase_len;
    rp = new(W, L, 1'b0);
    rx = new(W, L, 1'b1);
    model_yk = 0;
    a_prev   = 1'b0;
    bq.push_back(1'b0);
    noisy.push_back(1'b1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30000; t++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      phase_len = t % 3000;
      b = $urandom_range(1);
      a = b ^ a_prev;
      y = real'(2 * int'(a) - 1) - real'(2 * int'(a_prev) - 1);
      if (phase_len >= 1000 && phase_len < 2000) y += 0.3 * gauss();
      if (phase_len >= 2500 && phase_len < 2600) y = 0.05 * gauss();
      sample_in = W'(quant(y, W));
      if (en) begin
        rp.step(model_yk);
        rx.step(model_yk);
        model_yk = int'(sample_in);
        bq.push_back(b);
        noisy.push_back(phase_len >= 1000);
        a_prev = a;
      end
      @(posedge clk); #1;
      if (en) begin
        checks += 4;
        if (out_p !== rp.out() || ovf_p !== rp.overflow()) begin
          failures++;
          if (failures < 10) $display("t=%0d pointer out=%0d ovf=%0d expected %0d %0d",
                                      t, out_p, ovf_p, rp.out(), rp.overflow());
        end
        if (out_x !== rx.out() || ovf_x !== rx.overflow()) begin
          failures++;
          if (failures < 10) $display("t=%0d exchange out=%0d ovf=%0d expected %0d %0d",
                                      t, out_x, ovf_x, rx.out(), rx.overflow());
        end
        // Latency: the step index now at the output belongs to the sample
        // captured L edges ago (step index = capture edge + 1).
        if (rp.path.n - L >= 1) begin
          int idx;
          idx = rp.path.n - L;
          if (!noisy[idx]) begin
            checks++;
            if (out_p !== bq[idx]) begin
              failures++;
              if (failures < 10) $display("t=%0d noise-free decision %0d, data bit %0d", t, out_p, bq[idx]);
            end else n_exact++;
          end else begin
            n_noisy++;
            if (out_p !== bq[idx]) n_noisy_err++;
          end
        end
        if (ovf_p && ovf_x) n_ovf++;
        if (out_p) n_pulse++;
      end
    end
    checks++;
    if (n_ovf == 0 || n_pulse == 0 || n_exact == 0) begin
      failures++;
      $display("coverage: overflow=%0d pulses=%0d exact=%0d", n_ovf, n_pulse, n_exact);
    end
    $display("noise-free decisions checked=%0d, noisy decisions=%0d with %0d errors, overflow cycles=%0d",
             n_exact, n_noisy, n_noisy_err, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
