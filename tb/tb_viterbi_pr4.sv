// tb_viterbi_pr4: self-checking testbench of the class IV (1-D^2) Viterbi
// detector at 7-bit and at 4-bit quantisation.
//
// A random bit stream b is precoded by 1/(1-D^2), sent through the class IV
// channel y_k = (2a_k - 1) - (2a_{k-2} - 1) and quantised. Phases: noise-free,
// Gaussian noise, and a dropout. The expected output is built from two
// independent reference models of the 1-D algorithm, one on the even and one
// on the odd samples, each with a 28-bit path memory. Checks, every clock:
//   * data_out equals the merged reference decision of the sample presented
//     LAT = 2*28 + 3 clocks earlier (this checks the latency as well);
//   * overflow equals the OR of the two references' overflow, one clock late;
//     the last 2*28 + 4 samples, still undecided at the end, are not compared;
//   * in the noise-free phase each decision equals the data bit b.
// The same is done for a second detector with 4-bit samples.
module tb_viterbi_pr4;
  import tb_vd_ref_pkg::*;

  localparam int L   = 28;
  localparam int LAT = 2 * L + 3;
  localparam int N   = 24000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [6:0] s7 = '0;
  logic [3:0] s4 = '0;
  logic       out7, ovf7, out4, ovf4;
  logic [1:0] upd7, dat7, upd4, dat4;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_pulse = 0, n_exact = 0;
  int err7 = 0, err4 = 0, errthr = 0, n_noisy = 0;

  viterbi_pr4 #(.W(7)) dut7 (
    .clk, .rst_n, .sample_in(s7),
    .data_out(out7), .overflow(ovf7), .update(upd7), .data(dat7));

  viterbi_pr4 #(.W(4)) dut4 (
    .clk, .rst_n, .sample_in(s4),
    .data_out(out4), .overflow(ovf4), .update(upd4), .data(dat4));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  c7 [N];
  int  c4 [N];
  bit  bits [N];
  bit  noisy [N];
  bit  e7 [N];        // expected merged decision per sample
  bit  e4 [N];
  bit  o7 [N + 2];    // OR of the detectors' overflows after the edge of clock t
  bit  o4 [N + 2];

  // Detector j steps at the clocks t with t % 2 == j; at that edge its
  // sample register holds the sample of clock t - 2 (reset content 0 before).
  // ovf[t] is the OR of both overflows after the edge of clock t.
  task automatic build_reference(int w, ref int codes [N], ref bit exp [N], ref bit ovf [N + 2]);
    vd1_ref r [2];
    r[0] = new(w, L, 1'b0);
    r[1] = new(w, L, 1'b0);
    for (int t = 0; t < N; t++) begin
      r[t % 2].step(t >= 2 ? codes[t - 2] : 0);
      ovf[t] = r[0].overflow() | r[1].overflow();
    end
    // Sample s is processed by detector s % 2 in its step s / 2 + 1.
    for (int t = 0; t < N; t++) begin
      int j, m;
      j = t % 2;
      m = t / 2 + 1;
      exp[t] = (m < r[j].path.dec.size()) ? r[j].path.dec[m] : 1'b0;
    end
  endtask

  initial begin
    bit  a1, a2, a;
    real y;
    int  ph;
    a1 = 0; a2 = 0;
    for (int t = 0; t < N; t++) begin
      ph = t % 6000;
      bits[t] = $urandom_range(1);
      a = bits[t] ^ a2;
      y = real'(2 * int'(a) - 1) - real'(2 * int'(a2) - 1);
      noisy[t] = (ph >= 2000);
      if (ph >= 2000 && ph < 5000) y += 0.35 * gauss();
      if (ph >= 5200 && ph < 5400) y = 0.05 * gauss();
      c7[t] = quant(y, 7);
      c4[t] = quant(y, 4);
      if (!noisy[t] || ph < 5000) begin
        if (((c7[t] >> 5) == 0 || (c7[t] >> 5) == 3) != bits[t]) errthr++;
      end
      a2 = a1; a1 = a;
    end
    build_reference(7, c7, e7, o7);
    build_reference(4, c4, e4, o4);

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        s7 = 7'(c7[t]);
        s4 = 4'(c4[t]);
      end
      @(posedge clk); #1;
      if (t >= LAT) begin
        int s;
        s = t - LAT + 1;
        if (s < N - 2 * L - 4) begin
          checks += 2;
          if (out7 !== e7[s]) begin
            failures++;
            if (failures < 10) $display("t=%0d sample %0d: 7-bit decision %0d expected %0d", t, s, out7, e7[s]);
          end
          if (out4 !== e4[s]) begin
            failures++;
            if (failures < 10) $display("t=%0d sample %0d: 4-bit decision %0d expected %0d", t, s, out4, e4[s]);
          end
          if (!noisy[s]) begin
            checks++;
            if (out7 !== bits[s] || out4 !== bits[s]) failures++;
            else n_exact++;
          end else if ((s % 6000) < 5000) begin
            n_noisy++;
            if (out7 !== bits[s]) err7++;
            if (out4 !== bits[s]) err4++;
          end
        end
      end
      if (t >= 1 && t < N) begin
        checks += 2;
        if (ovf7 !== o7[t - 1] || ovf4 !== o4[t - 1]) begin
          failures++;
          if (failures < 10) $display("t=%0d overflow %0d/%0d expected %0d/%0d", t, ovf7, ovf4, o7[t - 1], o4[t - 1]);
        end
      end
      if (ovf7) n_ovf++;
      if (out7) n_pulse++;
      @(negedge clk);
    end
    checks++;
    if (n_ovf == 0 || n_pulse == 0 || n_exact == 0) begin
      failures++;
      $display("coverage: overflow=%0d pulses=%0d exact=%0d", n_ovf, n_pulse, n_exact);
    end
    $display("noisy samples %0d: errors 7-bit Viterbi %0d, 4-bit Viterbi %0d, 7-bit threshold %0d",
             n_noisy, err7, err4, errthr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
