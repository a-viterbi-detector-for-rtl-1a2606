// tb_pr4_viterbi_system: end-to-end testbench of the class IV recording test
// system, with the capture memory reduced to 2^12 entries.
//
// The write side's tx_bit goes through a model of the class IV channel,
// y_k = (2a_k - 1) - (2a_{k-2} - 1) plus Gaussian noise, and the A/D
// converter model, back into the read side. Phases:
//   0     .. 3999 : no noise
//   4000  .. 15999: noise (sigma 0.4)
//   16000 .. 16299: dropout (signal gone, small noise)
//   16300 .. 19999: no noise
// A capture of 2^12 clocks starts at clock 5000.
// Checks:
//   * every Viterbi decision equals that of two reference 1-D models on the
//     even and odd samples, 2*28 + 3 clocks after its sample;
//   * the threshold decision matches |y| > 1 of the sample code;
//   * no error flags while there is no noise (after locking/relocking);
//   * fewer Viterbi than threshold errors in the noisy phase;
//   * the capture lasts 2^12 clocks and reads back what was flagged.
// Mechanisms that must each occur at least once: candidate update, pulse
// decision, path memory overflow, Viterbi and threshold errors, canceller
// clear in both error detectors, capture completion.
module tb_pr4_viterbi_system;
  import tb_vd_ref_pkg::*;

  localparam int W   = 7;
  localparam int L   = 28;
  localparam int LAT = 2 * L + 3;
  localparam int AW  = 12;
  localparam int N   = 20000;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          tx_bit;
  real           vin = 0.0;
  logic [W-1:0]  sample;
  logic          viterbi_data, viterbi_overflow, threshold_data;
  logic [1:0]    viterbi_update, viterbi_pulse;
  logic          viterbi_error, threshold_error;
  logic          viterbi_cancel_clear, threshold_cancel_clear;
  logic          capture_start = 1'b0;
  logic          capture_busy, capture_done;
  logic [AW-1:0] cap_rd_addr = '0;
  logic [1:0]    cap_rd_data;

  int checks = 0, failures = 0;
  int m_update = 0, m_pulse = 0, m_ovf = 0, m_verr = 0, m_terr = 0;
  int m_vclr = 0, m_tclr = 0, m_done = 0;
  int noisy_verr = 0, noisy_terr = 0;

  // What the capture memory should hold, recorded between clock edges.
  logic [1:0] exp_cap [2 ** AW];
  int         cap_n = 0;

  adc7 #(.W(W)) u_adc (.clk, .vin, .code(sample));

  pr4_viterbi_system #(.CAPTURE_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 2 * (2 ** AW) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vd1_ref     r [2];
    int         codes [N];
    bit         a1, a2, cur;
    real        y;
    int         nflag;
    r[0] = new(W, L, 1'b0);
    r[1] = new(W, L, 1'b0);
    a1 = 1'b0; a2 = 1'b0;
    nflag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      // Sample presented during clock t is the A/D output of the value set
      // in clock t - 1. Channel: class IV of the transmitted bits.
      cur = tx_bit;
      y = real'(2 * int'(cur) - 1) - real'(2 * int'(a2) - 1);
      if (t >= 4000 && t < 16000) y += 0.4 * gauss();
      if (t >= 16000 && t < 16300) y = 0.05 * gauss();
      vin = y;
      capture_start = (t == 5000);
      codes[t] = int'(sample);
      #1;
      // threshold detector on the present sample
      checks++;
      if (threshold_data !== (codes[t] < 32 || codes[t] >= 96)) failures++;
      if (capture_busy && !capture_start) begin
        if (cap_n < 2 ** AW) exp_cap[cap_n] = {viterbi_error, threshold_error};
        cap_n++;
      end
      if (|viterbi_update) m_update++;
      if (|(viterbi_update & viterbi_pulse)) m_pulse++;
      @(posedge clk);
      a2 = a1; a1 = cur;
      #1;
      // reference step of the detector whose turn it was
      r[t % 2].step(t >= 2 ? codes[t - 2] : 0);
      if (t >= LAT) begin
        int s;
        s = t - LAT + 1;
        checks++;
        if (viterbi_data !== r[s % 2].path.dec[s / 2 + 1]) begin
          failures++;
          if (failures < 10) $display("t=%0d: Viterbi decision %0d, reference %0d", t, viterbi_data,
                                      r[s % 2].path.dec[s / 2 + 1]);
        end
      end
      if (viterbi_overflow && t > 100) m_ovf++;
      if (viterbi_error) m_verr++;
      if (threshold_error) m_terr++;
      if (viterbi_cancel_clear) m_vclr++;
      if (threshold_cancel_clear) m_tclr++;
      // error-free phases, after locking and after relocking
      if ((t > 400 && t < 4000) || t > 17200) begin
        checks++;
        if (viterbi_error || threshold_error) begin
          failures++;
          if (failures < 10) $display("t=%0d: error flag without noise (%0d %0d)", t, viterbi_error, threshold_error);
        end
      end
      if (t > 4000 + LAT + 100 && t < 16000) begin
        noisy_verr += int'(viterbi_error);
        noisy_terr += int'(threshold_error);
      end
      @(negedge clk);
    end
    $display("noisy phase: Viterbi errors %0d, threshold errors %0d", noisy_verr, noisy_terr);
    checks++;
    if (!(noisy_verr < noisy_terr)) failures++;
    // capture read back
    if (capture_done) m_done++;
    checks++;
    if (cap_n != 2 ** AW) begin
      failures++;
      $display("capture took %0d clocks, expected %0d", cap_n, 2 ** AW);
    end
    for (int i = 0; i < 2 ** AW; i++) begin
      cap_rd_addr = AW'(i);
      @(negedge clk);
      checks++;
      if (cap_rd_data !== exp_cap[i]) begin
        failures++;
        if (failures < 10) $display("capture entry %0d: %b expected %b", i, cap_rd_data, exp_cap[i]);
      end
      nflag += int'(exp_cap[i] != 2'b00);
    end
    $display("capture: %0d entries with an error flag", nflag);
    $display("mechanisms: update=%0d pulse=%0d overflow=%0d viterbi_err=%0d threshold_err=%0d vclear=%0d tclear=%0d capture_done=%0d",
             m_update, m_pulse, m_ovf, m_verr, m_terr, m_vclr, m_tclr, m_done);
    checks++;
    if (m_update == 0 || m_pulse == 0 || m_ovf == 0 || m_verr == 0 || m_terr == 0 ||
        m_vclr == 0 || m_tclr == 0 || m_done == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
