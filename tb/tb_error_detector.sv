// tb_error_detector: self-checking testbench of the PRS error detector.
//
// The detector receives the 1 + x^3 + x^31 sequence (produced here by its own
// recursion, with an arbitrary starting phase) with single bit errors
// inserted at random places at least 64 bits apart, and one 200-bit dropout
// (all zeros). After the detector has locked, its error output must be 1
// exactly at the inserted errors (three-fold errors cancelled). After the
// dropout, it must have relocked within 160 bits, which needs the clearing
// of the multiple-error canceller after 64 error-free products; the clear
// pulses are counted.
module tb_error_detector;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic din = 1'b0;
  logic error, cancel_clear;

  int checks = 0, failures = 0;
  int n_err = 0, n_clear = 0, n_clear_after_dropout = 0;

  error_detector dut (.clk, .rst_n, .en, .data_in(din), .error, .cancel_clear);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seq [$];
    bit e, inj;
    int k, last_err;
    // PRS with a random starting state (non-zero)
    for (int i = 0; i < 31; i++) seq.push_back(1'($urandom_range(1)));
    seq[0] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    k = 31;
    last_err = 0;
    for (int t = 0; t < 20000; t++) begin
      en = ($urandom_range(4) != 0);
      seq.push_back(seq[k - 3] ^ seq[k - 31]);
      inj = 1'b0;
      if (t > 300 && (t - last_err) > 70 && $urandom_range(40) == 0 && !(t >= 9900 && t < 10400)) begin
        inj = 1'b1;
      end
      din = seq[k] ^ inj;
      if (t >= 10000 && t < 10200) din = 1'b0;
      #1;
      if (en) begin
        if (inj) last_err = t;
        if ((t > 200 && t < 10000) || t > 10360) begin
          checks++;
          if (error !== inj) begin
            failures++;
            if (failures < 10) $display("t=%0d error=%0d inserted=%0d", t, error, inj);
          end
          if (inj) n_err++;
        end
        if (cancel_clear) begin
          n_clear++;
          if (t >= 10200 && t < 10400) n_clear_after_dropout++;
        end
        k++;
      end else begin
        void'(seq.pop_back());   // bit not taken: offer it again
      end
      @(negedge clk);
    end
    checks++;
    if (n_err < 50 || n_clear == 0 || n_clear_after_dropout == 0) begin
      failures++;
      $display("coverage: errors=%0d clears=%0d after dropout=%0d", n_err, n_clear, n_clear_after_dropout);
    end
    $display("errors found=%0d canceller clears=%0d", n_err, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
