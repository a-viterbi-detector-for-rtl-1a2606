// tb_prs_generator: self-checking testbench of the pseudo-random sequence
// generator.
//
// The first 5000 output bits (with a random enable) are compared with the
// recursion out_k = [k == 0] xor out_{k-3} xor out_{k-31}, i.e. the impulse
// response of 1/(1 + x^3 + x^31). A second instance with the polynomial
// 1 + x^2 + x^5 (same structure, shorter register) must repeat with period
// 2^5 - 1 = 31 and contain 16 ones per period, as a maximum-length sequence
// does.
module tb_prs_generator;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic prs, prs5;

  int checks = 0, failures = 0;

  prs_generator dut (.clk, .rst_n, .en, .prs_out(prs));
  prs_generator #(.LEN(5), .TAP(2)) dut5 (.clk, .rst_n, .en(1'b1), .prs_out(prs5));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seq [$];
    bit s5 [$];
    bit e;
    int k, ones;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    k = 0;
    for (int t = 0; t < 8000; t++) begin
      en = ($urandom_range(3) != 0);
      #1;
      if (en) begin
        e = (k == 0);
        if (k >= 3)  e ^= seq[k - 3];
        if (k >= 31) e ^= seq[k - 31];
        checks++;
        if (prs !== e) begin
          failures++;
          if (failures < 10) $display("bit %0d: %0d expected %0d", k, prs, e);
        end
        seq.push_back(e);
        k++;
      end
      s5.push_back(prs5);
      @(negedge clk);
    end
    ones = 0;
    for (int i = 0; i < 31; i++) ones += int'(s5[100 + i]);
    checks++;
    if (ones != 16) begin
      failures++;
      $display("short sequence: %0d ones per period", ones);
    end
    for (int i = 100; i < 1000; i++) begin
      checks++;
      if (s5[i] !== s5[i + 31]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
