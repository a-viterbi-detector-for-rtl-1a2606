// tb_threshold_detector: exhaustive testbench of the threshold detector at 7
// and at 4 bits. Every code is converted back to its signal value
// (y = code * 4 / 2^W - 2, the lower edge of its quantisation interval);
// a pulse is expected when y < -1 or y >= +1.
module tb_threshold_detector;
  logic [6:0] s7;
  logic [3:0] s4;
  logic       p7, p4;

  int checks = 0, failures = 0, n_pulse = 0;

  threshold_detector #(.W(7)) dut7 (.sample(s7), .pulse(p7));
  threshold_detector #(.W(4)) dut4 (.sample(s4), .pulse(p4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real y;
    for (int c = 0; c < 128; c++) begin
      s7 = 7'(c);
      s4 = 4'(c % 16);
      #1;
      y = real'(c) * 4.0 / 128.0 - 2.0;
      checks++;
      if (p7 !== (y < -1.0 || y >= 1.0)) begin
        failures++;
        $display("7-bit code %0d: pulse=%0d", c, p7);
      end
      if (p7) n_pulse++;
      y = real'(c % 16) * 4.0 / 16.0 - 2.0;
      checks++;
      if (p4 !== (y < -1.0 || y >= 1.0)) begin
        failures++;
        $display("4-bit code %0d: pulse=%0d", c % 16, p4);
      end
    end
    checks++;
    if (n_pulse != 64) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
