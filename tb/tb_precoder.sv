// tb_precoder: self-checking testbench of the precoder, class IV (LAG 2) and
// 1-D (LAG 1). Random data with a random enable; the output is compared with
// a_k = b_k xor a_{k-LAG} kept in a list, and the channel property is
// checked: |a_k - a_{k-LAG}| equals b_k (a pulse exactly where b_k = 1).
module tb_precoder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic din = 1'b0;
  logic out2, out1;

  int checks = 0, failures = 0;

  precoder #(.LAG(2)) dut2 (.clk, .rst_n, .en, .data_in(din), .data_out(out2));
  precoder #(.LAG(1)) dut1 (.clk, .rst_n, .en, .data_in(din), .data_out(out1));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit a2 [$];
    bit a1 [$];
    bit e2, e1;
    a2 = '{1'b0, 1'b0};
    a1 = '{1'b0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en  = ($urandom_range(3) != 0);
      din = $urandom_range(1);
      #1;
      e2 = din ^ a2[a2.size() - 2];
      e1 = din ^ a1[a1.size() - 1];
      checks += 2;
      if (out2 !== e2 || out1 !== e1) begin
        failures++;
        if (failures < 10) $display("t=%0d out2=%0d out1=%0d expected %0d %0d", t, out2, out1, e2, e1);
      end
      if (en) begin
        checks += 2;
        if ((out2 != a2[a2.size() - 2]) !== din) failures++;
        if ((out1 != a1[a1.size() - 1]) !== din) failures++;
        a2.push_back(e2);
        a1.push_back(e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
