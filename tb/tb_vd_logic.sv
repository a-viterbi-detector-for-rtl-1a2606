// tb_vd_logic: self-checking testbench of the Viterbi logic part.
//
// Random samples (uniform codes, and a noisy 1-D channel) are fed with a
// random enable. Before every enabled edge the Update and Data outputs are
// compared with the reference algorithm for the sample then held in the
// sample register; the Yp/B register is checked after the edge. Both update
// outcomes with and without a polarity flip must occur.
module tb_vd_logic;
  import tb_vd_ref_pkg::*;

  localparam int W = 7;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0;
  logic [W-1:0] sample_in = '0;
  logic         update, data, b;
  logic [W-1:0] yk, yp;

  int checks = 0, failures = 0;
  int n_upd = 0, n_data = 0, n_hold = 0;

  vd_logic #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vd1_ref ref_m;
    int     model_yk;
    int     a_prev;
    int     a;
    ref_m    = new(W, 28, 1'b0);
    model_yk = 0;
    a_prev   = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      if (i < 3000) sample_in = W'($urandom);
      else begin
        a         = $urandom_range(1);
        sample_in = W'(quant(real'(2 * a - 1) - real'(2 * a_prev - 1) + 0.35 * gauss(), W));
        if (en) a_prev = a;
      end
      #1;
      if (en) begin
        ref_m.step(model_yk);
        checks++;
        if (update !== ref_m.last_upd || data !== ref_m.last_dat) begin
          failures++;
          if (failures < 10)
            $display("step %0d: yk=%0d yp=%0d b=%0d update=%0d data=%0d, expected %0d %0d",
                     i, yk, yp, b, update, data, ref_m.last_upd, ref_m.last_dat);
        end
        if (ref_m.last_upd) begin
          n_upd++;
          if (ref_m.last_dat) n_data++;
        end else n_hold++;
        model_yk = int'(sample_in);
        @(posedge clk); #1;
        checks++;
        if (int'(yp) != ref_m.yp || b !== ref_m.beta || int'(yk) != model_yk) begin
          failures++;
          if (failures < 10) $display("step %0d: yp=%0d b=%0d yk=%0d expected %0d %0d %0d",
                                      i, yp, b, yk, ref_m.yp, ref_m.beta, model_yk);
        end
      end
    end
    checks++;
    if (n_upd == 0 || n_data == 0 || n_hold == 0) begin
      failures++;
      $display("coverage missing: updates=%0d pulses=%0d holds=%0d", n_upd, n_data, n_hold);
    end
    $display("updates=%0d pulses=%0d holds=%0d", n_upd, n_data, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
