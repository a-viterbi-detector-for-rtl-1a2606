// tb_pr4_interleaver: self-checking testbench of the class IV control logic.
//
// Random samples and random detector outputs are applied. Checked every
// clock: the two enables alternate (exactly one active, detector 0 first
// after reset), the sample reaches the detectors unchanged, data_out is the
// output of the detector whose turn it was in the previous clock, and
// overflow is the OR of both detectors' overflow in the previous clock.
module tb_pr4_interleaver;
  localparam int W = 7;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [W-1:0] sample_in = '0;
  logic [1:0]   det_en;
  logic [W-1:0] det_sample;
  logic [1:0]   det_data = '0;
  logic [1:0]   det_overflow = '0;
  logic         phase, data_out, overflow;

  int checks = 0, failures = 0;

  pr4_interleaver #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_turn;
    bit exp_out, exp_ovf;
    exp_turn = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      sample_in    = W'($urandom);
      det_data     = 2'($urandom);
      det_overflow = ($urandom_range(7) == 0) ? 2'($urandom) : 2'b00;
      #1;
      checks += 2;
      if (det_en !== (exp_turn ? 2'b10 : 2'b01)) begin
        failures++;
        if (failures < 10) $display("t=%0d det_en=%b expected turn %0d", t, det_en, exp_turn);
      end
      if (det_sample !== sample_in) failures++;
      exp_out = det_data[exp_turn];
      exp_ovf = |det_overflow;
      @(posedge clk); #1;
      checks += 2;
      if (data_out !== exp_out || overflow !== exp_ovf) begin
        failures++;
        if (failures < 10) $display("t=%0d data_out=%0d ovf=%0d expected %0d %0d",
                                    t, data_out, overflow, exp_out, exp_ovf);
      end
      exp_turn = ~exp_turn;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
