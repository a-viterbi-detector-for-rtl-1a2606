// tb_vd_controller: self-checking testbench of the path-memory controller.
//
// Update/Data are driven at random, with long stretches of rare updates so
// that the pointer runs off the end of the memory. The model counts the
// shifts since the last update: the candidate will sit at position age after
// the next shift, the bit can be set only while age <= depth - 1, and the
// overflow output is high from when the candidate reaches the last position
// until the next update. sel/addr are checked before every enabled edge and
// overflow after it, for two shifters and (second instance) for three.
module tb_vd_controller;
  localparam int LEN = 14;
  localparam int AW  = 4;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          en = 1'b0;
  logic          update = 1'b0;
  logic          data = 1'b0;
  logic [2:0]    sel2, sel3;
  logic [AW-1:0] addr2, addr3;
  logic          ovf2, ovf3;

  int checks = 0, failures = 0;
  int n_set = 0, n_ovf = 0, n_blocked = 0;

  vd_controller #(.LEN(LEN)) dut2 (
    .clk, .rst_n, .en, .long_mode(1'b0), .update, .data,
    .sel(sel2), .addr(addr2), .overflow(ovf2));
  vd_controller #(.LEN(LEN)) dut3 (
    .clk, .rst_n, .en, .long_mode(1'b1), .update, .data,
    .sel(sel3), .addr(addr3), .overflow(ovf3));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sel(int age, int nsh, logic [2:0] sel, logic [AW-1:0] addr, string tag);
    logic [2:0] exp_sel;
    exp_sel = '0;
    if (update && data && age >= 0 && age <= nsh * LEN - 1) exp_sel[age / LEN] = 1'b1;
    checks++;
    if (sel !== exp_sel || (exp_sel != 0 && int'(addr) != age % LEN)) begin
      failures++;
      if (failures < 10) $display("%s age=%0d sel=%b addr=%0d expected %b %0d",
                                  tag, age, sel, addr, exp_sel, age % LEN);
    end
  endtask

  initial begin
    int age;   // position of the candidate after the next shift; -1 = none
    int rate;
    age = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      rate   = ((t / 500) % 2 == 0) ? 3 : 60;
      en     = ($urandom_range(5) != 0);
      update = ($urandom_range(rate - 1) == 0);
      data   = $urandom_range(1);
      #1;
      if (en) begin
        check_sel(age, 2, sel2, addr2, "2sh");
        check_sel(age, 3, sel3, addr3, "3sh");
        if (update && data) begin
          if (age >= 0 && age <= 2 * LEN - 1) n_set++;
          else n_blocked++;
        end
        if (update) age = 1;
        else if (age >= 0) age++;
      end
      @(posedge clk); #1;
      checks += 2;
      if (ovf2 !== (age < 0 || age >= 2 * LEN)) begin
        failures++;
        if (failures < 10) $display("t=%0d ovf2=%0d age=%0d", t, ovf2, age);
      end
      if (ovf3 !== (age < 0 || age >= 3 * LEN)) begin
        failures++;
        if (failures < 10) $display("t=%0d ovf3=%0d age=%0d", t, ovf3, age);
      end
      if (ovf2) n_ovf++;
    end
    checks++;
    if (n_set == 0 || n_ovf == 0 || n_blocked == 0) begin
      failures++;
      $display("coverage: sets=%0d overflow cycles=%0d blocked=%0d", n_set, n_ovf, n_blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
