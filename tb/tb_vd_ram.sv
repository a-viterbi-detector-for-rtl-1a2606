// tb_vd_ram: self-checking testbench of the pointer-style path memory
// ("RAM" part: controller plus shifters).
//
// Update and Data are driven at random with a random enable; phases of rare
// updates make the candidate leave the memory (overflow). After every edge
// data_out and overflow are compared with a model of the path memory that
// keeps the decision of every sample, and the whole 28-bit path is compared
// with the model's last 28 decisions.
module tb_vd_ram;
  import tb_vd_ref_pkg::*;

  localparam int LEN = 14;
  localparam int NSH = 2;
  localparam int L   = LEN * NSH;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0;
  logic         update = 1'b0;
  logic         data = 1'b0;
  logic         data_out, overflow;
  logic [L-1:0] path;

  int checks = 0, failures = 0;
  int n_ones = 0, n_ovf = 0;

  vd_ram #(.LEN(LEN), .NUM_SHIFTERS(NSH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    path_ref m;
    int      rate;
    bit      w;
    m = new(L, 1'b0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      rate   = ((t / 700) % 3 == 2) ? 50 : 3;
      en     = ($urandom_range(5) != 0);
      update = ($urandom_range(rate - 1) == 0);
      data   = $urandom_range(1);
      if (en) w = m.step(update, data);
      @(posedge clk); #1;
      checks += 2;
      if (data_out !== m.out()) begin
        failures++;
        if (failures < 10) $display("t=%0d data_out=%0d expected %0d", t, data_out, m.out());
      end
      if (overflow !== m.overflow()) begin
        failures++;
        if (failures < 10) $display("t=%0d overflow=%0d expected %0d", t, overflow, m.overflow());
      end
      for (int i = 0; i < L; i++) begin
        checks++;
        if (path[i] !== ((m.n - 1 - i >= 0) ? m.dec[m.n - 1 - i] : 1'b0)) failures++;
      end
      if (data_out) n_ones++;
      if (overflow) n_ovf++;
    end
    checks++;
    if (n_ones == 0 || n_ovf == 0) begin
      failures++;
      $display("coverage: ones out=%0d overflow cycles=%0d", n_ones, n_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
