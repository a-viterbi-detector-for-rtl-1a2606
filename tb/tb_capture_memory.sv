// tb_capture_memory: self-checking testbench of the capture memory, reduced
// to 2^8 entries. Random 2-bit data are written after a start pulse; busy
// must last exactly 2^AW clocks (one entry per clock), done must follow,
// writes after done must be ignored, and every entry is read back. A second
// capture restarts from address 0.
module tb_capture_memory;
  localparam int AW = 8;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [1:0]    wr_data = '0;
  logic          busy, done;
  logic [AW-1:0] rd_addr = '0;
  logic [1:0]    rd_data;

  int checks = 0, failures = 0;

  capture_memory #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] ref_mem [2**AW];
    int busy_cycles;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      repeat (3) @(negedge clk);
      checks++;
      if (busy) failures++;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      busy_cycles = 0;
      while (busy && busy_cycles < 2**AW + 10) begin
        wr_data = 2'($urandom);
        ref_mem[busy_cycles] = wr_data;
        busy_cycles++;
        @(negedge clk);
      end
      checks += 2;
      if (busy_cycles != 2**AW) begin
        failures++;
        $display("busy for %0d clocks, expected %0d", busy_cycles, 2**AW);
      end
      if (!done) failures++;
      repeat (5) begin
        wr_data = 2'($urandom);
        @(negedge clk);
      end
      for (int i = 0; i < 2**AW; i++) begin
        rd_addr = AW'(i);
        @(negedge clk);
        checks++;
        if (rd_data !== ref_mem[i]) begin
          failures++;
          if (failures < 10) $display("run %0d entry %0d: %0d expected %0d", run, i, rd_data, ref_mem[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
