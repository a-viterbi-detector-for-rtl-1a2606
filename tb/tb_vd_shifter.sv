// tb_vd_shifter: self-checking testbench of one path-memory shifter.
//
// Random shift-in bits, enables and set requests (including addresses past
// the end, which must do nothing) are applied; after every edge the whole
// register and shift_out are compared with a bit-array model.
module tb_vd_shifter;
  localparam int LEN = 14;
  localparam int AW  = 4;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           en = 1'b0;
  logic           shift_in = 1'b0;
  logic           set_en = 1'b0;
  logic [AW-1:0]  set_addr = '0;
  logic           shift_out;
  logic [LEN-1:0] bits;

  int checks = 0, failures = 0, n_set = 0;

  vd_shifter #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit model [LEN];
    bit nxt   [LEN];
    foreach (model[i]) model[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en       = ($urandom_range(4) != 0);
      shift_in = ($urandom_range(5) == 0);
      set_en   = ($urandom_range(2) == 0);
      set_addr = AW'($urandom_range(15));
      if (en) begin
        for (int i = LEN - 1; i > 0; i--) nxt[i] = model[i-1];
        nxt[0] = shift_in;
        if (set_en && int'(set_addr) < LEN) begin
          nxt[set_addr] = 1'b1;
          n_set++;
        end
        model = nxt;
      end
      @(posedge clk); #1;
      for (int i = 0; i < LEN; i++) begin
        checks++;
        if (bits[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("t=%0d bit %0d = %0d, expected %0d", t, i, bits[i], model[i]);
        end
      end
      checks++;
      if (shift_out !== model[LEN-1]) failures++;
    end
    checks++;
    if (n_set == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
