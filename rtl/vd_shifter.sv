// vd_shifter: one section of the pointer-style path memory.
//
// A LEN-bit shift register in which one bit, chosen by an address, can be set
// to 1 during the shift. On each enabled clock edge every bit moves one place
// up (bit i takes bit i-1, bit 0 takes shift_in) and, when set_en is high,
// the bit landing at position set_addr is forced to 1. shift_out is the top
// bit, which feeds the next section or is the detector's decision output.
//
// Interface: set_en/set_addr come from the path memory controller. Timing: one
// shift per enabled edge; shift_out is registered. Reset (active low,
// asynchronous) clears all bits.
//
// The section length of 14 and the "shift, or set the addressed bit" function
// follow the detector as built; the binary address and the reset value are
// this design's choices.
module vd_shifter #(
  parameter int unsigned LEN = vd_pkg::SHIFTER_LEN,
  parameter int unsigned AW  = $clog2(LEN)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           shift_in,
  input  logic           set_en,
  input  logic [AW-1:0]  set_addr,
  output logic           shift_out,
  output logic [LEN-1:0] bits
);

  logic [LEN-1:0] shifted;
  logic [LEN-1:0] set_mask;

  assign shifted = {bits[LEN-2:0], shift_in};

  always_comb begin
    set_mask = '0;
    if (set_en && (32'(set_addr) < LEN)) set_mask[set_addr] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  bits <= '0;
    else if (en) bits <= shifted | set_mask;
  end

  assign shift_out = bits[LEN-1];

endmodule
