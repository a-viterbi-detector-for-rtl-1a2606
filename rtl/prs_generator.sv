// prs_generator: pseudo-random test sequence generator.
//
// A linear feedback shift register that divides its input by the generator
// polynomial 1 + x^TAP + x^LEN (1 + x^3 + x^31 by default): each output bit is
// out_k = in_k xor out_{k-TAP} xor out_{k-LEN}, and the register holds the
// last LEN output bits. The input is the all-zero detector, which is 1 only
// while the whole register is zero; after reset it injects a single 1, and
// from then on the register is never all zero again, so the generator runs
// through the maximum-length sequence of 2^LEN - 1 bits.
//
// Interface: one bit per clock edge with en = 1 on prs_out (combinational from
// the register). Reset (active low, asynchronous) clears the register.
//
// The polynomial, the shift-register structure and the all-zero detector
// follow the document.
module prs_generator #(
  parameter int unsigned LEN = vd_pkg::PRS_LEN,
  parameter int unsigned TAP = vd_pkg::PRS_TAP
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic prs_out
);

  // sr[i] holds out_{k-1-i}.
  logic [LEN-1:0] sr;
  logic           all_zero;

  assign all_zero = (sr == '0);
  assign prs_out  = all_zero ^ sr[TAP-1] ^ sr[LEN-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sr <= '0;
    else if (en) sr <= {sr[LEN-2:0], prs_out};
  end

endmodule
