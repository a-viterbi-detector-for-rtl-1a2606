// error_detector: bit error detector for the pseudo-random test sequence.
//
// The received bits are multiplied by the generator polynomial
// 1 + x^TAP + x^LEN: e_k = in_k xor in_{k-TAP} xor in_{k-LEN}. For an
// error-free copy of the sequence e_k is 0, whatever the phase, so the
// detector locks by itself. One wrong bit, however, appears three times in e
// (at k, k+TAP and k+LEN). The multiple-error canceller divides e by the same
// polynomial again, c_k = e_k xor c_{k-TAP} xor c_{k-LEN}, which turns each
// such triple back into one error flag. If the input register is ever filled
// with zeros the canceller could go on producing a pseudo-random sequence by
// itself, so after ZEROS consecutive zero products it is cleared.
//
// Interface: one received bit per clock edge with en = 1 on data_in. error is
// combinational (c_k) and valid in the same cycle. cancel_clear pulses in the
// cycle whose edge clears the canceller. Reset (active low, asynchronous)
// clears all registers.
//
// The multiplier, the dividing canceller and the clearing after 64 zeros
// follow the document; the width of the zero counter, and restarting the
// count after each clear, are this design's choices.
module error_detector #(
  parameter int unsigned LEN   = vd_pkg::PRS_LEN,
  parameter int unsigned TAP   = vd_pkg::PRS_TAP,
  parameter int unsigned ZEROS = vd_pkg::CANCEL_ZEROS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic data_in,
  output logic error,
  output logic cancel_clear
);

  localparam int unsigned CW = $clog2(ZEROS + 1);

  logic [LEN-1:0] in_sr;    // in_sr[i] = in_{k-1-i}
  logic [LEN-1:0] can_sr;   // can_sr[i] = c_{k-1-i}
  logic [CW-1:0]  zeros;
  logic           product;

  assign product      = data_in ^ in_sr[TAP-1] ^ in_sr[LEN-1];
  assign error        = product ^ can_sr[TAP-1] ^ can_sr[LEN-1];
  assign cancel_clear = !product && (zeros == CW'(ZEROS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr  <= '0;
      can_sr <= '0;
      zeros  <= '0;
    end else if (en) begin
      in_sr <= {in_sr[LEN-2:0], data_in};
      if (cancel_clear) begin
        can_sr <= '0;
        zeros  <= '0;
      end else begin
        can_sr <= {can_sr[LEN-2:0], error};
        zeros  <= product ? '0 : zeros + CW'(1);
      end
    end
  end

endmodule
