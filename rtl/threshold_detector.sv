// threshold_detector: conventional ternary threshold detector on the digital
// samples.
//
// With offset binary samples covering -2..+2, the two most significant bits
// split the range into four quarters; the thresholds -1 and +1 lie at the
// borders of the outer quarters. A pulse (|y| > 1) is present when the two
// msbs are equal (00 or 11), so the decision is the inverted exclusive-or of
// the two msbs: 1 for a pulse, 0 for no pulse.
//
// Interface: purely combinational, sample in, decision out, no clock.
//
// The exclusive-or of the two msbs followed by an inversion follows the
// threshold detector as built; the offset binary encoding is this design's
// choice.
module threshold_detector #(
  parameter int unsigned W = vd_pkg::SAMPLE_W
) (
  input  logic [W-1:0] sample,
  output logic         pulse
);

  assign pulse = ~(sample[W-1] ^ sample[W-2]);

endmodule
