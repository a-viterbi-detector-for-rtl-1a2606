// pr4_interleaver: control logic of the class IV (1-D^2) Viterbi detector.
//
// A 1-D^2 signal splits into two independent 1-D streams: the even and the
// odd samples. This block feeds the two 1-D detectors alternately, one sample
// per clock, and merges their decisions back into one bit stream in the
// original order. A phase bit toggles every clock; detector 0 is enabled on
// phase 0 and detector 1 on phase 1, so each runs at half the sample rate.
// On every clock the output register takes the decision of the detector whose
// turn it is, just before that detector shifts again; since both detectors
// have made the same number of steps at that moment, the merged stream is in
// sample order.
//
// Interface: sample_in is passed to both detectors (det_sample) together with
// the enables det_en. data_out and overflow are registered; overflow is the
// overflow of either detector. The latency from a sample to its merged
// decision is 2*DEPTH + 3 clocks, DEPTH being the path memory length. Reset
// (active low, asynchronous) starts at phase 0.
//
// Splitting the stream into two interleaved 1-D detectors and merging their
// outputs follows the detector as built; enables in place of two separate
// detector clocks, and the output register, are this design's choices.
module pr4_interleaver #(
  parameter int unsigned W = vd_pkg::SAMPLE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] sample_in,
  output logic [1:0]   det_en,
  output logic [W-1:0] det_sample,
  input  logic [1:0]   det_data,
  input  logic [1:0]   det_overflow,
  output logic         phase,
  output logic         data_out,
  output logic         overflow
);

  assign det_en     = phase ? 2'b10 : 2'b01;
  assign det_sample = sample_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= 1'b0;
      data_out <= 1'b0;
      overflow <= 1'b0;
    end else begin
      phase    <= ~phase;
      data_out <= det_data[phase];
      overflow <= |det_overflow;
    end
  end

endmodule
