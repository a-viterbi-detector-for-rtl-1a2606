// pr4_viterbi_system: class IV partial response recording test system with a
// Viterbi detector and a threshold detector working on the same samples.
//
// Write side: a pseudo-random sequence (1 + x^3 + x^31) is inverted and
// precoded by 1/(1-D^2); tx_bit is the bit sent to the recording channel.
// The inversion turns a dropout (a run of zero samples) into a run of ones at
// the error detector, which it handles without trouble.
//
// Read side: the class IV signal from the channel (nominal levels -2, 0, +2)
// arrives as offset binary codes from an external A/D converter (W bits,
// uniform over -2..+2). Each sample goes both to the threshold
// detector and to the 1-D^2 Viterbi detector (two interleaved 1-D detectors).
// Both decision streams are inverted back and checked by one error detector
// each; the two error flags can be recorded in the capture memory for
// off-line analysis of the error statistics.
//
// Interface: one bit per clock on tx_bit, one A/D sample per clock on
// sample. Decisions,
// error flags and the canceller-clear pulses of the error detectors are
// brought out. capture_start begins a capture of 2^CAPTURE_AW clocks; the
// stored flags are read through cap_rd_addr/cap_rd_data. The Viterbi
// decision for a sample appears 2*DEPTH + 3 clocks after the sample is
// presented (DEPTH = LEN*NUM_SHIFTERS); the threshold decision is
// combinational on the sample input.
//
// The composition follows the detector and the measurement set-up described
// for the experimental recorder; the single clock shared by the write and
// read sides is this design's choice.
module pr4_viterbi_system
  import vd_pkg::ram_style_e, vd_pkg::RAM_POINTER;
#(
  parameter int unsigned W            = vd_pkg::SAMPLE_W,
  parameter int unsigned LEN          = vd_pkg::SHIFTER_LEN,
  parameter int unsigned NUM_SHIFTERS = vd_pkg::NUM_SHIFTERS,
  parameter ram_style_e  RAM_STYLE    = RAM_POINTER,
  parameter int unsigned CAPTURE_AW   = vd_pkg::CAPTURE_AW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write side
  output logic                  tx_bit,
  // read side
  input  logic [W-1:0]          sample,
  output logic                  viterbi_data,
  output logic                  viterbi_overflow,
  output logic [1:0]            viterbi_update,
  output logic [1:0]            viterbi_pulse,
  output logic                  threshold_data,
  output logic                  viterbi_error,
  output logic                  threshold_error,
  output logic                  viterbi_cancel_clear,
  output logic                  threshold_cancel_clear,
  // capture memory
  input  logic                  capture_start,
  output logic                  capture_busy,
  output logic                  capture_done,
  input  logic [CAPTURE_AW-1:0] cap_rd_addr,
  output logic [1:0]            cap_rd_data
);

  // ---------------- write side ----------------
  logic prs;

  prs_generator u_prs (
    .clk, .rst_n, .en(1'b1), .prs_out(prs)
  );

  precoder #(.LAG(2)) u_precoder (
    .clk, .rst_n, .en(1'b1), .data_in(~prs), .data_out(tx_bit)
  );

  // ---------------- read side ----------------
  threshold_detector #(.W(W)) u_thr (
    .sample, .pulse(threshold_data)
  );

  viterbi_pr4 #(
    .W(W), .LEN(LEN), .NUM_SHIFTERS(NUM_SHIFTERS), .RAM_STYLE(RAM_STYLE)
  ) u_vit (
    .clk, .rst_n,
    .sample_in(sample),
    .data_out (viterbi_data),
    .overflow (viterbi_overflow),
    .update   (viterbi_update),
    .data     (viterbi_pulse)
  );

  error_detector u_err_thr (
    .clk, .rst_n, .en(1'b1),
    .data_in(~threshold_data),
    .error(threshold_error),
    .cancel_clear(threshold_cancel_clear)
  );

  error_detector u_err_vit (
    .clk, .rst_n, .en(1'b1),
    .data_in(~viterbi_data),
    .error(viterbi_error),
    .cancel_clear(viterbi_cancel_clear)
  );

  capture_memory #(.AW(CAPTURE_AW)) u_cap (
    .clk, .rst_n,
    .start  (capture_start),
    .wr_data({viterbi_error, threshold_error}),
    .busy   (capture_busy),
    .done   (capture_done),
    .rd_addr(cap_rd_addr),
    .rd_data(cap_rd_data)
  );

endmodule
