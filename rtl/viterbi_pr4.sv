// viterbi_pr4: Viterbi detector for class IV (1-D^2) partial response.
//
// The class IV signal y_i = a_i - a_{i-2} consists of two interleaved,
// independent 1-D streams. The detector is the control logic
// (pr4_interleaver) plus two 1-D Viterbi detectors, one for the even and one
// for the odd samples. Each decision bit is 1 for a pulse (+2 or -2) and 0
// for no pulse, which with 1/(1-D^2) precoding on the write side is the
// recorded data bit.
//
// Interface: one offset-binary sample per clock on sample_in; one decision per
// clock on data_out, 2*DEPTH + 3 clocks after its sample was presented
// (DEPTH = LEN*NUM_SHIFTERS, 28 by default, so 59 clocks). overflow is high
// while either path memory has lost its candidate. update/data of both 1-D
// detectors are brought out for observation.
//
// The interleaver's phase output is for observation only and is not used
// here.
module viterbi_pr4
  import vd_pkg::SAMPLE_W, vd_pkg::SHIFTER_LEN, vd_pkg::ram_style_e, vd_pkg::RAM_POINTER;
#(
  parameter int unsigned W            = SAMPLE_W,
  parameter int unsigned LEN          = SHIFTER_LEN,
  parameter int unsigned NUM_SHIFTERS = vd_pkg::NUM_SHIFTERS,
  parameter ram_style_e  RAM_STYLE    = RAM_POINTER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] sample_in,
  output logic         data_out,
  output logic         overflow,
  output logic [1:0]   update,
  output logic [1:0]   data
);

  logic [1:0]   det_en;
  logic [W-1:0] det_sample;
  logic [1:0]   det_data;
  logic [1:0]   det_overflow;
  logic         phase;

  pr4_interleaver #(.W(W)) u_ctrl (
    .clk, .rst_n, .sample_in,
    .det_en, .det_sample, .det_data, .det_overflow,
    .phase, .data_out, .overflow
  );

  for (genvar i = 0; i < 2; i++) begin : g_det
    viterbi_1d #(
      .W(W), .LEN(LEN), .NUM_SHIFTERS(NUM_SHIFTERS), .RAM_STYLE(RAM_STYLE)
    ) u_det (
      .clk, .rst_n,
      .en       (det_en[i]),
      .sample_in(det_sample),
      .data_out (det_data[i]),
      .overflow (det_overflow[i]),
      .update   (update[i]),
      .data     (data[i])
    );
  end

endmodule
