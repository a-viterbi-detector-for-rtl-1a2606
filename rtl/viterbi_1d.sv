// viterbi_1d: Viterbi detector for a 1-D (dicode) partial response stream.
//
// The logic part (vd_logic) decides, sample by sample, whether the new
// sample becomes the candidate pulse (Update) and whether the previous
// candidate was a real pulse (Data); the path memory stores the resulting
// maximum-likelihood bit sequence and delivers each decision a fixed number
// of samples later (1 = pulse of +2 or -2, 0 = no pulse). With precoding
// 1/(1-D) on the write side this bit is the recorded data bit.
//
// RAM_STYLE picks the path memory: RAM_POINTER, the controller with two
// 14-bit shifters that was built (default), or RAM_EXCHANGE, the
// two-register exchange memory proposed as its improvement. Both give a
// 28-bit memory by default.
//
// Interface: one sample per enabled clock edge on sample_in (offset binary).
// The sample is registered on its first enabled edge; its decision bit is
// shifted into the path memory on the next one and reaches data_out
// DEPTH - 1 edges later, i.e. data_out after enabled edge n holds the
// decision for the sample presented at edge n - DEPTH. update and data are
// brought out for observation, as on the detector's test bus.
//
// The logic part's registers (yk, yp, b) and the stored path are outputs of
// the sub-blocks for testing; this module does not use them.
module viterbi_1d
  import vd_pkg::SAMPLE_W, vd_pkg::SHIFTER_LEN, vd_pkg::ram_style_e, vd_pkg::RAM_POINTER;
#(
  parameter int unsigned W            = SAMPLE_W,
  parameter int unsigned LEN          = SHIFTER_LEN,
  parameter int unsigned NUM_SHIFTERS = vd_pkg::NUM_SHIFTERS,
  parameter ram_style_e  RAM_STYLE    = RAM_POINTER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] sample_in,
  output logic         data_out,
  output logic         overflow,
  output logic         update,
  output logic         data
);

  localparam int unsigned DEPTH = LEN * NUM_SHIFTERS;

  logic [W-1:0] yk, yp;
  logic         b;

  vd_logic #(.W(W)) u_logic (
    .clk, .rst_n, .en, .sample_in,
    .update, .data, .yk, .yp, .b
  );

  if (RAM_STYLE == RAM_POINTER) begin : g_pointer
    logic [DEPTH-1:0] path;
    vd_ram #(.LEN(LEN), .NUM_SHIFTERS(NUM_SHIFTERS)) u_ram (
      .clk, .rst_n, .en, .update, .data,
      .data_out, .overflow, .path
    );
  end else begin : g_exchange
    logic [DEPTH-1:0] path0, path1;
    vd_exchange_ram #(.DEPTH(DEPTH)) u_ram (
      .clk, .rst_n, .en, .update, .data,
      .data_out, .overflow, .path0, .path1
    );
  end

endmodule
