// vd_ram: the pointer-style "RAM" part (path memory) of a 1-D Viterbi
// detector.
//
// The maximum-likelihood path is kept in NUM_SHIFTERS chained shifters of LEN
// bits (28 bits for the default two). A 0 enters the first shifter for every
// sample; the controller keeps a pointer to the bit of the undecided candidate
// pulse and, when the logic part signals Update with Data = 1, sets that bit
// to 1 during the same shift. The bit leaving the last shifter is the final
// decision: 1 for a pulse (+2 or -2), 0 for no pulse.
//
// Interface: update/data from the logic part, consumed on the enabled edge.
// data_out is registered and gives the decision for the sample that entered
// NUM_SHIFTERS*LEN enabled edges earlier. overflow is high while the candidate
// has been pushed out of the memory without a decision.
//
// The controller-plus-two-shifters structure follows the detector as built;
// NUM_SHIFTERS may also be 1 or 3 (the controller supports three).
//
// With fewer than three shifters the controller's third select line is left
// unconnected.
module vd_ram #(
  parameter int unsigned LEN          = vd_pkg::SHIFTER_LEN,
  parameter int unsigned NUM_SHIFTERS = vd_pkg::NUM_SHIFTERS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic update,
  input  logic data,
  output logic data_out,
  output logic overflow,
  output logic [NUM_SHIFTERS*LEN-1:0] path
);

  localparam int unsigned AW = $clog2(LEN);

  logic [2:0]    sel;
  logic [AW-1:0] addr;
  logic [NUM_SHIFTERS:0] chain;

  vd_controller #(.LEN(LEN)) u_ctrl (
    .clk, .rst_n, .en,
    .long_mode(NUM_SHIFTERS > 2),
    .update, .data,
    .sel, .addr, .overflow
  );

  assign chain[0] = 1'b0;

  for (genvar i = 0; i < NUM_SHIFTERS; i++) begin : g_sh
    vd_shifter #(.LEN(LEN)) u_sh (
      .clk, .rst_n, .en,
      .shift_in (chain[i]),
      .set_en   (sel[i]),
      .set_addr (addr),
      .shift_out(chain[i+1]),
      .bits     (path[i*LEN +: LEN])
    );
  end

  assign data_out = chain[NUM_SHIFTERS];

endmodule
