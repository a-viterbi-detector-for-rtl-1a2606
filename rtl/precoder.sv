// precoder: modulo-2 precoder 1/(1 - D^LAG) for partial response recording.
//
// a_k = b_k xor a_{k-LAG}. With LAG = 2 this is the class IV (1-D^2)
// precoder; with LAG = 1 the 1/(1-D) precoder of the single 1-D test set-up.
// Precoding makes the detected "pulse / no pulse" bit equal to the data bit
// b_k and keeps a single detection error from propagating.
//
// Interface: on every clock edge with en = 1, data_in (b_k) is accepted and
// data_out (a_k) is combinational from data_in and the LAG-stage delay line,
// which then takes a_k. Reset (active low, asynchronous) clears the delay line.
//
// The function and the delay-line structure follow the document's precoder;
// the enable and reset are this design's choices.
module precoder #(
  parameter int unsigned LAG = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic data_in,
  output logic data_out
);

  logic [LAG-1:0] dly;

  assign data_out = data_in ^ dly[LAG-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dly <= '0;
    else if (en) dly <= LAG'({dly, data_out});
  end

endmodule
