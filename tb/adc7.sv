// adc7: testbench model of the A/D converter (not synthesizable: the real
// part is an analog video digitiser board).
//
// On each rising clock edge the analog input is quantised uniformly over the
// range -FULL_SCALE .. +FULL_SCALE into a W-bit offset binary code:
//   code = floor((vin + FULL_SCALE) / (2 * FULL_SCALE) * 2^W),
// clipped to 0 .. 2^W - 1. With FULL_SCALE = 2 the ideal class IV levels
// -2, 0 and +2 map to the codes 0, 2^(W-1) and 2^W - 1. The code is held
// until the next edge (one clock of latency).
//
// The 7-bit resolution and the uniform quantisation over -2..+2 follow the
// document; the offset binary code and the sampling on the clock edge are
// this model's choices.
module adc7 #(
  parameter int unsigned W          = vd_pkg::SAMPLE_W,
  parameter int          FULL_SCALE = 2
) (
  input  logic         clk,
  input  real          vin,
  output logic [W-1:0] code
);

  localparam int MAXCODE = (1 << W) - 1;

  function automatic logic [W-1:0] quantise(input real v);
    real scaled;
    int  c;
    scaled = (v + real'(FULL_SCALE)) / (2.0 * real'(FULL_SCALE)) * real'(1 << W);
    if (scaled < 0.0)            c = 0;
    else if (scaled >= real'(MAXCODE)) c = MAXCODE;
    else                         c = $rtoi(scaled);
    return W'(c);
  endfunction

  initial code = '0;

  always @(posedge clk) code <= quantise(vin);

endmodule
