// vd_logic: the "logic" part of a 1-D Viterbi detector.
//
// It runs the simplified Viterbi algorithm for the 1-D (dicode) trellis. Two
// variables are kept: Yp, the amplitude of the current candidate pulse, and
// B, its polarity (1 for beta = +1, 0 for beta = -1). For each new sample Yk
// the difference Yk - Yp is formed as Yk + ~Yp + 1. With offset binary samples
// spanning -2..+2, the borders of the no-update window <0, -2*beta> fall where
// the carry C and the msb M of that sum change, so the comparator is
//   Update = ~B & (M | ~C)  |  B & (~M | C)
//   Data   = ~B & M & C     |  B & ~M & ~C
// Update says that Yk is the new candidate; Data says that the previous
// candidate was a real pulse (its polarity has flipped). On Update the Yp/B
// register loads Yk and B loads C (the sign of Yk - Yp).
//
// Interface: sample_in is captured in the sample register on a clock edge with
// en = 1. update and data are combinational outputs of the sample in that
// register and of the Yp/B register, and are used by the path memory on the
// next enabled edge, at which Yp/B are also updated. The loop is thus one
// clock per sample. Reset (active low, asynchronous) sets Yp to code 0 (-2) and
// B to 0 (beta = -1), the start values of the algorithm; the sample register
// is cleared as well, which is this design's choice.
//
// The equations, the register structure and the subtraction by an adder
// follow the detector as built; the sample encoding and the reset are
// this design's choices.
module vd_logic #(
  parameter int unsigned W = vd_pkg::SAMPLE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] sample_in,
  output logic         update,
  output logic         data,
  output logic [W-1:0] yk,
  output logic [W-1:0] yp,
  output logic         b
);

  logic [W-1:0] diff;
  logic         carry;
  logic         msb;

  // Subtractor: Yk + ~Yp + 1, carry out = (Yk >= Yp).
  assign {carry, diff} = {1'b0, yk} + {1'b0, ~yp} + {{W{1'b0}}, 1'b1};
  assign msb           = diff[W-1];

  // Comparator on (carry, msb, B).
  assign update = (~b & (msb | ~carry)) | (b & (~msb | carry));
  assign data   = (~b & msb & carry) | (b & ~msb & ~carry);

  // Sample register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  yk <= '0;
    else if (en) yk <= sample_in;
  end

  // Yp / B register: keeps its value or loads the new candidate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yp <= '0;
      b  <= 1'b0;
    end else if (en && update) begin
      yp <= yk;
      b  <= carry;
    end
  end

endmodule
