// vd_exchange_ram: register-exchange path memory, the simpler and faster
// alternative to the pointer-style "RAM" part of a 1-D Viterbi detector.
//
// Two DEPTH-bit shift registers hold the two survivor paths: path0 assumes
// that the current candidate pulse is not a pulse, path1 that it is. On every
// enabled edge both shift; a 0 enters path0 and the Update bit enters path1,
// because the newest sample can only be a pulse if it is the new candidate.
// When Update is active one register first copies the other: Data = 1 keeps
// path1 (the old candidate was a pulse), Data = 0 keeps path0. Both paths then
// agree everywhere except at the candidate's position, so the decision can be
// taken from path1's last bit, and a difference between the two last bits
// means the candidate left the memory undecided (buffer overflow).
//
// Interface: update/data from the logic part, consumed on the enabled edge.
// data_out (registered) is the decision for the sample that entered DEPTH
// enabled edges earlier. overflow = path0 and path1 differ at the output.
// Reset (active low, asynchronous) clears both registers.
//
// The two registers, what is shifted into each, the copy direction chosen by
// Data and the output compare for overflow follow the improved path memory
// proposed for the detector; which register drives data_out is read from
// its block diagram.
//
// The msb of each copy source is not read: it would be shifted out anyway.
// path0[0] is always 0, since path0 only ever shifts in a 0; it is kept so
// that both paths have the same shape.
module vd_exchange_ram #(
  parameter int unsigned DEPTH = vd_pkg::SHIFTER_LEN * vd_pkg::NUM_SHIFTERS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             update,
  input  logic             data,
  output logic             data_out,
  output logic             overflow,
  output logic [DEPTH-1:0] path0,
  output logic [DEPTH-1:0] path1
);

  logic [DEPTH-1:0] src0;
  logic [DEPTH-1:0] src1;

  // Select what each register shifts: its own content or a copy.
  always_comb begin
    src0 = path0;
    src1 = path1;
    if (update) begin
      src0 = data ? path1 : path0;
      src1 = data ? path1 : path0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      path0 <= '0;
      path1 <= '0;
    end else if (en) begin
      path0 <= {src0[DEPTH-2:0], 1'b0};
      path1 <= {src1[DEPTH-2:0], update};
    end
  end

  assign data_out = path1[DEPTH-1];
  assign overflow = path0[DEPTH-1] ^ path1[DEPTH-1];

endmodule
