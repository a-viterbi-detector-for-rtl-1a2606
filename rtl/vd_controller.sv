// vd_controller: controller of the pointer-style path memory.
//
// The path memory is a chain of shifters (two, or three with long_mode = 1)
// into which a 0 is shifted for every sample. The most recent candidate pulse
// has not been decided yet; the controller tracks where its bit is. The
// pointer is kept as (css, cnt): css is the chip-select status (which
// shifter) and cnt the address 0..LEN-1 inside it, and it always names the
// position the candidate's bit will occupy after the next shift.
//
// On an enabled edge:
//   * Update = 1: the old candidate is decided. If Data = 1 and there is no
//     overflow, sel/addr select its bit so that the shifter sets it to 1
//     (a 0 is already there otherwise). The sample now being shifted in is the
//     new candidate, so the pointer restarts at position 1 of the first
//     shifter, where that bit will be after the following shift.
//   * Update = 0: the pointer advances by one so that it still names the same
//     bit after the shift, moving on to the next shifter after address LEN-1.
//     When it would pass the end of the last shifter, overflow is raised and
//     stays high until the next Update; no bit can be set meanwhile.
//
// Interface: sel is one-hot (bit i selects shifter i) and, like addr, is
// combinational from the pointer and the update/data inputs; it is consumed
// by the shifters on the same enabled edge. overflow is registered. Reset
// (active low, asynchronous) puts the controller into the overflow state,
// meaning that no candidate exists yet.
//
// The pointer/chip-select split, the LEN = 14 addresses, the two-or-three
// shifter option, the held overflow output and the rule that no bit is set
// during an overflow follow the controller as built. The exact pointer
// offset, the one-hot active-high select and the reset state are this
// design's choices.
module vd_controller #(
  parameter int unsigned LEN = vd_pkg::SHIFTER_LEN,
  parameter int unsigned AW  = $clog2(LEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          long_mode,   // 0: two shifters, 1: three shifters
  input  logic          update,
  input  logic          data,
  output logic [2:0]    sel,
  output logic [AW-1:0] addr,
  output logic          overflow
);

  localparam logic [AW-1:0] LAST = AW'(LEN - 1);

  logic [1:0]    css;
  logic [AW-1:0] cnt;
  logic [1:0]    last_css;

  assign last_css = long_mode ? 2'd2 : 2'd1;
  assign addr     = cnt;

  always_comb begin
    sel = '0;
    if (update && data && !overflow) sel[css] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      css      <= '0;
      cnt      <= '0;
      overflow <= 1'b1;
    end else if (en) begin
      if (update) begin
        css      <= '0;
        cnt      <= AW'(1);
        overflow <= 1'b0;
      end else if (!overflow) begin
        if (cnt == LAST) begin
          if (css == last_css) begin
            overflow <= 1'b1;
          end else begin
            css <= css + 2'd1;
            cnt <= '0;
          end
        end else begin
          cnt <= cnt + AW'(1);
        end
      end
    end
  end

endmodule
