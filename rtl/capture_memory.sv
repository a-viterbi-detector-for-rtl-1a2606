// capture_memory: high-speed memory that records the error flags of the
// threshold and the Viterbi detector for off-line error statistics.
//
// One measurement stores 2^AW consecutive 2-bit entries, one per bit period:
// bit 0 is the threshold detector's error flag and bit 1 the Viterbi
// detector's. With the default AW = 24 that is 16 Mbit per detector, 32 Mbit
// in all, or 0.8 s of data at 20 Mbit/s. A pulse on start clears the write
// address and sets busy; while busy, every clock writes wr_data and advances
// the address; after the last entry busy falls and done rises (and stays
// until the next start). A host reads the stored data afterwards through
// rd_addr/rd_data, one entry per clock with one clock of read latency.
//
// Interface: start (one-clock pulse), wr_data (sampled while busy), busy,
// done, rd_addr, rd_data (registered). Reset (active low, asynchronous)
// clears the control state; the array itself is not reset.
//
// The 32 Mbit size, the two error streams and the write rate follow the
// document; the control handshake and the read port are this design's
// choices.
module capture_memory #(
  parameter int unsigned AW = vd_pkg::CAPTURE_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1:0]    wr_data,
  output logic          busy,
  output logic          done,
  input  logic [AW-1:0] rd_addr,
  output logic [1:0]    rd_data
);

  logic [1:0]    mem [2**AW];
  logic [AW-1:0] wr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      wr_addr <= '0;
    end else if (start) begin
      busy    <= 1'b1;
      done    <= 1'b0;
      wr_addr <= '0;
    end else if (busy) begin
      wr_addr <= wr_addr + AW'(1);
      if (wr_addr == '1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && !start) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
