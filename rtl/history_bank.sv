// history_bank: one 4KB bank of the striped 64KB history buffer.
//
// 512 lines of 72 bits, configured as one read port and one write port like
// a simple-dual-port 36Kb BRAM. Each line holds 8 data bytes and 8 valid
// flags, one flag per byte. The line is stored as eight 9-bit lanes
// {flag, byte}; the write port has one enable per lane, so a write updates
// exactly the bytes it carries and marks them valid (or, for a clearing write
// with flag 0, invalid).
// Timing: synchronous read with one cycle of latency; a read and a write of
// the same line in one cycle return the old contents (read-first).
module history_bank
  import snappy_pkg::*;
#(
  parameter int LINES = BANK_LINES
) (
  input  logic                       clk,
  // write port
  input  logic                       we,
  input  logic [$clog2(LINES)-1:0]   waddr,
  input  logic [LINE_BYTES-1:0]      wlane,   // lane enables
  input  logic [LINE_BYTES*8-1:0]    wdata,
  input  logic [LINE_BYTES-1:0]      wflag,   // flag value written per lane
  // read port
  input  logic                       re,
  input  logic [$clog2(LINES)-1:0]   raddr,
  output logic [LINE_BYTES*8-1:0]    rdata,
  output logic [LINE_BYTES-1:0]      rflag
);
  logic [LINE_BYTES-1:0][8:0] mem [LINES];
  logic [LINE_BYTES-1:0][8:0] rline;

  always_ff @(posedge clk) begin
    if (we) begin
      for (int j = 0; j < LINE_BYTES; j++)
        if (wlane[j]) mem[waddr][j] <= {wflag[j], wdata[8*j +: 8]};
    end
    if (re) rline <= mem[raddr];
  end

  always_comb begin
    for (int j = 0; j < LINE_BYTES; j++) begin
      rdata[8*j +: 8] = rline[j][7:0];
      rflag[j]        = rline[j][8];
    end
  end
endmodule
