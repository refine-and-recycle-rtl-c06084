// slice_arbiter: hands each slice from the slice parser to one BRAM command
// parser (BCP).
//
// The BCPs work independently, each on its own slice, so the arbiter only
// has to pick a free one: starting at a round-robin pointer it takes the
// first BCP that is ready and raises that BCP's valid. The pointer moves past
// the chosen BCP after each transfer, which spreads the slices evenly.
// Interface: valid/ready on both sides, slice data broadcast to all BCPs.
// Timing: combinational, one slice per cycle. The design description names
// this arbiter; the round-robin choice among ready BCPs is this design's.
module slice_arbiter
  import snappy_pkg::*;
#(
  parameter int NBCP = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  slice_t          in_slice,
  output logic [NBCP-1:0] out_valid,
  input  logic [NBCP-1:0] out_ready,
  output slice_t          out_slice
);
  localparam int BW = (NBCP > 1) ? $clog2(NBCP) : 1;

  logic [BW-1:0] rr, sel;
  logic          found;

  always_comb begin
    int idx;
    found = 1'b0;
    sel   = '0;
    for (int k = 0; k < NBCP; k++) begin
      idx = (int'(rr) + k) % NBCP;
      if (!found && out_ready[idx]) begin
        found = 1'b1;
        sel   = BW'(idx);
      end
    end
    out_valid = '0;
    if (in_valid && found) out_valid[sel] = 1'b1;
  end

  assign in_ready  = found;
  assign out_slice = in_slice;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  rr <= '0;
    else if (in_valid && found)  rr <= (sel == BW'(NBCP - 1)) ? '0 : sel + 1'b1;
  end
endmodule
