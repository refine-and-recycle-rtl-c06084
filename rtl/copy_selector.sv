// copy_selector: copy command selector of one bank (execution module).
//
// Issues at most one copy command per cycle to the bank's execution module,
// and only when the module can take it (em_accept). The candidates are the
// copy FIFO for this bank in every BRAM command parser and the module's own
// recycle buffer. While the recycle buffer holds fewer than THRESH commands,
// new commands from the parsers go first (round robin among parsers), which
// keeps the execution units fed; once it holds THRESH or more, the recycle
// buffer goes first, so it cannot overflow. When only one kind is waiting,
// that kind is issued. The chosen source is popped in the same cycle.
// Above the threshold a parser command is still let through in a cycle right
// after a recycled command was issued, provided the recycle buffer has room
// for it (at least two free entries: one command in flight, one issued now).
// Without this, commands in the recycle buffer that wait for data which only
// a parser command queued for this same bank will write could cycle through
// the buffer forever; with it, the recycle buffer keeps at least half of the
// issue slots while above the threshold.
// The priority policy follows the design description; THRESH and the
// alternation above the threshold are this design's choices.
module copy_selector
  import snappy_pkg::*;
#(
  parameter int NBCP     = 6,
  parameter int RC_DEPTH = 512,
  parameter int THRESH   = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  cp_cmd_t                       bcp_head [NBCP],
  input  logic [NBCP-1:0]               bcp_empty,
  output logic [NBCP-1:0]               bcp_pop,
  input  cp_cmd_t                       rc_head,
  input  logic                          rc_empty,
  input  logic [$clog2(RC_DEPTH+1)-1:0] rc_count,
  output logic                          rc_pop,
  input  logic                          em_accept,
  output logic                          cp_valid,
  output cp_cmd_t                       cp_cmd,
  output logic                          rc_priority  // recycle buffer at/above threshold
);
  localparam int BW = (NBCP > 1) ? $clog2(NBCP) : 1;

  logic [BW-1:0] rr;
  logic          found;
  logic [BW-1:0] sel;
  logic          take_bcp;
  logic          last_rc;   // previous issue came from the recycle buffer
  logic          room;

  always_comb begin
    int idx;
    found = 1'b0;
    sel   = '0;
    for (int k = 0; k < NBCP; k++) begin
      idx = (int'(rr) + k) % NBCP;
      if (!found && !bcp_empty[idx]) begin
        found = 1'b1;
        sel   = BW'(idx);
      end
    end
    rc_priority = (rc_count >= ($clog2(RC_DEPTH+1))'(THRESH));
    room        = (rc_count <= ($clog2(RC_DEPTH+1))'(RC_DEPTH - 2));
    take_bcp    = em_accept && found &&
                  (rc_empty || !rc_priority || (last_rc && room));
    rc_pop      = em_accept && !rc_empty && !take_bcp;
    bcp_pop     = '0;
    if (take_bcp) bcp_pop[sel] = 1'b1;
    cp_valid = take_bcp || rc_pop;
    cp_cmd   = take_bcp ? bcp_head[sel] : rc_head;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr      <= '0;
      last_rc <= 1'b0;
    end else begin
      if (take_bcp) rr <= (sel == BW'(NBCP - 1)) ? '0 : sel + 1'b1;
      last_rc <= rc_pop;
    end
  end

  initial assert (THRESH <= RC_DEPTH - 2);
endmodule
