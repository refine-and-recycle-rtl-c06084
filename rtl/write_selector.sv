// write_selector: write command selector of one bank (execution module).
//
// Picks at most one write command per cycle for bank BANK. Highest priority
// go the write commands that execution modules generated from copy results
// (the "recycled" writes): among the modules whose generated-write head has a
// half for this bank, a round-robin pointer chooses one. Otherwise a
// round-robin pointer chooses among the BRAM command parsers whose write
// FIFO number BANK mod 4 holds, at its head, a command for this bank.
// The chosen source is acknowledged (gw_ack / bcp_pop) in the same cycle and
// the command goes straight to the bank's write port.
// The priority order follows the design description; round robin among the
// execution modules is this design's choice, to keep one busy module from
// starving the others.
module write_selector
  import snappy_pkg::*;
#(
  parameter int NBCP = 6,
  parameter int BANK = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // generated writes offered by all execution modules
  input  logic [1:0]           gw_valid [NBANK],
  input  wr_cmd_t              gw_cmd   [NBANK][2],
  output logic [1:0]           gw_ack   [NBANK],
  // write FIFO (BANK mod 4) of every BCP
  input  wr_cmd_t              bcp_head  [NBCP],
  input  logic [NBCP-1:0]      bcp_empty,
  output logic [NBCP-1:0]      bcp_pop,
  // to the bank
  output logic                 wr_valid,
  output wr_cmd_t              wr_cmd,
  output logic                 from_recycle   // this cycle's write was a generated one
);
  localparam int BW = (NBCP > 1) ? $clog2(NBCP) : 1;

  logic [3:0]    rr_em;
  logic [BW-1:0] rr_bcp;
  logic          em_found, bcp_found;
  logic [3:0]    em_sel;
  logic          em_half;
  logic [BW-1:0] bcp_sel;

  always_comb begin
    logic [NBANK-1:0] c_em;
    logic [1:0]       hsel [NBANK];
    logic [NBCP-1:0]  c_bcp;
    int               idx;
    for (int e = 0; e < NBANK; e++) begin
      hsel[e][0] = gw_valid[e][0] && (gw_cmd[e][0].bank == 4'(BANK));
      hsel[e][1] = gw_valid[e][1] && (gw_cmd[e][1].bank == 4'(BANK));
      c_em[e]    = hsel[e] != 2'b00;
    end
    em_found = 1'b0;
    em_sel   = '0;
    for (int k = 0; k < NBANK; k++) begin
      idx = (int'(rr_em) + k) % NBANK;
      if (!em_found && c_em[idx]) begin
        em_found = 1'b1;
        em_sel   = 4'(idx);
      end
    end
    em_half = !hsel[em_sel][0];

    for (int p = 0; p < NBCP; p++)
      c_bcp[p] = !bcp_empty[p] && (bcp_head[p].bank == 4'(BANK));
    bcp_found = 1'b0;
    bcp_sel   = '0;
    for (int k = 0; k < NBCP; k++) begin
      idx = (int'(rr_bcp) + k) % NBCP;
      if (!bcp_found && c_bcp[idx]) begin
        bcp_found = 1'b1;
        bcp_sel   = BW'(idx);
      end
    end

    for (int e = 0; e < NBANK; e++) gw_ack[e] = 2'b00;
    bcp_pop      = '0;
    wr_valid     = 1'b0;
    wr_cmd       = '0;
    from_recycle = 1'b0;
    if (em_found) begin
      gw_ack[em_sel][em_half] = 1'b1;
      wr_valid     = 1'b1;
      wr_cmd       = gw_cmd[em_sel][em_half];
      from_recycle = 1'b1;
    end else if (bcp_found) begin
      bcp_pop[bcp_sel] = 1'b1;
      wr_valid         = 1'b1;
      wr_cmd           = bcp_head[bcp_sel];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_em  <= '0;
      rr_bcp <= '0;
    end else begin
      if (em_found) rr_em <= em_sel + 4'd1;
      else if (bcp_found)
        rr_bcp <= (bcp_sel == BW'(NBCP - 1)) ? '0 : bcp_sel + 1'b1;
    end
  end
endmodule
