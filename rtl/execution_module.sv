// execution_module: executes BRAM commands on one bank of the history buffer
// and recycles copy commands whose source data is not yet valid.
//
// Each cycle the module takes at most one write command (from its write
// command selector) and one copy command (from its copy command selector):
// the write uses the bank's write port, the copy's read uses the read port.
// A write is always completed. One cycle after a copy's read, the unsolved
// control looks at the valid flags of the bytes it wanted and counts the
// valid bytes from the first wanted byte onward:
//   hit          all wanted bytes valid,
//   partial hit  a leading part valid,
//   miss         the first wanted byte invalid.
// For a hit or partial hit, the new command generator places the valid
// bytes at their destination: they fall into one or two destination lines,
// so one or two write commands are produced. They are queued as a pair in a
// small generated-write FIFO whose head is offered to the write command
// selectors of the destination banks (which may be any banks); the pair
// leaves the FIFO once both halves are taken. For a partial hit or a miss the
// copy command is renewed (the done part removed) and pushed into this
// module's recycle buffer, from which the copy selector re-issues it.
// Using only the valid leading bytes on a partial hit is this design's
// choice; it keeps each renewed command a single contiguous range.
// copy_accept is high when the generated-write FIFO can absorb the result of
// a copy issued now (room for two entries: the one in flight and this one).
// The clear and output ports let the history output unit read lines out and
// clear them between blocks; the top uses them only when no command is
// active. wbytes counts the bytes written this cycle.
module execution_module
  import snappy_pkg::*;
#(
  parameter int RC_DEPTH = 512,  // recycle buffer entries
  parameter int GW_DEPTH = 8     // generated-write FIFO entries (pairs)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // write command in
  input  logic                      wr_valid,
  input  wr_cmd_t                   wr_cmd,
  // copy command in
  input  logic                      cp_valid,
  input  cp_cmd_t                   cp_cmd,
  output logic                      copy_accept,
  // recycle buffer, read by the copy selector
  output cp_cmd_t                   rc_head,
  output logic                      rc_empty,
  output logic [$clog2(RC_DEPTH+1)-1:0] rc_count,
  input  logic                      rc_pop,
  // generated write commands (head pair)
  output logic [1:0]                gw_valid,
  output wr_cmd_t                   gw_cmd [2],
  input  logic [1:0]                gw_ack,
  // clear / output access
  input  logic                      clr,
  input  logic [LINE_AW-1:0]        clr_line,
  input  logic                      out_rd,
  input  logic [LINE_AW-1:0]        out_line,
  output logic [LINE_BYTES*8-1:0]   out_rdata,
  // status
  output logic [3:0]                wbytes,
  output logic                      hit,       // pulse: copy result was a hit
  output logic                      part_hit,  // pulse: partial hit
  output logic                      miss,      // pulse: miss
  output logic                      busy
);
  typedef struct packed {
    logic    v0;
    wr_cmd_t w0;
    logic    v1;
    wr_cmd_t w1;
  } gw_pair_t;
  localparam int GP_W = $bits(gw_pair_t);

  // ---------------- BRAM ----------------
  logic [LINE_BYTES*8-1:0] rdata;
  logic [LINE_BYTES-1:0]   rflag;

  history_bank u_bank (
    .clk,
    .we   (wr_valid || clr),
    .waddr(clr ? clr_line : wr_cmd.line),
    .wlane(clr ? '1 : wr_cmd.mask),
    .wdata(clr ? '0 : wr_cmd.data),
    .wflag(clr ? '0 : '1),
    .re   (cp_valid || out_rd),
    .raddr(cp_valid ? cp_cmd.line : out_line),
    .rdata,
    .rflag
  );
  assign out_rdata = rdata;
  assign wbytes    = wr_valid ? 4'($countones(wr_cmd.mask)) : 4'd0;

  // ---------------- read stage ----------------
  logic    s1_v;
  cp_cmd_t s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s1   <= '0;
    end else begin
      s1_v <= cp_valid;
      if (cp_valid) s1 <= cp_cmd;
    end
  end

  // ---------------- unsolved control and new command generator ----------------
  logic [3:0]  nval;      // valid leading bytes
  logic        stop;
  gw_pair_t    gnew;
  logic        gw_push, rc_push;
  cp_cmd_t     rc_new;

  always_comb begin
    logic [12:0] dl;
    logic [16:0] ga, dst;
    nval = '0;
    stop = 1'b0;
    for (int k = 0; k < LINE_BYTES; k++) begin
      if (!stop && (4'(k) < s1.len) && (3'(s1.off) + 4'(k) < 4'd8)) begin
        if (rflag[3'(s1.off) + 3'(k)]) nval = nval + 4'd1;
        else stop = 1'b1;
      end
    end
    dst  = {1'b0, s1.dst};
    gnew = '0;
    for (int h = 0; h < 2; h++) begin
      wr_cmd_t w;
      dl = s1.dst[15:3] + 13'(h);
      w = '0;
      w.bank = dl[3:0];
      w.line = dl[12:4];
      for (int j = 0; j < LINE_BYTES; j++) begin
        ga = {1'b0, dl, 3'(j)};
        if (ga >= dst && ga < dst + 17'(nval)) begin
          w.mask[j]        = 1'b1;
          w.data[8*j +: 8] = rdata[8*(3'(s1.off) + 3'(ga - dst)) +: 8];
        end
      end
      if (h == 0) begin gnew.w0 = w; gnew.v0 = (w.mask != '0); end
      else        begin gnew.w1 = w; gnew.v1 = (w.mask != '0); end
    end
    gw_push = s1_v && (nval != '0);
    rc_push = s1_v && (nval < s1.len);
    rc_new      = s1;
    rc_new.off  = s1.off + 3'(nval);
    rc_new.len  = s1.len - nval;
    rc_new.dst  = s1.dst + 16'(nval);
  end

  assign hit      = s1_v && (nval == s1.len);
  assign part_hit = s1_v && (nval != '0) && (nval < s1.len);
  assign miss     = s1_v && (nval == '0);

  // ---------------- recycle buffer ----------------
  logic [CP_W-1:0] rc_h;
  logic            rc_full;
  sync_fifo #(.WIDTH(CP_W), .DEPTH(RC_DEPTH)) u_recycle (
    .clk, .rst_n, .push(rc_push), .push_data(rc_new), .pop(rc_pop),
    .head(rc_h), .empty(rc_empty), .full(rc_full), .count(rc_count));
  assign rc_head = cp_cmd_t'(rc_h);

  // ---------------- generated-write FIFO ----------------
  logic [GP_W-1:0]                 gw_h;
  gw_pair_t                        gh;
  logic                            gw_empty, gw_full, gw_pop;
  logic [$clog2(GW_DEPTH+1)-1:0]   gw_count;
  logic [1:0]                      srv;

  sync_fifo #(.WIDTH(GP_W), .DEPTH(GW_DEPTH)) u_genwr (
    .clk, .rst_n, .push(gw_push), .push_data(gnew), .pop(gw_pop),
    .head(gw_h), .empty(gw_empty), .full(gw_full), .count(gw_count));
  assign gh = gw_pair_t'(gw_h);

  assign gw_valid[0] = !gw_empty && gh.v0 && !srv[0];
  assign gw_valid[1] = !gw_empty && gh.v1 && !srv[1];
  assign gw_cmd[0]   = gh.w0;
  assign gw_cmd[1]   = gh.w1;
  assign gw_pop      = !gw_empty && (!gw_valid[0] || gw_ack[0]) && (!gw_valid[1] || gw_ack[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      srv <= '0;
    else if (gw_pop) srv <= '0;
    else             srv <= srv | (gw_ack & gw_valid);
  end

  assign copy_accept = (gw_count <= ($clog2(GW_DEPTH+1))'(GW_DEPTH - 2));
  assign busy        = s1_v || !rc_empty || !gw_empty;

  // A copy is only issued when its result can be queued.
  assert property (@(posedge clk) disable iff (!rst_n) cp_valid |-> copy_accept);
  assert property (@(posedge clk) disable iff (!rst_n) !(rc_push && rc_full && !rc_pop));
endmodule
