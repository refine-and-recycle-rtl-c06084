// bram_command_parser (BCP): refines the tokens of one slice into BRAM
// commands that each touch a single BRAM bank.
//
// Token generator: the slice's Position Vector names the token starts; the
// BCP takes one item per cycle, first the literal bytes that continue a
// literal from an earlier slice (if any), then each token in PV order,
// decoding its header from the slice bytes and keeping a running output
// address that starts at the slice's base address.
// Command generator, literal path: the (at most 16) literal bytes in the
// slice are written to [addr, addr+n); this spans at most 3 consecutive
// history lines, giving up to 3 BRAM write commands carrying the data and a
// byte mask. Command generator, copy path: the copy source [addr-offset,
// addr-offset+len) is cut at source line boundaries; each piece (at most 8
// bytes of one source line) becomes one BRAM copy command with its
// destination address. A 64-byte copy gives up to 9 commands.
// Write commands go to 4 FIFOs selected by global line mod 4 (3 consecutive
// lines never share one); copy commands go to 16 FIFOs, one per source bank
// (9 consecutive lines never share a bank). An item is taken only when every
// FIFO has room, so the parser never drops a command.
// Interface: slice valid/ready in; FIFO heads out with a pop per FIFO.
// Timing: one token (or continuation) per cycle; commands are visible at the
// FIFO heads the cycle after the item is taken. The FIFO counts and the
// one-item-per-cycle rate follow the design description; FIFO depth and the
// "all FIFOs have room" rule are this design's choice.
module bram_command_parser
  import snappy_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 slice_valid,
  output logic                 slice_ready,
  input  slice_t               slice,
  // write command FIFOs (index = global line mod 4)
  output wr_cmd_t              wr_head  [NWFIFO],
  output logic [NWFIFO-1:0]    wr_empty,
  input  logic [NWFIFO-1:0]    wr_pop,
  // copy command FIFOs (index = source bank)
  output cp_cmd_t              cp_head  [NBANK],
  output logic [NBANK-1:0]     cp_empty,
  input  logic [NBANK-1:0]     cp_pop,
  output logic                 busy
);
  localparam int CW = $clog2(FIFO_DEPTH + 1);

  slice_t              sl;
  logic                sl_v, lit_pend;
  logic [IN_BYTES-1:0] rem_pv;
  logic [16:0]         addr;

  // ---------------- token generator ----------------
  logic [3:0]  ti;
  logic        found;
  token_t      tk;
  logic        is_copy;
  logic [4:0]  cs;       // first content byte in the slice
  logic [4:0]  nlit;     // literal bytes in this slice
  logic [16:0] step;     // output bytes of this item
  logic        last_item, fire;
  logic [NWFIFO-1:0] wr_full;
  logic [NBANK-1:0]  cp_full;

  always_comb begin
    ti    = '0;
    found = 1'b0;
    for (int i = IN_BYTES - 1; i >= 0; i--)
      if (rem_pv[i]) begin ti = 4'(i); found = 1'b1; end
    tk = decode_token(sl.bytes[ti], sl.bytes[5'(ti) + 5'd1], sl.bytes[5'(ti) + 5'd2]);
    if (lit_pend) begin
      is_copy = 1'b0;
      cs      = sl.lit_start;
      nlit    = sl.lit_cnt;
    end else begin
      is_copy = tk.is_copy;
      cs      = 5'(ti) + 5'(tk.hlen);
      if (cs >= 5'(IN_BYTES))
        nlit = '0;
      else if (tk.len < 17'(5'(IN_BYTES) - cs))
        nlit = tk.len[4:0];
      else
        nlit = 5'(IN_BYTES) - cs;
    end
    step      = is_copy ? tk.len : 17'(nlit);
    last_item = lit_pend ? (rem_pv == '0) : ((rem_pv & (rem_pv - 1'b1)) == '0);
    fire      = sl_v && (wr_full == '0) && (cp_full == '0);
  end

  assign slice_ready = !sl_v || (fire && last_item);

  // ---------------- command generator ----------------
  logic [NWFIFO-1:0] wr_push;
  wr_cmd_t           wr_new [NWFIFO];
  logic [NBANK-1:0]  cp_push;
  cp_cmd_t           cp_new [NBANK];

  always_comb begin
    logic [12:0] la0, la;
    logic [16:0] ga, src, send, ls;
    logic [1:0]  wk;
    logic [3:0]  ck;
    logic [2:0]  st;
    logic [3:0]  cnt;
    logic [12:0] s0, sln;
    // literal path: up to 3 line writes
    la0 = addr[15:3];
    for (int q = 0; q < NWFIFO; q++) begin
      wk        = 2'(q) - la0[1:0];
      la        = la0 + 13'(wk);
      wr_new[q] = '0;
      wr_new[q].bank = la[3:0];
      wr_new[q].line = la[12:4];
      for (int j = 0; j < LINE_BYTES; j++) begin
        ga = {1'b0, la, 3'(j)};
        if (ga >= addr && ga < addr + 17'(nlit)) begin
          wr_new[q].mask[j]       = 1'b1;
          wr_new[q].data[8*j +: 8] = sl.bytes[cs + 5'(ga - addr)];
        end
      end
      wr_push[q] = fire && !is_copy && (wk <= 2'd2) && (wr_new[q].mask != '0);
    end
    // copy path: cut the source range at line boundaries
    src  = addr - 17'(tk.offset);
    send = src + tk.len;
    s0   = src[15:3];
    for (int q = 0; q < NBANK; q++) begin
      ck  = 4'(q) - s0[3:0];
      sln = s0 + 13'(ck);
      ls  = {(14'(s0) + 14'(ck)), 3'd0};   // not wrapped: past the block end stays past it
      st  = (ck == 4'd0) ? src[2:0] : 3'd0;
      cnt = (send >= ls + 17'd8) ? 4'(4'd8 - 4'(st)) : 4'(send - ls - 17'(st));
      cp_new[q]      = '0;
      cp_new[q].bank = sln[3:0];
      cp_new[q].line = sln[12:4];
      cp_new[q].off  = st;
      cp_new[q].len  = cnt;
      cp_new[q].dst  = 16'(addr + (ls + 17'(st) - src));
      cp_push[q] = fire && !lit_pend && is_copy && (ck <= 4'd8) && (ls < send);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sl_v     <= 1'b0;
      sl       <= '0;
      lit_pend <= 1'b0;
      rem_pv   <= '0;
      addr     <= '0;
    end else begin
      if (fire) begin
        addr <= addr + step;
        if (lit_pend) lit_pend <= 1'b0;
        else if (found) rem_pv[ti] <= 1'b0;
        if (last_item) sl_v <= 1'b0;
      end
      if (slice_valid && slice_ready) begin
        sl_v     <= 1'b1;
        sl       <= slice;
        lit_pend <= (slice.lit_cnt != '0);
        rem_pv   <= slice.pv;
        addr     <= {1'b0, slice.base};
      end
    end
  end

  // ---------------- command FIFOs ----------------
  for (genvar q = 0; q < NWFIFO; q++) begin : g_wf
    logic [WR_W-1:0] h;
    logic [CW-1:0]   c;
    sync_fifo #(.WIDTH(WR_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(wr_push[q]), .push_data(wr_new[q]), .pop(wr_pop[q]),
      .head(h), .empty(wr_empty[q]), .full(wr_full[q]), .count(c));
    assign wr_head[q] = wr_cmd_t'(h);
  end
  for (genvar q = 0; q < NBANK; q++) begin : g_cf
    logic [CP_W-1:0] h;
    logic [CW-1:0]   c;
    sync_fifo #(.WIDTH(CP_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(cp_push[q]), .push_data(cp_new[q]), .pop(cp_pop[q]),
      .head(h), .empty(cp_empty[q]), .full(cp_full[q]), .count(c));
    assign cp_head[q] = cp_cmd_t'(h);
  end

  assign busy = sl_v || (wr_empty != '1) || (cp_empty != '1);
endmodule
