// snappy_decompressor: Snappy block decompressor built on the refine and
// recycle method.
//
// Stage 1 (refine): the slice parser cuts the compressed stream into 16-byte
// slices and marks every token start in one cycle; the slice arbiter hands
// slices to NBCP BRAM command parsers, each of which turns one token per
// cycle into BRAM write commands (literals) and BRAM copy commands (copies),
// each touching a single bank of the history buffer.
// Stage 2 (recycle): per bank, a write selector and a copy selector feed an
// execution module that owns one 4KB bank. Copies are executed at once; their
// valid bytes become new write commands for the destination banks, and the
// part whose data was not yet written is recycled and tried again later.
// No dependency checking is done anywhere.
// Block flow: after reset the history is cleared. A block's lines are then
// parsed; when the number of bytes written equals the block's uncompressed
// length (no byte is ever written twice) and the parser has seen the block's
// last line, the history is streamed out as 64-byte lines and cleared, and
// the parser is released for the next block.
// Interface: in_* is a valid/ready stream of 16-byte compressed lines, byte i
// in in_data[8i+7:8i], one Snappy block (with its length preamble) per run of
// lines ending with in_last. out_* is a valid/ready stream of 64-byte lines,
// out_bytes valid bytes each, out_last on the last line of a block. err is a
// sticky flag for token kinds that cannot occur in a 64KB block.
// NBCP = 6, 16 banks of 512 x 72 bits and the 16B input line follow the
// design description; FIFO depths, the recycle threshold, the block framing
// and the output width are this design's choices.
module snappy_decompressor
  import snappy_pkg::*;
#(
  parameter int NBCP           = 6,
  parameter int BCP_FIFO_DEPTH = 16,
  parameter int RC_DEPTH       = 512,
  parameter int RC_THRESH      = 128,
  parameter int GW_DEPTH       = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [IN_BYTES*8-1:0]   in_data,
  input  logic                    in_last,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [OUT_BYTES*8-1:0]  out_data,
  output logic [6:0]              out_bytes,
  output logic                    out_last,
  output logic                    err
);
  // ---------------- stage 1: slice parser, arbiter, BCPs ----------------
  logic         sp_resume, sp_halted, sp_blk_start, sp_blk_end;
  logic [16:0]  sp_raw_len;
  logic         sl_valid, sl_ready;
  slice_t       sl;
  logic [NBCP-1:0] bcp_sl_valid, bcp_sl_ready, bcp_busy;
  slice_t       bcp_slice;

  slice_parser u_parser (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_data), .in_last,
    .resume(sp_resume), .halted(sp_halted), .blk_start(sp_blk_start),
    .raw_len(sp_raw_len), .blk_end(sp_blk_end), .err,
    .slice_valid(sl_valid), .slice_ready(sl_ready), .slice(sl));

  slice_arbiter #(.NBCP(NBCP)) u_arb (
    .clk, .rst_n,
    .in_valid(sl_valid), .in_ready(sl_ready), .in_slice(sl),
    .out_valid(bcp_sl_valid), .out_ready(bcp_sl_ready), .out_slice(bcp_slice));

  wr_cmd_t            bcp_wr_head  [NBCP][NWFIFO];
  logic [NWFIFO-1:0]  bcp_wr_empty [NBCP];
  logic [NWFIFO-1:0]  bcp_wr_pop   [NBCP];
  cp_cmd_t            bcp_cp_head  [NBCP][NBANK];
  logic [NBANK-1:0]   bcp_cp_empty [NBCP];
  logic [NBANK-1:0]   bcp_cp_pop   [NBCP];

  for (genvar p = 0; p < NBCP; p++) begin : g_bcp
    bram_command_parser #(.FIFO_DEPTH(BCP_FIFO_DEPTH)) u_bcp (
      .clk, .rst_n,
      .slice_valid(bcp_sl_valid[p]), .slice_ready(bcp_sl_ready[p]), .slice(bcp_slice),
      .wr_head(bcp_wr_head[p]), .wr_empty(bcp_wr_empty[p]), .wr_pop(bcp_wr_pop[p]),
      .cp_head(bcp_cp_head[p]), .cp_empty(bcp_cp_empty[p]), .cp_pop(bcp_cp_pop[p]),
      .busy(bcp_busy[p]));
  end

  // ---------------- stage 2: selectors and execution modules ----------------
  logic [1:0]        gw_valid [NBANK];
  wr_cmd_t           gw_cmd   [NBANK][2];
  logic [1:0]        gw_ack_k [NBANK][NBANK];   // [selector bank][module]
  logic [1:0]        gw_ack   [NBANK];
  logic [NBCP-1:0]   ws_bpop  [NBANK];
  logic [NBCP-1:0]   cs_bpop  [NBANK];
  logic [3:0]        wbytes   [NBANK];
  logic [NBANK-1:0]  em_busy;
  logic [NBANK-1:0]  ho_clr, ho_rd;
  logic [LINE_AW-1:0] ho_line;
  logic [LINE_BYTES*8-1:0] bank_rdata [NBANK];

  for (genvar k = 0; k < NBANK; k++) begin : g_bank
    wr_cmd_t          ws_bhead [NBCP];
    logic [NBCP-1:0]  ws_bempty;
    cp_cmd_t          cs_bhead [NBCP];
    logic [NBCP-1:0]  cs_bempty;
    logic             wr_valid, cp_valid, em_accept, rc_pop, rc_empty;
    logic             from_recycle, rc_priority, hit, part_hit, miss;
    wr_cmd_t          wr_cmd;
    cp_cmd_t          cp_cmd, rc_head;
    logic [$clog2(RC_DEPTH+1)-1:0] rc_count;

    for (genvar p = 0; p < NBCP; p++) begin : g_src
      assign ws_bhead[p]  = bcp_wr_head[p][k % NWFIFO];
      assign ws_bempty[p] = bcp_wr_empty[p][k % NWFIFO];
      assign cs_bhead[p]  = bcp_cp_head[p][k];
      assign cs_bempty[p] = bcp_cp_empty[p][k];
    end

    write_selector #(.NBCP(NBCP), .BANK(k)) u_wsel (
      .clk, .rst_n,
      .gw_valid, .gw_cmd, .gw_ack(gw_ack_k[k]),
      .bcp_head(ws_bhead), .bcp_empty(ws_bempty), .bcp_pop(ws_bpop[k]),
      .wr_valid, .wr_cmd, .from_recycle);

    copy_selector #(.NBCP(NBCP), .RC_DEPTH(RC_DEPTH), .THRESH(RC_THRESH)) u_csel (
      .clk, .rst_n,
      .bcp_head(cs_bhead), .bcp_empty(cs_bempty), .bcp_pop(cs_bpop[k]),
      .rc_head, .rc_empty, .rc_count, .rc_pop,
      .em_accept, .cp_valid, .cp_cmd, .rc_priority);

    execution_module #(.RC_DEPTH(RC_DEPTH), .GW_DEPTH(GW_DEPTH)) u_em (
      .clk, .rst_n,
      .wr_valid, .wr_cmd, .cp_valid, .cp_cmd, .copy_accept(em_accept),
      .rc_head, .rc_empty, .rc_count, .rc_pop,
      .gw_valid(gw_valid[k]), .gw_cmd(gw_cmd[k]), .gw_ack(gw_ack[k]),
      .clr(ho_clr[k]), .clr_line(ho_line), .out_rd(ho_rd[k]), .out_line(ho_line),
      .out_rdata(bank_rdata[k]),
      .wbytes(wbytes[k]), .hit, .part_hit, .miss, .busy(em_busy[k]));
  end

  // acknowledge and pop fan-in
  always_comb begin
    for (int e = 0; e < NBANK; e++) begin
      gw_ack[e] = 2'b00;
      for (int k = 0; k < NBANK; k++) gw_ack[e] = gw_ack[e] | gw_ack_k[k][e];
    end
    for (int p = 0; p < NBCP; p++) begin
      bcp_wr_pop[p] = '0;
      for (int k = 0; k < NBANK; k++) begin
        bcp_wr_pop[p][k % NWFIFO] = bcp_wr_pop[p][k % NWFIFO] | ws_bpop[k][p];
        bcp_cp_pop[p][k]          = cs_bpop[k][p];
      end
    end
  end

  // ---------------- history output ----------------
  logic ho_start, ho_busy, ho_done;

  history_output u_out (
    .clk, .rst_n,
    .start(ho_start), .raw_len(sp_raw_len), .busy(ho_busy), .done(ho_done),
    .clr(ho_clr), .rd(ho_rd), .line(ho_line), .bank_rdata,
    .out_valid, .out_ready, .out_data, .out_bytes, .out_last);

  // ---------------- block control ----------------
  typedef enum logic [1:0] {C_INIT, C_DECODE, C_OUTPUT} ctl_t;
  ctl_t        ctl;
  logic        len_known, end_seen;
  logic [16:0] written;
  logic [7:0]  wsum;
  logic        drained;

  always_comb begin
    wsum = '0;
    for (int k = 0; k < NBANK; k++) wsum = wsum + 8'(wbytes[k]);
    drained = (bcp_busy == '0) && (em_busy == '0) && !sl_valid;
  end

  assign ho_start  = (ctl == C_DECODE) && len_known && end_seen &&
                     (written == sp_raw_len) && drained;
  assign sp_resume = ((ctl == C_INIT) || (ctl == C_OUTPUT)) && ho_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl       <= C_INIT;
      len_known <= 1'b0;
      end_seen  <= 1'b0;
      written   <= '0;
    end else begin
      written <= written + 17'(wsum);
      if (sp_blk_start) len_known <= 1'b1;
      if (sp_blk_end)   end_seen  <= 1'b1;
      unique case (ctl)
        C_INIT:   if (ho_done) ctl <= C_DECODE;
        C_DECODE: if (ho_start) ctl <= C_OUTPUT;
        C_OUTPUT: if (ho_done) begin
          ctl       <= C_DECODE;
          len_known <= 1'b0;
          end_seen  <= 1'b0;
          written   <= '0;
        end
        default:  ctl <= C_INIT;
      endcase
    end
  end

  // The history must never receive more bytes than the block holds.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ctl == C_DECODE && len_known) |-> written <= sp_raw_len);
endmodule
