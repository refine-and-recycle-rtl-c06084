// history_output: sends out the finished 64KB history of a block and clears
// it for the next block.
//
// After reset it clears every line of all 16 banks (512 cycles, one line per
// bank per cycle), because the valid flags must start at zero. For each block
// it is then started with the block's uncompressed length and reads the
// history out as 64-byte output lines: output line o is made of the 8 global
// lines 8o..8o+7, which sit at bank line o/2 of banks 0-7 (o even) or 8-15
// (o odd). Each read also writes zeros with cleared flags into the same
// lines; the bank returns the old contents (read-first), so reading and
// clearing share one pass. Lines past the block's length were never written
// and stay clear.
// Interface: start/raw_len in, bank access out (per-bank read and clear
// strobes, shared line address), bank read data in; output lines as a
// valid/ready stream with out_bytes valid bytes (64 except in the last line)
// and out_last. busy is high during either pass.
// Timing: one output line per cycle while out_ready is high; the bank reads
// are issued one cycle ahead into a 4-entry output FIFO. The 64-byte output
// width and the clear-while-reading pass are this design's choices: the
// design description only says the built history is output and reset.
module history_output
  import snappy_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [16:0]                    raw_len,
  output logic                           busy,
  output logic                           done,      // pulse: pass finished
  // bank access
  output logic [NBANK-1:0]               clr,
  output logic [NBANK-1:0]               rd,
  output logic [LINE_AW-1:0]             line,
  input  logic [LINE_BYTES*8-1:0]        bank_rdata [NBANK],
  // output stream
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [OUT_BYTES*8-1:0]         out_data,
  output logic [6:0]                     out_bytes,
  output logic                           out_last
);
  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_OUT, S_DRAIN} state_t;
  localparam int OW = OUT_BYTES * 8 + 8;
  localparam int OFIFO = 4;

  state_t       state;
  logic [10:0]  o;          // next output line (clear: next bank line)
  logic [10:0]  nlines;
  logic [16:0]  len_q;
  logic         issue;
  // request in flight
  logic         f_v, f_half, f_last;
  logic [6:0]   f_bytes;

  logic [OW-1:0] ohead;
  logic          oempty, ofull;
  logic [$clog2(OFIFO+1)-1:0] ocount;
  logic [OUT_BYTES*8-1:0]     gathered;

  assign issue = (state == S_OUT) && (o < nlines) &&
                 (32'(ocount) + 32'(f_v) < OFIFO);

  always_comb begin
    clr  = '0;
    rd   = '0;
    line = '0;
    if (state == S_CLEAR) begin
      clr  = '1;
      line = o[8:0];
    end else if (issue) begin
      line = o[9:1];
      for (int j = 0; j < 8; j++) begin
        rd[o[0] ? 8 + j : j]  = 1'b1;
        clr[o[0] ? 8 + j : j] = 1'b1;
      end
    end
    for (int j = 0; j < 8; j++)
      gathered[64*j +: 64] = bank_rdata[f_half ? 8 + j : j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLEAR;
      o       <= '0;
      nlines  <= '0;
      len_q   <= '0;
      f_v     <= 1'b0;
      f_half  <= 1'b0;
      f_last  <= 1'b0;
      f_bytes <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      f_v  <= issue;
      if (issue) begin
        f_half  <= o[0];
        f_last  <= (o == nlines - 11'd1);
        f_bytes <= (len_q - {o[10:0], 6'd0} >= 17'd64) ? 7'd64 : 7'(len_q - {o[10:0], 6'd0});
        o       <= o + 11'd1;
      end
      unique case (state)
        S_CLEAR: begin
          o <= o + 11'd1;
          if (o == 11'(BANK_LINES - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_IDLE: if (start) begin
          state  <= S_OUT;
          o      <= '0;
          len_q  <= raw_len;
          nlines <= 11'((raw_len + 17'd63) >> 6);
        end
        S_OUT:   if (o >= nlines && !issue) state <= S_DRAIN;
        S_DRAIN: if (!f_v && oempty) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  sync_fifo #(.WIDTH(OW), .DEPTH(OFIFO)) u_ofifo (
    .clk, .rst_n, .push(f_v), .push_data({f_last, f_bytes, gathered}),
    .pop(out_valid && out_ready), .head(ohead), .empty(oempty), .full(ofull),
    .count(ocount));

  assign out_valid = !oempty;
  assign out_data  = ohead[OUT_BYTES*8-1:0];
  assign out_bytes = ohead[OUT_BYTES*8 +: 7];
  assign out_last  = ohead[OW-1];
  assign busy      = (state != S_IDLE);
endmodule
