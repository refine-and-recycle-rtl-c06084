// slice_parser: splits the compressed byte stream of one Snappy block into
// "slices" and finds every token start in one cycle.
//
// Each cycle it takes one 16-byte input line together with the first 2 bytes
// of the next line (18 bytes, enough for the longest token header that starts
// in the line). Token boundaries are found with an Assumption Bit Map (ABM):
// every byte i is assumed to start a token, its header is decoded, and row i
// of the 16x16 ABM gets zeros in the L-1 cells after i, L being the length of
// that token (header plus literal bytes). A cascade starting at the first
// token position, known from the slice flag left by the previous line,
// follows the rows from one token to the next and marks the Position Vector
// (PV), bit i set when byte i starts a token.
// The slice flag carried to the next line holds the header bytes that spill
// into it, the literal bytes still to come and the output address reached.
// Besides the PV, a slice carries the literal bytes at its start that
// belong to a literal begun earlier (lit_start, lit_cnt) and the output
// address of its first output byte (base), so that each BRAM command parser
// can work on it alone.
//
// Block framing (this design's choice): each block starts on a fresh input
// line with its Snappy preamble (varint of the uncompressed length), and
// in_last marks the last line of the block. Tokens whose output would lie at
// or beyond the uncompressed length are padding and are masked from the PV.
// After the last line the parser halts until resume is pulsed, so the next
// block waits until the history buffer has been output and cleared.
// Slices that carry no output are not emitted. Interfaces are valid/ready;
// with slice_ready high the parser accepts one line per cycle.
module slice_parser
  import snappy_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  // compressed input lines
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [IN_BYTES-1:0][7:0]        in_data,
  input  logic                            in_last,
  // block control
  input  logic                            resume,     // start the next block
  output logic                            halted,
  output logic                            blk_start,  // pulse: preamble read
  output logic [16:0]                     raw_len,    // uncompressed length
  output logic                            blk_end,    // pulse: last line parsed
  output logic                            err,        // sticky: unsupported tag
  // slices
  output logic                            slice_valid,
  input  logic                            slice_ready,
  output slice_t                          slice
);
  // ---------------- state (slice flag and block state) ----------------
  logic                      cur_v, cur_last, first_line, halt;
  logic [IN_BYTES-1:0][7:0]  cur;
  logic [1:0]                skip_q;    // header bytes spilling into this line
  logic [16:0]               lit_rem_q; // literal bytes still to come
  logic [16:0]               base_q;    // output address reached
  logic [16:0]               raw_q;

  // ---------------- combinational slice computation ----------------
  logic [SLICE_BYTES-1:0][7:0] b;
  logic [1:0]                  pre_len;
  logic [16:0]                 pre_val, raw_eff;
  logic [1:0]                  skip_eff;
  logic [16:0]                 lit_eff;
  logic [4:0]                  lit_cnt, first_tok;
  token_t                      tok  [IN_BYTES];
  logic [17:0]                 span [IN_BYTES];
  logic [IN_BYTES-1:0]         abm  [IN_BYTES];
  logic [IN_BYTES-1:0]         reach, pv;
  logic [17:0]                 acc;
  logic [3:0]                  last_i;
  logic                        any_tok, any_bad, emit, fire;
  logic [1:0]                  skip_n;
  logic [16:0]                 lit_n;
  logic [5:0]                  hend;
  logic [16:0]                 in_slice;

  always_comb begin
    for (int i = 0; i < IN_BYTES; i++) b[i] = cur[i];
    b[IN_BYTES]   = cur_last ? 8'h00 : in_data[0];
    b[IN_BYTES+1] = cur_last ? 8'h00 : in_data[1];

    // preamble: little-endian base-128 varint, at most 3 bytes for 64KB
    if (!b[0][7]) begin
      pre_len = 2'd1; pre_val = 17'(b[0][6:0]);
    end else if (!b[1][7]) begin
      pre_len = 2'd2; pre_val = 17'({b[1][6:0], b[0][6:0]});
    end else begin
      pre_len = 2'd3; pre_val = {b[2][2:0], b[1][6:0], b[0][6:0]};
    end
    raw_eff  = first_line ? pre_val : raw_q;
    skip_eff = first_line ? pre_len : skip_q;
    lit_eff  = first_line ? 17'd0 : lit_rem_q;
    lit_cnt  = (lit_eff > 17'(IN_BYTES - skip_eff)) ? 5'(IN_BYTES - skip_eff) : lit_eff[4:0];
    first_tok = 5'(skip_eff) + lit_cnt;

    // stage 1+2: assume every byte starts a token and fill the ABM rows
    for (int i = 0; i < IN_BYTES; i++) begin
      tok[i]  = decode_token(b[i], b[i+1], b[i+2]);
      span[i] = tok[i].is_copy ? 18'(tok[i].hlen) : 18'(tok[i].hlen) + 18'(tok[i].len);
      for (int j = 0; j < IN_BYTES; j++)
        abm[i][j] = !((j > i) && (18'(j) < 18'(i) + span[i]));
    end

    // stage 3: cascade through the ABM from the first token to build the PV
    reach = '0;
    for (int j = 0; j < IN_BYTES; j++) begin
      if (5'(j) == first_tok) reach[j] = 1'b1;
      for (int i = 0; i < j; i++) begin
        logic gap_clear;
        gap_clear = 1'b1;
        for (int k = i + 1; k < j; k++) if (abm[i][k]) gap_clear = 1'b0;
        if (reach[i] && abm[i][j] && gap_clear) reach[j] = 1'b1;
      end
    end

    // output addresses; mask padding past the block's uncompressed length
    acc     = 18'(base_q) + 18'(lit_cnt);
    pv      = '0;
    last_i  = '0;
    any_tok = 1'b0;
    any_bad = 1'b0;
    for (int i = 0; i < IN_BYTES; i++) begin
      if (reach[i] && (acc < 18'(raw_eff))) begin
        pv[i]   = 1'b1;
        last_i  = 4'(i);
        any_tok = 1'b1;
        any_bad = any_bad | tok[i].bad;
        if (tok[i].is_copy)
          acc = acc + 18'(tok[i].len);
        else if (i + int'(tok[i].hlen) < IN_BYTES)
          acc = acc + ((18'(tok[i].len) < 18'(IN_BYTES - i - int'(tok[i].hlen))) ?
                       18'(tok[i].len) : 18'(IN_BYTES - i - int'(tok[i].hlen)));
      end
    end

    // slice flag for the next line
    hend     = 6'(last_i) + 6'(tok[last_i].hlen);
    in_slice = '0;
    if (!any_tok) begin
      skip_n = 2'd0;
      lit_n  = lit_eff - 17'(lit_cnt);
    end else if (tok[last_i].is_copy) begin
      skip_n = (hend > 6'(IN_BYTES)) ? 2'(hend - 6'(IN_BYTES)) : 2'd0;
      lit_n  = 17'd0;
    end else if (hend >= 6'(IN_BYTES)) begin
      skip_n = 2'(hend - 6'(IN_BYTES));
      lit_n  = tok[last_i].len;
    end else begin
      skip_n   = 2'd0;
      in_slice = 17'(6'(IN_BYTES) - hend);
      lit_n    = (tok[last_i].len > in_slice) ? tok[last_i].len - in_slice : 17'd0;
    end

  end

  assign emit = (pv != '0) || (lit_cnt != '0);
  assign fire = cur_v && !halt && (cur_last || in_valid) && (slice_ready || !emit);

  assign in_ready    = !halt && (!cur_v || (fire && !cur_last));
  assign slice_valid = cur_v && !halt && (cur_last || in_valid) && emit;
  assign halted      = halt;
  assign raw_len     = raw_q;

  always_comb begin
    slice           = '0;
    slice.bytes     = b;
    slice.pv        = pv;
    slice.lit_start = 5'(skip_eff);
    slice.lit_cnt   = lit_cnt;
    slice.base      = base_q[15:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_v      <= 1'b0;
      cur_last   <= 1'b0;
      cur        <= '0;
      first_line <= 1'b1;
      halt       <= 1'b1;
      skip_q     <= '0;
      lit_rem_q  <= '0;
      base_q     <= '0;
      raw_q      <= '0;
      blk_start  <= 1'b0;
      blk_end    <= 1'b0;
      err        <= 1'b0;
    end else begin
      blk_start <= 1'b0;
      blk_end   <= 1'b0;
      if (resume) halt <= 1'b0;
      if (fire) begin
        cur_v <= 1'b0;
        err   <= err | any_bad;
        if (first_line) begin
          raw_q     <= pre_val;
          blk_start <= 1'b1;
        end
        if (cur_last) begin
          halt       <= 1'b1;
          blk_end    <= 1'b1;
          first_line <= 1'b1;
          skip_q     <= '0;
          lit_rem_q  <= '0;
          base_q     <= '0;
        end else begin
          first_line <= 1'b0;
          skip_q     <= skip_n;
          lit_rem_q  <= lit_n;
          base_q     <= acc[16:0];
        end
      end
      if (in_valid && in_ready) begin
        cur_v    <= 1'b1;
        cur      <= in_data;
        cur_last <= in_last;
      end
    end
  end
endmodule
