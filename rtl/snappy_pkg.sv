// snappy_pkg: types and constants shared by the Snappy decompressor.
//
// The 64KB history of one Snappy block is striped over NBANK = 16 BRAM banks
// of 512 lines x 8 bytes. A byte address a[15:0] maps to global line a[15:3],
// bank a[6:3] and bank line a[15:7], so consecutive 8-byte lines fall into
// consecutive banks. Commands that travel between the pipeline stages are
// packed structs defined here: a BRAM write command (one line, byte mask),
// a BRAM copy command (one read of up to 8 bytes of one source line) and the
// slice that the slice parser hands to a BRAM command parser.
// The bank geometry and the 16B line / 2B lookahead come from the design
// description; field widths are chosen to fit a 64KB block.
package snappy_pkg;

  localparam int NBANK       = 16;   // BRAM banks = execution modules
  localparam int LINE_BYTES  = 8;    // data bytes per BRAM line
  localparam int BANK_LINES  = 512;  // lines per bank (4KB)
  localparam int LINE_AW     = 9;    // bank line address width
  localparam int BANK_AW     = 4;    // bank address width
  localparam int ADDR_W      = 16;   // byte address inside a 64KB block
  localparam int IN_BYTES    = 16;   // input line width
  localparam int LOOK_BYTES  = 2;    // lookahead taken from the next line
  localparam int SLICE_BYTES = IN_BYTES + LOOK_BYTES;
  localparam int NWFIFO      = 4;    // write command FIFOs per BCP
  localparam int OUT_BYTES   = 64;   // output line width

  // One BRAM write: data lanes and per-lane enable for one global line.
  typedef struct packed {
    logic [BANK_AW-1:0]     bank;
    logic [LINE_AW-1:0]     line;
    logic [LINE_BYTES-1:0]  mask;
    logic [LINE_BYTES*8-1:0] data;   // lane j in data[8*j +: 8]
  } wr_cmd_t;

  // One BRAM copy: read len bytes from (bank,line) starting at lane off and
  // write them to byte address dst onwards.
  typedef struct packed {
    logic [BANK_AW-1:0] bank;
    logic [LINE_AW-1:0] line;
    logic [2:0]         off;
    logic [3:0]         len;   // 1..8
    logic [ADDR_W-1:0]  dst;
  } cp_cmd_t;

  // A parsed slice: 16 line bytes plus 2 lookahead bytes and boundary info.
  typedef struct packed {
    logic [SLICE_BYTES-1:0][7:0] bytes;    // bytes[i] is byte i of the slice
    logic [IN_BYTES-1:0]         pv;       // position vector: token starts
    logic [4:0]                  lit_start; // first literal-continuation byte
    logic [4:0]                  lit_cnt;   // literal-continuation byte count
    logic [ADDR_W-1:0]           base;      // output address of first output byte
  } slice_t;

  localparam int WR_W    = $bits(wr_cmd_t);
  localparam int CP_W    = $bits(cp_cmd_t);
  localparam int SLICE_W = $bits(slice_t);

  // Decoded Snappy token header (tag byte plus up to two extra bytes).
  typedef struct packed {
    logic        is_copy;
    logic [1:0]  hlen;     // header bytes: 1..3
    logic [16:0] len;      // literal length 1..65536 or copy length 4..64
    logic [15:0] offset;   // copy offset
    logic        bad;      // tag kind this decoder does not take (see below)
  } token_t;

  // Decode the token whose tag is b0, with the two bytes after it.
  // Literal lengths up to 65536 (tags 0..61) and copies with 1- and 2-byte
  // offsets are decoded; 4-byte-offset copies and literal tags 62/63 cannot
  // occur in a 64KB block and are flagged as bad.
  function automatic token_t decode_token(logic [7:0] b0, logic [7:0] b1, logic [7:0] b2);
    token_t t;
    t = '0;
    unique case (b0[1:0])
      2'b00: begin
        t.is_copy = 1'b0;
        if (b0[7:2] < 6'd60) begin
          t.hlen = 2'd1;
          t.len  = 17'(b0[7:2]) + 17'd1;
        end else if (b0[7:2] == 6'd60) begin
          t.hlen = 2'd2;
          t.len  = 17'(b1) + 17'd1;
        end else begin
          t.hlen = 2'd3;
          t.len  = 17'({b2, b1}) + 17'd1;
          t.bad  = (b0[7:2] != 6'd61);
        end
      end
      2'b01: begin
        t.is_copy = 1'b1;
        t.hlen    = 2'd2;
        t.len     = 17'(b0[4:2]) + 17'd4;
        t.offset  = {5'd0, b0[7:5], b1};
      end
      2'b10: begin
        t.is_copy = 1'b1;
        t.hlen    = 2'd3;
        t.len     = 17'(b0[7:2]) + 17'd1;
        t.offset  = {b2, b1};
      end
      default: begin
        t.is_copy = 1'b1;
        t.hlen    = 2'd3;
        t.len     = 17'(b0[7:2]) + 17'd1;
        t.offset  = {b2, b1};
        t.bad     = 1'b1;
      end
    endcase
    return t;
  endfunction

endpackage
