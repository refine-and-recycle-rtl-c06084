// snappy_gen_pkg: test-data generator for the Snappy decompressor testbenches.
//
// snappy_block::gen builds one Snappy-compressed block together with its
// uncompressed contents, without a compressor: it draws a random sequence of
// tokens and expands each one as it goes. Literals (tags 0..59 and the 1- and
// 2-extra-byte forms 60 and 61) carry random bytes from a small alphabet;
// copies use the 1-byte-offset form (length 4..11, offset < 2048) or the
// 2-byte-offset form (length 1..64), with offsets drawn from the whole
// history, including offsets shorter than the length (overlapping copies,
// which repeat a pattern). The compressed bytes start with the preamble, a
// base-128 varint of the uncompressed length, and are padded with zero bytes
// to a multiple of 16. Knobs: lit_pct (share of literal tokens), long_pct
// (share of literals longer than 60 bytes), near_pct (share of copies with a
// short offset, 1..16).
package snappy_gen_pkg;

  class snappy_block;
    byte unsigned raw[$];
    byte unsigned comp[$];
    int           n_lit, n_copy, n_long_lit, n_overlap;

    function void put_varint(int unsigned v);
      do begin
        if (v >= 128) comp.push_back(8'(v & 127) | 8'h80);
        else          comp.push_back(8'(v));
        v = v >> 7;
      end while (v != 0);
    endfunction

    function void add_literal(int unsigned len);
      int unsigned m;
      m = len - 1;
      if (m < 60) comp.push_back(8'(m << 2));
      else if (m < 256) begin
        comp.push_back(8'(60 << 2));
        comp.push_back(8'(m));
      end else begin
        comp.push_back(8'(61 << 2));
        comp.push_back(8'(m & 255));
        comp.push_back(8'(m >> 8));
      end
      for (int unsigned i = 0; i < len; i++) begin
        byte unsigned c;
        c = 8'h61 + 8'($urandom_range(0, 11));
        comp.push_back(c);
        raw.push_back(c);
      end
      n_lit++;
      if (len > 60) n_long_lit++;
    endfunction

    function void add_copy(int unsigned len, int unsigned off);
      int unsigned p;
      if (len <= 11 && len >= 4 && off < 2048 && $urandom_range(0, 1) == 1) begin
        comp.push_back(8'(1 | ((len - 4) << 2) | ((off >> 8) << 5)));
        comp.push_back(8'(off & 255));
      end else begin
        comp.push_back(8'(2 | ((len - 1) << 2)));
        comp.push_back(8'(off & 255));
        comp.push_back(8'(off >> 8));
      end
      p = raw.size();
      for (int unsigned i = 0; i < len; i++) raw.push_back(raw[p - off + i]);
      n_copy++;
      if (off < len) n_overlap++;
    endfunction

    function void gen(int unsigned raw_len, int lit_pct, int long_pct, int near_pct);
      int unsigned rem, len, off, pos;
      raw.delete();
      comp.delete();
      n_lit = 0; n_copy = 0; n_long_lit = 0; n_overlap = 0;
      put_varint(raw_len);
      while (raw.size() < raw_len) begin
        pos = raw.size();
        rem = raw_len - pos;
        if (pos == 0 || rem < 4 || $urandom_range(0, 99) < lit_pct) begin
          if ($urandom_range(0, 99) < long_pct) len = $urandom_range(61, 700);
          else                                  len = $urandom_range(1, 20);
          if (len > rem) len = rem;
          add_literal(len);
        end else begin
          len = $urandom_range(4, 64);
          if (len > rem) len = rem;
          if ($urandom_range(0, 99) < near_pct)
            off = $urandom_range(1, (pos < 16) ? pos : 16);
          else
            off = $urandom_range(1, (pos < 65535) ? pos : 65535);
          add_copy(len, off);
        end
      end
      while (comp.size() % 16 != 0) comp.push_back(8'h00);
    endfunction
  endclass

endpackage
