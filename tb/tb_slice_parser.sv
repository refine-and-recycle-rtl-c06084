// tb_slice_parser: checks the slice parser against a software token walk.
//
// Snappy blocks from snappy_gen_pkg are fed line by line. The reference
// walks the compressed bytes token by token and works out, per 16-byte
// line, the Position Vector (token starts in the line), the literal bytes at
// the line's start that continue an earlier literal, the output address
// reached at the start of the line, and whether the line yields a slice at
// all. Every emitted slice, its 18 bytes (16 + 2 lookahead), the
// uncompressed length and the block start/end pulses are compared. The
// first blocks run with input always valid and slices always accepted and
// must take exactly one cycle per line; later blocks add random stalls on
// both sides.
module tb_slice_parser;
  import snappy_pkg::*;
  import snappy_gen_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid, in_ready, in_last, resume, halted;
  logic [IN_BYTES-1:0][7:0] in_data;
  logic                     blk_start, blk_end, err;
  logic [16:0]              raw_len;
  logic                     slice_valid, slice_ready;
  slice_t                   slice;

  slice_parser dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  slice_t exp_q[$];
  int     stall_pct = 0, bp_pct = 0;
  int     n_start = 0, n_end = 0;

  // reference: expected slices of one block
  task automatic build_expected(snappy_block b);
    int nl, pos, out, p0;
    int contrib[];
    int lo, hi, h, len;
    bit is_copy;
    slice_t s;
    logic [15:0] pv [];
    int lcs[], lcn[];
    nl = b.comp.size() / 16;
    contrib = new[nl]; pv = new[nl]; lcs = new[nl]; lcn = new[nl];
    foreach (contrib[l]) begin contrib[l] = 0; pv[l] = '0; lcs[l] = 0; lcn[l] = 0; end
    pos = 0;
    while (b.comp[pos] >= 128) pos++;
    pos++;
    out = 0;
    while (out < b.raw.size()) begin
      logic [7:0] t;
      t = b.comp[pos];
      is_copy = (t[1:0] != 2'b00);
      if (t[1:0] == 2'b01)      begin h = 2; len = 4 + int'(t[4:2]); end
      else if (t[1:0] == 2'b10) begin h = 3; len = int'(t[7:2]) + 1; end
      else if (t[7:2] < 60)     begin h = 1; len = int'(t[7:2]) + 1; end
      else if (t[7:2] == 60)    begin h = 2; len = int'(b.comp[pos+1]) + 1; end
      else                      begin h = 3; len = int'(b.comp[pos+1]) + 256 * int'(b.comp[pos+2]) + 1; end
      pv[pos / 16][pos % 16] = 1'b1;
      if (is_copy) contrib[pos / 16] += len;
      else begin
        for (int c = pos + h; c < pos + h + len; c++) contrib[c / 16]++;
        p0 = pos;
        for (int l = p0 / 16 + 1; l < nl; l++) begin
          lo = (p0 + h > 16 * l) ? p0 + h : 16 * l;
          hi = (p0 + h + len < 16 * l + 16) ? p0 + h + len : 16 * l + 16;
          if (hi > lo) begin lcs[l] = lo - 16 * l; lcn[l] = hi - lo; end
        end
      end
      pos += is_copy ? h : h + len;
      out += len;
    end
    out = 0;
    for (int l = 0; l < nl; l++) begin
      if (pv[l] != 0 || lcn[l] != 0) begin
        s = '0;
        for (int i = 0; i < 16; i++) s.bytes[i] = b.comp[16 * l + i];
        s.bytes[16] = (l + 1 < nl) ? b.comp[16 * l + 16] : 8'h00;
        s.bytes[17] = (l + 1 < nl) ? b.comp[16 * l + 17] : 8'h00;
        s.pv        = pv[l];
        s.lit_start = 5'(lcs[l]);
        s.lit_cnt   = 5'(lcn[l]);
        s.base      = 16'(out);
        exp_q.push_back(s);
      end
      out += contrib[l];
    end
  endtask

  always @(posedge clk) begin
    slice_ready <= ($urandom_range(0, 99) >= bp_pct);
    if (rst_n && slice_valid && slice_ready) begin
      slice_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected slice");
      end else begin
        e = exp_q.pop_front();
        if (slice.pv != e.pv || slice.base != e.base || slice.lit_cnt != e.lit_cnt ||
            (e.lit_cnt != 0 && slice.lit_start != e.lit_start) || slice.bytes != e.bytes) begin
          failures++;
          $display("FAIL slice: pv %h/%h base %0d/%0d lit %0d+%0d / %0d+%0d", slice.pv, e.pv,
                   slice.base, e.base, slice.lit_start, slice.lit_cnt, e.lit_start, e.lit_cnt);
        end
      end
    end
    if (rst_n && blk_start) n_start++;
    if (rst_n && blk_end)   n_end++;
  end

  task automatic run_block(int unsigned raw, int lit_pct, int long_pct, int near_pct);
    snappy_block b;
    int nl, t_first, t_last;
    b = new();
    b.gen(raw, lit_pct, long_pct, near_pct);
    build_expected(b);
    nl = b.comp.size() / 16;
    @(negedge clk); resume = 1; @(negedge clk); resume = 0;
    for (int l = 0; l < nl; l++) begin
      while ($urandom_range(0, 99) < stall_pct) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int i = 0; i < 16; i++) in_data[i] = b.comp[16 * l + i];
      in_last = (l == nl - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (l == 0) t_first = cyc;
      t_last = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || !halted) begin
      failures++; $display("FAIL: %0d slices missing, halted %0d", exp_q.size(), halted);
    end
    checks++;
    if (raw_len != 17'(raw)) begin failures++; $display("FAIL: raw_len %0d expected %0d", raw_len, raw); end
    if (stall_pct == 0 && bp_pct == 0) begin
      checks++;
      if (t_last - t_first != nl - 1) begin
        failures++; $display("FAIL: %0d lines took %0d cycles", nl, t_last - t_first + 1);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0; in_last = 0; resume = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(5, 50, 0, 30);
    run_block(4000, 40, 10, 30);
    run_block(65536, 30, 5, 20);
    stall_pct = 30; bp_pct = 30;
    run_block(3000, 60, 20, 30);
    run_block(200, 10, 0, 90);
    run_block(0, 50, 0, 30);
    checks++;
    if (n_start != 6 || n_end != 6 || err) begin
      failures++; $display("FAIL: %0d starts, %0d ends, err %0d", n_start, n_end, err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
