// tb_snappy_full: the Snappy decompressor at its default configuration
// (6 BRAM command parsers, 16 banks, 512-entry recycle buffers) on two full
// 64KB blocks, the block size Snappy uses, and one short block.
//
// The first 64KB block has a token mix with mostly copies (compression
// ratio around 2-3), the second is literal-heavy with long literals. Input
// lines are offered every cycle and output is always accepted, so the
// measured rates are the design's own: decode rate (history bytes written
// per cycle from the first line of a block to its last byte) and end-to-end
// rate including the output pass. Every output byte is compared with the
// generator's data. The rate check is that a block never decodes faster than
// the parser's 16 compressed bytes per cycle allow, and that the lines of a
// 64KB block are taken in at more than 8 output bytes per cycle (refine
// rate), i.e. that several tokens per cycle are refined. The decode rate is
// printed but not checked: it also depends on chains of copies that read
// bytes written by earlier copies, and those can keep the execution modules
// busy after the last line has been taken in.
module tb_snappy_full;
  import snappy_gen_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid, in_ready, in_last;
  logic [127:0] in_data;
  logic         out_valid, out_ready, out_last;
  logic [511:0] out_data;
  logic [6:0]   out_bytes;
  logic         err;

  always #5 clk = ~clk;

  snappy_decompressor dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  snappy_block  blk;
  byte unsigned exp_q[$];
  int unsigned  len_q[$];
  int unsigned  rem = 0;
  logic         in_blk = 1'b0;
  int           got_blocks = 0;
  int           first_in_cyc, last_out_cyc;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int n, bad;
      if (!in_blk) begin
        rem    = len_q.pop_front();
        in_blk = 1'b1;
      end
      n   = (rem >= 64) ? 64 : rem;
      rem = rem - n;
      bad = 0;
      for (int i = 0; i < n; i++) begin
        if (out_data[8*i +: 8] != exp_q[0]) bad++;
        void'(exp_q.pop_front());
      end
      checks++;
      if (bad != 0 || int'(out_bytes) != n || out_last != (rem == 0)) begin
        failures++;
        $display("FAIL block %0d: %0d bytes differ, out_bytes %0d, out_last %0d", got_blocks, bad, out_bytes, out_last);
      end
      if (rem == 0) in_blk = 1'b0;
      if (out_last) begin
        got_blocks++;
        last_out_cyc = cyc;
      end
    end
  end

  // decode window: from the first accepted line to the start of the output pass
  int dec_start, dec_end;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_parser.blk_start) dec_start = cyc;
    if (dut.ho_start)           dec_end   = cyc;
  end

  task automatic run_block(int unsigned raw_len, int lit_pct, int long_pct, int near_pct, bit check_rate);
    int nl, t0, t_first, want;
    real dec_rate, e2e_rate, ref_rate, ratio;
    blk.gen(raw_len, lit_pct, long_pct, near_pct);
    foreach (blk.raw[i]) exp_q.push_back(blk.raw[i]);
    len_q.push_back(raw_len);
    ratio = real'(raw_len) / real'(blk.comp.size());
    nl = blk.comp.size() / 16;
    want = got_blocks + 1;
    first_in_cyc = cyc;
    for (int l = 0; l < nl; l++) begin
      in_valid <= 1'b1;
      for (int i = 0; i < 16; i++) in_data[8*i +: 8] <= blk.comp[16*l + i];
      in_last <= (l == nl - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (l == 0) t_first = cyc;
    end
    in_valid <= 1'b0;
    t0 = cyc;
    ref_rate = real'(raw_len) / real'(cyc - t_first + 1);
    while (got_blocks < want && cyc - t0 < 300000) @(posedge clk);
    dec_rate = real'(raw_len) / real'(dec_end - dec_start);
    e2e_rate = real'(raw_len) / real'(last_out_cyc - first_in_cyc);
    $display("block: %0d raw bytes, ratio %0.2f, %0d tokens: refine %0.2f B/cycle, decode %0d cycles (%0.2f B/cycle), end-to-end %0.2f B/cycle",
             raw_len, ratio, blk.n_lit + blk.n_copy, ref_rate, dec_end - dec_start, dec_rate, e2e_rate);
    checks++;
    if (got_blocks != want) begin failures++; $display("FAIL: block did not come out"); end
    checks++;
    if ((dec_end - dec_start) * 16 < blk.comp.size() - 16) begin
      failures++; $display("FAIL: decoded faster than 16 input bytes per cycle");
    end
    if (check_rate) begin
      checks++;
      if (ref_rate <= 8.0) begin failures++; $display("FAIL: refine rate %0.2f B/cycle", ref_rate); end
    end
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; in_last = 1'b0; out_ready = 1'b1;
    blk = new();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run_block(65536, 25, 5, 20, 1'b1);
    run_block(65536, 60, 30, 10, 1'b1);
    run_block(777, 40, 5, 30, 1'b0);
    checks++;
    if (err) begin failures++; $display("FAIL: err flag set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
