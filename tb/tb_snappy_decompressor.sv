// tb_snappy_decompressor: end-to-end test of the Snappy decompressor.
//
// Generates Snappy blocks of several sizes and token mixes (see
// snappy_gen_pkg), feeds them as 16-byte lines with random input gaps,
// drains the 64-byte output lines with random backpressure and compares
// every output byte, each line's byte count and the last-line flag with the
// generator's uncompressed data. Small FIFOs and a low recycle threshold are
// used so that every mechanism of the design is exercised; the monitors
// count how often each happened and a mechanism that never happened counts
// as a failure: copy hit, partial hit and miss (recycling), recycle buffer
// at its threshold (recycle priority), generated write chosen over a waiting
// parser write, parser stalled on a full command FIFO, slice arbiter
// finding the preferred parser busy, literal continuing into later slices,
// header bytes spilling into the next line, padding tokens masked,
// output backpressure. It also reports the decode rate in output bytes per
// cycle and checks that the parser never took more than one 16-byte line
// per cycle.
module tb_snappy_decompressor;
  import snappy_gen_pkg::*;

  localparam int NBCP = 6;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid, in_ready, in_last;
  logic [127:0] in_data;
  logic         out_valid, out_ready, out_last;
  logic [511:0] out_data;
  logic [6:0]   out_bytes;
  logic         err;

  always #5 clk = ~clk;

  snappy_decompressor #(
    .NBCP(NBCP), .BCP_FIFO_DEPTH(2), .RC_DEPTH(64), .RC_THRESH(3), .GW_DEPTH(4)
  ) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- mechanism monitors ----------------
  int rcc[16];
  int c_hit[16], c_part[16], c_miss[16], c_rcprio[16], c_genwin[16];
  int c_bcpstall[NBCP];
  int c_arbskip = 0, c_litcont = 0, c_spill = 0, c_pad = 0, c_outbp = 0, c_lines = 0;

  for (genvar k = 0; k < 16; k++) begin : g_mon
    initial begin c_hit[k] = 0; c_part[k] = 0; c_miss[k] = 0; c_rcprio[k] = 0; c_genwin[k] = 0; end
    always @(posedge clk) rcc[k] = int'(dut.g_bank[k].rc_count);
    always @(posedge clk) if (rst_n) begin
      if (dut.g_bank[k].hit)      c_hit[k]++;
      if (dut.g_bank[k].part_hit) c_part[k]++;
      if (dut.g_bank[k].miss)     c_miss[k]++;
      if (dut.g_bank[k].rc_priority && !dut.g_bank[k].rc_empty) c_rcprio[k]++;
      if (dut.g_bank[k].from_recycle && (dut.g_bank[k].ws_bempty != '1)) c_genwin[k]++;
    end
  end
  for (genvar p = 0; p < NBCP; p++) begin : g_bmon
    initial c_bcpstall[p] = 0;
    always @(posedge clk) if (rst_n)
      if (dut.g_bcp[p].u_bcp.sl_v && !dut.g_bcp[p].u_bcp.fire) c_bcpstall[p]++;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.sl_valid && dut.sl_ready && !dut.bcp_sl_ready[dut.u_arb.rr]) c_arbskip++;
    if (dut.u_parser.fire && dut.u_parser.lit_cnt != 0) c_litcont++;
    if (dut.u_parser.fire && dut.u_parser.skip_eff != 0 && !dut.u_parser.first_line) c_spill++;
    if (dut.u_parser.fire && (dut.u_parser.reach & ~dut.u_parser.pv) != 0) c_pad++;
    if (out_valid && !out_ready) c_outbp++;
    if (in_valid && in_ready) c_lines++;
  end

  // ---------------- stimulus ----------------
  snappy_block blk;
  byte unsigned exp_q[$];
  int unsigned  len_q[$];      // uncompressed length of each block sent
  int unsigned  rem = 0;       // bytes left in the block being output
  logic         in_blk = 1'b0;
  int           exp_blocks = 0;
  int           got_blocks = 0;
  int           stall_pct = 20;
  int           bp_pct    = 20;

  task automatic send_block(snappy_block b);
    int nl;
    nl = b.comp.size() / 16;
    for (int l = 0; l < nl; l++) begin
      while ($urandom_range(0, 99) < stall_pct) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      for (int i = 0; i < 16; i++) in_data[8*i +: 8] <= b.comp[16*l + i];
      in_last <= (l == nl - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
  endtask

  // ---------------- output checker ----------------
  int out_line_in_blk = 0;
  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 99) >= bp_pct);
    if (rst_n && out_valid && out_ready) begin
      int n, bad;
      if (!in_blk) begin
        rem    = len_q.pop_front();
        in_blk = 1'b1;
      end
      n   = (rem >= 64) ? 64 : rem;
      rem = rem - n;
      bad = 0;
      checks++;
      if (int'(out_bytes) != n) begin
        failures++;
        $display("FAIL block %0d line %0d: out_bytes %0d expected %0d", got_blocks, out_line_in_blk, out_bytes, n);
      end
      for (int i = 0; i < n; i++) begin
        if (out_data[8*i +: 8] != exp_q[0]) bad++;
        void'(exp_q.pop_front());
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL block %0d line %0d: %0d bytes differ", got_blocks, out_line_in_blk, bad);
      end
      checks++;
      if (out_last != (rem == 0)) begin
        failures++;
        $display("FAIL block %0d line %0d: out_last %0d", got_blocks, out_line_in_blk, out_last);
      end
      out_line_in_blk++;
      if (rem == 0) in_blk = 1'b0;
      if (out_last) begin
        got_blocks++;
        out_line_in_blk = 0;
      end
    end
  end

  // decode rate: bytes written per cycle while the parser is running
  int dec_cycles = 0, dec_bytes = 0;
  always @(posedge clk) if (rst_n && int'(dut.ctl) == 1 && dut.len_known && !dut.ho_start) begin
    dec_cycles++;
    dec_bytes += int'(dut.wsum);
  end

  task automatic run_block(int unsigned raw_len, int lit_pct, int long_pct, int near_pct);
    blk.gen(raw_len, lit_pct, long_pct, near_pct);
    foreach (blk.raw[i]) exp_q.push_back(blk.raw[i]);
    len_q.push_back(raw_len);
    exp_blocks++;
    $display("block %0d: %0d raw bytes, %0d compressed, %0d literals (%0d long), %0d copies (%0d overlapping)",
             exp_blocks - 1, raw_len, blk.comp.size(), blk.n_lit, blk.n_long_lit, blk.n_copy, blk.n_overlap);
    send_block(blk);
  endtask

  initial begin
    int t0, sum;
    in_valid = 1'b0; in_data = '0; in_last = 1'b0; out_ready = 1'b0;
    blk = new();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run_block(1, 50, 0, 30);
    run_block(100, 50, 0, 30);
    run_block(3000, 40, 5, 30);
    stall_pct = 0; bp_pct = 0;
    run_block(6000, 30, 10, 60);
    run_block(5000, 70, 0, 10);
    stall_pct = 30; bp_pct = 50;
    run_block(2049, 20, 0, 80);
    // wait for all outputs
    t0 = cyc;
    while (got_blocks < exp_blocks && cyc - t0 < 200000) @(posedge clk);
    checks++;
    if (got_blocks != exp_blocks) begin
      failures++;
      $display("FAIL: %0d of %0d blocks came out", got_blocks, exp_blocks);
    end
    checks++;
    if (err) begin failures++; $display("FAIL: err flag set"); end

    // the parser takes at most one 16-byte line per cycle
    checks++;
    if (c_lines > cyc) failures++;

    $display("decode: %0d bytes in %0d cycles = %0.2f B/cycle", dec_bytes, dec_cycles,
             real'(dec_bytes) / real'(dec_cycles));
    begin
      int h = 0, pa = 0, m = 0, rp = 0, gwn = 0, bs = 0;
      for (int k = 0; k < 16; k++) begin
        h += c_hit[k]; pa += c_part[k]; m += c_miss[k]; rp += c_rcprio[k]; gwn += c_genwin[k];
      end
      for (int p = 0; p < NBCP; p++) bs += c_bcpstall[p];
      $display("mechanisms: hit=%0d partial=%0d miss=%0d recycle_prio=%0d genwrite_won=%0d bcp_stall=%0d arb_skip=%0d lit_cont=%0d spill=%0d pad=%0d out_bp=%0d",
               h, pa, m, rp, gwn, bs, c_arbskip, c_litcont, c_spill, c_pad, c_outbp);
      sum = 0;
      foreach (c_bcpstall[p]) if (c_bcpstall[p] == 0) sum++;
      checks++; if (h == 0)         begin failures++; $display("FAIL: no copy hit"); end
      checks++; if (pa == 0)        begin failures++; $display("FAIL: no partial hit"); end
      checks++; if (m == 0)         begin failures++; $display("FAIL: no miss"); end
      checks++; if (rp == 0)        begin failures++; $display("FAIL: recycle priority never taken"); end
      checks++; if (gwn == 0)       begin failures++; $display("FAIL: generated write never beat a parser write"); end
      checks++; if (bs == 0)        begin failures++; $display("FAIL: no parser stall"); end
      checks++; if (sum != 0)       begin failures++; $display("FAIL: %0d parsers never worked", sum); end
      checks++; if (c_arbskip == 0) begin failures++; $display("FAIL: arbiter never skipped a busy parser"); end
      checks++; if (c_litcont == 0) begin failures++; $display("FAIL: no literal continuation"); end
      checks++; if (c_spill == 0)   begin failures++; $display("FAIL: no header spill"); end
      checks++; if (c_pad == 0)     begin failures++; $display("FAIL: no padding masked"); end
      checks++; if (c_outbp == 0)   begin failures++; $display("FAIL: no output backpressure"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("ctl=%0d written=%0d raw=%0d halted=%0d bcp_busy=%b em_busy=%b", dut.ctl, dut.written, dut.sp_raw_len, dut.sp_halted, dut.bcp_busy, dut.em_busy);
    for (int k = 0; k < 16; k++) $display("bank %0d rc_count=%0d", k, rcc[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
