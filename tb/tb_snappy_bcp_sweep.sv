// tb_snappy_bcp_sweep: throughput of the decompressor against the number of
// BRAM command parsers (NBCP = 1 to 8), all other parameters at their
// defaults.
//
// Eight decompressors, one per NBCP value, run side by side on the same
// three synthetic 64KB blocks: one with a compression ratio near 2.75 (like
// the sparse-matrix benchmark) and one near 1.97 (like the wiki dump), both
// with 5% of copies at offsets of 16 or less, and a third near 1.97 with
// 20% such copies. Each instance has its own input driver, fed whenever
// that instance is ready, and its output is always accepted. Every output
// byte is compared with the generator's data.
// Two rates are printed per configuration, also normalised to NBCP = 1:
//   refine rate  output bytes of the block per cycle while its compressed
//                lines are taken in (first line to last line). This is what
//                the number of parsers governs: one parser refines one
//                token per cycle.
//   decode rate  output bytes per cycle from the block's first line to the
//                start of its output pass, i.e. including the time the
//                execution modules need to finish all copies.
// Checks on the refine rate of every block: going from one parser to two
// must raise it by at least 30%, and adding a parser must never lower it by
// more than 10%. More parsers help only up to the number of tokens a
// 16-byte line holds, so the curve is expected to flatten; that is printed,
// not checked. The decode rate is printed, not checked: a copy whose offset
// is shorter than its length reads bytes it writes itself, so it completes
// only a few bytes per trip through the recycle buffer, and a long chain of
// such copies can set the pace of a whole block whatever the number of
// parsers (with more parsers the recycle buffers hold more commands, so
// each trip takes longer).
module tb_snappy_bcp_sweep;
  import snappy_gen_pkg::*;

  localparam int NCFG = 8;
  localparam int NBLK = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  snappy_block blk [NBLK];
  logic        go = 1'b0;
  real         rate [NCFG][NBLK];   // decode rate
  real         rrate [NCFG][NBLK];  // refine rate
  int          finished = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic         in_valid = 1'b0, in_ready, in_last = 1'b0;
    logic [127:0] in_data = '0;
    logic         out_valid, out_ready, out_last;
    logic [511:0] out_data;
    logic [6:0]   out_bytes;
    logic         err;

    assign out_ready = 1'b1;

    snappy_decompressor #(.NBCP(g + 1)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last,
      .out_valid, .out_ready, .out_data, .out_bytes, .out_last, .err
    );

    // output checker: block index = number of blocks already completed
    int got = 0, pos = 0, bad = 0;
    always @(posedge clk) begin
      if (rst_n && out_valid && out_ready) begin
        for (int i = 0; i < int'(out_bytes); i++) begin
          if (got >= NBLK || pos >= blk[got].raw.size() ||
              out_data[8*i +: 8] != blk[got].raw[pos]) bad++;
          pos++;
        end
        if (out_last) begin got++; pos = 0; end
      end
    end

    int dec_start = 0, dec_end = 0;
    always @(posedge clk) if (rst_n) begin
      if (dut.u_parser.blk_start) dec_start = cyc;
      if (dut.ho_start)           dec_end   = cyc;
    end

    initial begin
      int nl, t0;
      wait (go);
      for (int f = 0; f < NBLK; f++) begin
        nl = blk[f].comp.size() / 16;
        for (int l = 0; l < nl; l++) begin
          in_valid <= 1'b1;
          for (int i = 0; i < 16; i++) in_data[8*i +: 8] <= blk[f].comp[16*l + i];
          in_last <= (l == nl - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          if (l == 0) t0 = cyc;
        end
        in_valid <= 1'b0;
        rrate[g][f] = real'(blk[f].raw.size()) / real'(cyc - t0 + 1);
        while (got < f + 1) @(posedge clk);
        rate[g][f] = real'(blk[f].raw.size()) / real'(dec_end - dec_start);
      end
      finished++;
    end
  end

  // generate a 64KB block whose compression ratio reaches the target
  function automatic snappy_block make_block(real ratio, int near_pct);
    snappy_block b;
    int lit = 95;
    real r;
    b = new();
    do begin
      b.gen(65536, lit, (ratio < 2.0) ? 20 : 5, near_pct);
      r = 65536.0 / real'(b.comp.size());
      lit -= 5;
    end while (r < ratio && lit > 0);
    $display("block: target ratio %0.2f generated %0.2f, %0d literals, %0d copies, %0d overlapping",
             ratio, r, b.n_lit, b.n_copy, b.n_overlap);
    return b;
  endfunction

  int bads [NCFG];
  int errs [NCFG];
  for (genvar g = 0; g < NCFG; g++) begin : g_mon
    assign bads[g] = g_cfg[g].bad;
    assign errs[g] = int'(g_cfg[g].err);
  end

  initial begin
    string names [NBLK] = '{"Matrix-like", "Wiki-like", "Short-offset-heavy"};
    blk[0] = make_block(2.75, 5);
    blk[1] = make_block(1.97, 5);
    blk[2] = make_block(1.97, 20);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    go = 1'b1;
    wait (finished == NCFG);
    for (int f = 0; f < NBLK; f++) begin
      $display("%s block: refine and decode rate by number of parsers", names[f]);
      for (int g = 0; g < NCFG; g++)
        $display("  NBCP=%0d  refine %6.2f B/cycle (x%0.2f)  decode %6.2f B/cycle (x%0.2f)",
                 g + 1, rrate[g][f], rrate[g][f] / rrate[0][f], rate[g][f], rate[g][f] / rate[0][f]);
      checks++;
      if (rrate[1][f] < 1.3 * rrate[0][f]) begin
        failures++;
        $display("FAIL %s: two parsers refine %0.2f, one %0.2f", names[f], rrate[1][f], rrate[0][f]);
      end
      for (int g = 1; g < NCFG; g++) begin
        checks++;
        if (rrate[g][f] < 0.9 * rrate[g-1][f]) begin
          failures++;
          $display("FAIL %s: NBCP=%0d refines slower than NBCP=%0d", names[f], g + 1, g);
        end
      end
    end
    for (int g = 0; g < NCFG; g++) begin
      checks++;
      if (bads[g] != 0) begin failures++; $display("FAIL NBCP=%0d: %0d bytes differ", g + 1, bads[g]); end
      checks++;
      if (errs[g] != 0) begin failures++; $display("FAIL NBCP=%0d: err flag", g + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
