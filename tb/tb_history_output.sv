// tb_history_output: checks the output-and-clear unit with a model of the
// 16 history banks (one-cycle read latency, read-first, clear = write zero).
// After reset the unit must clear every line of every bank in 512 cycles
// and pulse done. Then the banks are filled with random data and blocks of
// several lengths are output: each 64-byte line must hold global lines
// 8o..8o+7 in order, out_bytes must be 64 except in the last line, out_last
// must mark the last line, every line read must be cleared and no other
// line touched. With output always accepted the unit must deliver one line
// per cycle; a second run applies random backpressure.
module tb_history_output;
  import snappy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done;
  logic [16:0]       raw_len;
  logic [NBANK-1:0]  clr, rd;
  logic [8:0]        line;
  logic [63:0]       bank_rdata [NBANK];
  logic              out_valid, out_ready, out_last;
  logic [511:0]      out_data;
  logic [6:0]        out_bytes;

  history_output dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [63:0] mem [NBANK][512];
  logic [63:0] ref_mem [NBANK][512];
  int bp_pct = 0;

  always @(posedge clk) begin
    cyc++;
    for (int k = 0; k < NBANK; k++) begin
      if (rd[k])  bank_rdata[k] <= mem[k][line];
      if (clr[k]) mem[k][line]  <= '0;
    end
  end

  task automatic run(int len);
    int nl, o, t0, t1, bad;
    nl = (len + 63) / 64;
    for (int k = 0; k < NBANK; k++) for (int l = 0; l < 512; l++) begin
      mem[k][l] = {$urandom, $urandom};
      ref_mem[k][l] = mem[k][l];
    end
    @(negedge clk); start = 1; raw_len = 17'(len);
    @(negedge clk); start = 0;
    o = 0; t0 = -1; t1 = 0;
    while (!done) begin
      out_ready = ($urandom_range(0, 99) >= bp_pct);
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (t0 < 0) t0 = cyc;
        t1 = cyc;
        bad = 0;
        for (int j = 0; j < 8; j++) begin
          int g;
          g = 8 * o + j;
          if (out_data[64*j +: 64] != ref_mem[g % 16][g / 16]) bad++;
        end
        checks++;
        if (bad != 0 || int'(out_bytes) != ((len - 64 * o >= 64) ? 64 : len - 64 * o) || out_last != (o == nl - 1)) begin
          failures++; $display("FAIL len %0d line %0d: %0d words differ, bytes %0d last %0d", len, o, bad, out_bytes, out_last);
        end
        o++;
      end
      @(negedge clk);
    end
    checks++;
    if (o != nl) begin failures++; $display("FAIL len %0d: %0d lines, expected %0d", len, o, nl); end
    bad = 0;
    for (int g = 0; g < 8192; g++)
      if (mem[g % 16][g / 16] != ((g < 8 * nl) ? 64'd0 : ref_mem[g % 16][g / 16])) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL len %0d: %0d lines wrongly cleared or kept", len, bad); end
    if (bp_pct == 0 && nl > 1) begin
      checks++;
      if (t1 - t0 != nl - 1) begin failures++; $display("FAIL len %0d: %0d lines in %0d cycles", len, nl, t1 - t0 + 1); end
    end
  endtask

  initial begin
    int t0, bad;
    start = 0; raw_len = 0; out_ready = 1;
    for (int k = 0; k < NBANK; k++) for (int l = 0; l < 512; l++) mem[k][l] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = cyc;
    while (!done) @(posedge clk);
    checks++;
    if (cyc - t0 != 512) begin failures++; $display("FAIL: clear took %0d cycles", cyc - t0); end
    bad = 0;
    for (int k = 0; k < NBANK; k++) for (int l = 0; l < 512; l++) if (mem[k][l] != 0) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: %0d lines not cleared", bad); end
    run(65536);
    run(1000);
    run(64);
    run(0);
    bp_pct = 40;
    run(5000);
    run(129);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
