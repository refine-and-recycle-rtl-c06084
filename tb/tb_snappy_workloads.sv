// tb_snappy_workloads: the decompressor at its default configuration on
// synthetic 64KB blocks shaped like the six benchmark files used to evaluate
// the design (Integer, String, Table, Matrix, Wiki, Geo). The files
// themselves are not available, so for each one a block is generated whose
// compression ratio is close to the file's (1.70, 2.45, 2.07, 2.75, 1.97,
// 5.50): the share of literal tokens is lowered step by step until the
// generated block reaches the ratio. Every output byte is checked; the
// decode rate (bytes per cycle from the block's first line to the start of
// its output) and the end-to-end rate are printed next to the published
// FPGA throughput converted to bytes per cycle at 250 MHz. The rate check is
// only that several tokens per cycle are refined: the block's lines are
// taken in at more than 8 output bytes per cycle. The decode rate is printed,
// not checked, since chains of copies that read bytes written by earlier
// copies can keep the execution modules busy well after the last line; the
// synthetic data do not reproduce the real files' token statistics.
module tb_snappy_workloads;
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

  byte unsigned exp_q[$];
  int           got_blocks = 0, bad_lines = 0, last_out_cyc = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int i = 0; i < int'(out_bytes); i++) begin
        if (exp_q.size() == 0 || out_data[8*i +: 8] != exp_q[0]) bad_lines++;
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end
      if (out_last) begin got_blocks++; last_out_cyc = cyc; end
    end
  end

  int dec_start, dec_end;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_parser.blk_start) dec_start = cyc;
    if (dut.ho_start)           dec_end   = cyc;
  end

  task automatic run_file(string name, real ratio, real fpga_gbs);
    snappy_block b;
    int lit, nl, t_in, t_first, want;
    real r, ref_rate;
    b = new();
    lit = 95;
    do begin
      b.gen(65536, lit, (ratio < 2.0) ? 20 : 5, 20);
      r = 65536.0 / real'(b.comp.size());
      lit -= 5;
    end while (r < ratio && lit > 0);
    foreach (b.raw[i]) exp_q.push_back(b.raw[i]);
    bad_lines = 0;
    want = got_blocks + 1;
    nl = b.comp.size() / 16;
    t_in = cyc;
    for (int l = 0; l < nl; l++) begin
      in_valid <= 1'b1;
      for (int i = 0; i < 16; i++) in_data[8*i +: 8] <= b.comp[16*l + i];
      in_last <= (l == nl - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (l == 0) t_first = cyc;
    end
    in_valid <= 1'b0;
    ref_rate = 65536.0 / real'(cyc - t_first + 1);
    while (got_blocks < want) @(posedge clk);
    $display("%-8s target ratio %0.2f generated %0.2f: refine %0.2f, decode %0.2f, end-to-end %0.2f B/cycle (published %0.1f B/cycle)",
             name, ratio, r, ref_rate, 65536.0 / real'(dec_end - dec_start), 65536.0 / real'(last_out_cyc - t_in), fpga_gbs * 4.0);
    checks++;
    if (bad_lines != 0) begin failures++; $display("FAIL %s: %0d bytes differ", name, bad_lines); end
    checks++;
    if (ref_rate <= 8.0) begin failures++; $display("FAIL %s: refine rate %0.2f B/cycle", name, ref_rate); end
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; in_last = 1'b0; out_ready = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run_file("Integer", 1.70, 4.40);
    run_file("String",  2.45, 6.02);
    run_file("Table",   2.07, 6.11);
    run_file("Matrix",  2.75, 4.80);
    run_file("Wiki",    1.97, 5.72);
    run_file("Geo",     5.50, 7.21);
    checks++;
    if (err) begin failures++; $display("FAIL: err flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
