// tb_bram_command_parser: checks that a BRAM command parser turns the tokens
// of a slice into exactly the right BRAM commands.
//
// Random slices are built directly: a random output base address, an
// optional literal continuation at the slice start, then literal and copy
// tokens (1- and 2-byte-offset copies, lengths up to 64, offsets up to the
// base, overlapping ones included) until the slice is full; the last token
// may run past the slice. The reference keeps, per output byte, the literal
// data or the copy source address. All commands are popped from the FIFOs
// and expanded byte by byte into the same two maps, which must match
// exactly (no byte missing, none twice). Each command must sit in the right
// FIFO (write: global line mod 4, copy: source bank), touch one line only,
// and per token at most 3 write or 9 copy commands may appear. With every
// FIFO drained each cycle, the parser must take one token per cycle: the
// slices are accepted exactly one cycle per item apart. A second phase pops
// rarely so the FIFOs fill and the parser must stall without losing
// commands.
module tb_bram_command_parser;
  import snappy_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              slice_valid, slice_ready, busy;
  slice_t            slice;
  wr_cmd_t           wr_head [NWFIFO];
  logic [NWFIFO-1:0] wr_empty, wr_pop;
  cp_cmd_t           cp_head [NBANK];
  logic [NBANK-1:0]  cp_empty, cp_pop;

  bram_command_parser #(.FIFO_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // reference maps: output address -> literal byte / copy source address
  byte unsigned exp_lit[int], got_lit[int];
  int           exp_src[int], got_src[int];
  int           pop_pct = 100;
  int           next_base = 0;
  int           n_wr = 0, n_cp = 0, dup = 0, misplaced = 0;

  // build one random slice; returns the number of items (tokens + continuation)
  function automatic int make_slice(output slice_t s, input int base_in = -1);
    int p, addr, items, len, off, h, cs, n;
    s = '0;
    for (int i = 0; i < 18; i++) s.bytes[i] = 8'($urandom);
    addr   = (base_in < 0) ? $urandom_range(200, 60000) : base_in;
    s.base = 16'(addr);
    items  = 0;
    s.lit_start = 5'($urandom_range(0, 2));
    s.lit_cnt   = ($urandom_range(0, 2) == 0) ? 5'($urandom_range(1, 16 - int'(s.lit_start))) : 5'd0;
    for (int i = 0; i < int'(s.lit_cnt); i++) exp_lit[addr + i] = s.bytes[int'(s.lit_start) + i];
    addr += int'(s.lit_cnt);
    if (s.lit_cnt != 0) items++;
    p = int'(s.lit_start) + int'(s.lit_cnt);
    while (p < 16) begin
      s.pv[p] = 1'b1;
      items++;
      if ($urandom_range(0, 1) == 0) begin
        len = $urandom_range(1, 14);
        if ($urandom_range(0, 3) == 0) begin
          h = 2; s.bytes[p] = 8'(60 << 2); s.bytes[p+1] = 8'(len - 1);
        end else begin
          h = 1; s.bytes[p] = 8'((len - 1) << 2);
        end
        cs = p + h;
        n = 0;
        for (int c = cs; c < cs + len && c < 16; c++) begin
          exp_lit[addr + n] = s.bytes[c];
          n++;
        end
        addr += n;
        p = cs + len;
      end else begin
        off = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 10) : $urandom_range(1, addr);
        if (off <= 2047 && $urandom_range(0, 1) == 0) begin
          len = $urandom_range(4, 11);
          h = 2; s.bytes[p] = 8'(1 | ((len - 4) << 2) | ((off >> 8) << 5)); s.bytes[p+1] = 8'(off);
        end else begin
          len = $urandom_range(1, 64);
          h = 3; s.bytes[p] = 8'(2 | ((len - 1) << 2)); s.bytes[p+1] = 8'(off); s.bytes[p+2] = 8'(off >> 8);
        end
        for (int i = 0; i < len; i++) exp_src[addr + i] = addr - off + i;
        addr += len;
        p += h;
      end
    end
    next_base = addr;
    return items;
  endfunction

  // drain FIFOs and expand commands into the observed maps
  always @(posedge clk) begin
    if (rst_n) begin
      for (int q = 0; q < NWFIFO; q++) if (wr_pop[q]) begin
        n_wr++;
        if (2'({wr_head[q].line, wr_head[q].bank}) != 2'(q)) misplaced++;
        for (int j = 0; j < 8; j++) if (wr_head[q].mask[j]) begin
          int a;
          a = ({int'(wr_head[q].line), 4'(wr_head[q].bank)} << 3) + j;
          if (got_lit.exists(a)) dup++;
          got_lit[a] = wr_head[q].data[8*j +: 8];
        end
      end
      for (int q = 0; q < NBANK; q++) if (cp_pop[q]) begin
        int sa;
        n_cp++;
        if (int'(cp_head[q].bank) != q || cp_head[q].len == 0 || int'(cp_head[q].off) + int'(cp_head[q].len) > 8)
          misplaced++;
        sa = ({int'(cp_head[q].line), 4'(cp_head[q].bank)} << 3) + int'(cp_head[q].off);
        for (int i = 0; i < int'(cp_head[q].len); i++) begin
          int d;
          d = int'(cp_head[q].dst) + i;
          if (got_src.exists(d)) dup++;
          got_src[d] = sa + i;
        end
      end
    end
  end
  always_comb begin
    for (int q = 0; q < NWFIFO; q++) wr_pop[q] = !wr_empty[q] && (int'($urandom_range(0, 99)) < pop_pct);
    for (int q = 0; q < NBANK; q++)  cp_pop[q] = !cp_empty[q] && (int'($urandom_range(0, 99)) < pop_pct);
  end

  task automatic compare(string tag);
    int bad;
    bad = 0;
    checks++;
    if (exp_lit.num() != got_lit.num() || exp_src.num() != got_src.num()) bad++;
    foreach (exp_lit[a]) if (!got_lit.exists(a) || got_lit[a] != exp_lit[a]) bad++;
    foreach (exp_src[a]) if (!got_src.exists(a) || got_src[a] != exp_src[a]) bad++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d mismatches (lit %0d/%0d, copy %0d/%0d)", tag, bad, got_lit.num(),
               exp_lit.num(), got_src.num(), exp_src.num());
    end
    checks++;
    if (dup != 0 || misplaced != 0) begin
      failures++; $display("FAIL %s: %0d bytes twice, %0d misplaced commands", tag, dup, misplaced);
    end
    exp_lit.delete(); got_lit.delete(); exp_src.delete(); got_src.delete();
    dup = 0; misplaced = 0;
  endtask

  initial begin
    slice_t s;
    int items, t_prev, exp_gap, cmd_wr0, cmd_cp0;
    slice_valid = 0; slice = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: one slice at a time, limits per token and rate
    for (int n = 0; n < 300; n++) begin
      cmd_wr0 = n_wr; cmd_cp0 = n_cp;
      items = make_slice(s);
      @(negedge clk);
      slice_valid = 1; slice = s;
      @(posedge clk); while (!slice_ready) @(posedge clk);
      t_prev = cyc;
      @(negedge clk); slice_valid = 0;
      while (busy) @(negedge clk);
      compare("single");
      checks++;
      if (n_wr - cmd_wr0 > 3 * items || n_cp - cmd_cp0 > 9 * items) begin
        failures++; $display("FAIL: %0d items gave %0d writes %0d copies", items, n_wr - cmd_wr0, n_cp - cmd_cp0);
      end
    end
    // phase 2: back-to-back slices, one item per cycle
    for (int n = 0; n < 200; n++) begin
      if (n % 40 == 0) begin
        @(negedge clk); slice_valid = 0;
        while (busy) @(negedge clk);
        if (n > 0) compare("stream");
        next_base = 300;
      end
      items = make_slice(s, next_base);
      @(negedge clk);
      slice_valid = 1; slice = s;
      @(posedge clk); while (!slice_ready) @(posedge clk);
      if (n % 40 != 0) begin
        checks++;
        if (cyc - t_prev != exp_gap) begin
          failures++; $display("FAIL: slice accepted %0d cycles after the previous, expected %0d", cyc - t_prev, exp_gap);
        end
      end
      t_prev = cyc; exp_gap = items;
    end
    @(negedge clk); slice_valid = 0;
    while (busy) @(negedge clk);
    compare("stream");
    // phase 3: slow draining, FIFOs fill up
    pop_pct = 10;
    next_base = 300;
    for (int n = 0; n < 40; n++) begin
      items = make_slice(s, next_base);
      @(negedge clk);
      slice_valid = 1; slice = s;
      @(posedge clk); while (!slice_ready) @(posedge clk);
    end
    @(negedge clk); slice_valid = 0;
    while (busy) @(negedge clk);
    compare("backpressure");
    $display("commands: %0d writes, %0d copies", n_wr, n_cp);
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
