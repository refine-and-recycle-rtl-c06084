// tb_execution_module: checks one execution module against a model of its
// bank.
//
// The bank is first cleared through the clear port. Then, each cycle, a
// random write command and (when the module accepts) a random copy command
// on a few lines are issued, so that copies meet fully valid, partly valid
// and invalid data, and sometimes the line being written in the same cycle.
// The model predicts for each copy the number of valid leading bytes, the
// hit / partial-hit / miss pulse one cycle after the copy is issued, the one
// or two write commands it generates (destination bank, line, mask and
// data) and the renewed command it recycles. Generated writes are
// acknowledged at random, half by half, and compared as a set; recycled
// commands are popped at random and compared in order. The written-byte
// count and the output read port are checked too.
module tb_execution_module;
  import snappy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         wr_valid, cp_valid, copy_accept, rc_empty, rc_pop;
  wr_cmd_t      wr_cmd;
  cp_cmd_t      cp_cmd, rc_head;
  logic [9:0]   rc_count;
  logic [1:0]   gw_valid, gw_ack;
  wr_cmd_t      gw_cmd [2];
  logic         clr, out_rd;
  logic [8:0]   clr_line, out_line;
  logic [63:0]  out_rdata;
  logic [3:0]   wbytes;
  logic         hit, part_hit, miss, busy;

  execution_module #(.RC_DEPTH(512), .GW_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] m_d [512][8];
  logic       m_f [512][8];
  int         exp_w[string];
  cp_cmd_t    exp_rc[$];
  int         n_hit = 0, n_part = 0, n_miss = 0;

  function automatic string key(wr_cmd_t w);
    return $sformatf("%h", w);
  endfunction

  // expected results of copy c read from the model now
  task automatic predict(cp_cmd_t c, output int nval);
    wr_cmd_t w;
    int a;
    nval = 0;
    while (nval < int'(c.len) && m_f[c.line][int'(c.off) + nval]) nval++;
    for (int h = 0; h < 2; h++) begin
      int dl;
      dl = (int'(c.dst) >> 3) + h;
      w = '0;
      w.bank = 4'(dl);
      w.line = 9'(dl >> 4);
      for (int i = 0; i < nval; i++) begin
        a = int'(c.dst) + i;
        if ((a >> 3) == dl) begin
          w.mask[a & 7] = 1'b1;
          w.data[8*(a & 7) +: 8] = m_d[c.line][int'(c.off) + i];
        end
      end
      if (w.mask != 0) exp_w[key(w)] = exp_w.exists(key(w)) ? exp_w[key(w)] + 1 : 1;
    end
    if (nval < int'(c.len)) begin
      cp_cmd_t r;
      r = c;
      r.off = c.off + 3'(nval);
      r.len = c.len - 4'(nval);
      r.dst = c.dst + 16'(nval);
      exp_rc.push_back(r);
    end
  endtask

  initial begin
    int nv, pend_n, pend_len;
    bit pend;
    wr_valid = 0; cp_valid = 0; wr_cmd = '0; cp_cmd = '0; rc_pop = 0; gw_ack = '0;
    clr = 0; out_rd = 0; clr_line = 0; out_line = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 512; l++) begin
      @(negedge clk); clr = 1; clr_line = 9'(l);
      for (int j = 0; j < 8; j++) begin m_d[l][j] = 8'h00; m_f[l][j] = 1'b0; end
    end
    @(negedge clk); clr = 0;
    pend = 0;
    for (int t = 0; t < 6000; t++) begin
      // results of the copy issued in the previous cycle
      if (pend) begin
        checks++;
        if (hit != (pend_n == pend_len) || part_hit != (pend_n > 0 && pend_n < pend_len) || miss != (pend_n == 0)) begin
          failures++; $display("FAIL t=%0d: hit/part/miss %b%b%b for %0d of %0d valid", t, hit, part_hit, miss, pend_n, pend_len);
        end
        if (pend_n == pend_len) n_hit++; else if (pend_n > 0) n_part++; else n_miss++;
      end else begin
        checks++;
        if (hit || part_hit || miss) begin failures++; $display("FAIL t=%0d: result pulse without copy", t); end
      end
      // generated writes and recycled commands leave at random
      gw_ack = 2'($urandom) & gw_valid;
      for (int h = 0; h < 2; h++) if (gw_ack[h]) begin
        checks++;
        if (!exp_w.exists(key(gw_cmd[h]))) begin
          failures++; $display("FAIL t=%0d: unexpected generated write %h", t, gw_cmd[h]);
        end else begin
          exp_w[key(gw_cmd[h])]--;
          if (exp_w[key(gw_cmd[h])] == 0) exp_w.delete(key(gw_cmd[h]));
        end
      end
      rc_pop = !rc_empty && ($urandom_range(0, 1) == 1);
      if (rc_pop) begin
        checks++;
        if (exp_rc.size() == 0 || rc_head != exp_rc[0]) begin
          failures++; $display("FAIL t=%0d: recycled %h", t, rc_head);
        end
        if (exp_rc.size() != 0) void'(exp_rc.pop_front());
      end
      // new commands
      // every 300 cycles lines 0..31 are cleared again, so copies keep meeting invalid data
      clr      = (t % 300) < 32;
      clr_line = 9'(t % 300);
      if (clr) for (int j = 0; j < 8; j++) m_f[t % 300][j] = 1'b0;
      cp_valid = !clr && copy_accept && ($urandom_range(0, 99) < 70);
      cp_cmd.bank = 4'd3;
      cp_cmd.line = 9'($urandom_range(0, 31));
      cp_cmd.off  = 3'($urandom_range(0, 7));
      cp_cmd.len  = 4'($urandom_range(1, 8 - int'(cp_cmd.off)));
      cp_cmd.dst  = 16'($urandom);
      wr_valid = !clr && ($urandom_range(0, 99) < 30);
      wr_cmd = wr_cmd_t'({$urandom, $urandom, $urandom});
      wr_cmd.line = ($urandom_range(0, 3) == 0) ? cp_cmd.line : 9'($urandom_range(0, 31));
      // reading the line written in the same cycle returns the old contents
      pend = cp_valid;
      if (cp_valid) begin
        predict(cp_cmd, nv);
        pend_n = nv; pend_len = int'(cp_cmd.len);
      end
      if (wr_valid) for (int j = 0; j < 8; j++) if (wr_cmd.mask[j]) begin
        m_d[wr_cmd.line][j] = wr_cmd.data[8*j +: 8];
        m_f[wr_cmd.line][j] = 1'b1;
      end
      #1;
      checks++;
      if (int'(wbytes) != (wr_valid ? $countones(wr_cmd.mask) : 0)) begin
        failures++; $display("FAIL t=%0d: wbytes %0d", t, wbytes);
      end
      @(negedge clk);
    end
    cp_valid = 0; wr_valid = 0; clr = 0;
    // drain what is left
    for (int t = 0; t < 200; t++) begin
      gw_ack = gw_valid;
      for (int h = 0; h < 2; h++) if (gw_ack[h] && exp_w.exists(key(gw_cmd[h]))) begin
        exp_w[key(gw_cmd[h])]--;
        if (exp_w[key(gw_cmd[h])] == 0) exp_w.delete(key(gw_cmd[h]));
      end
      rc_pop = !rc_empty;
      if (rc_pop) begin
        checks++;
        if (exp_rc.size() == 0 || rc_head != exp_rc[0]) begin failures++; $display("FAIL drain: recycled %h", rc_head); end
        if (exp_rc.size() != 0) void'(exp_rc.pop_front());
      end
      @(negedge clk);
    end
    gw_ack = 0; rc_pop = 0;
    checks++;
    if (exp_w.num() != 0 || exp_rc.size() != 0) begin
      failures++; $display("FAIL: %0d generated writes and %0d recycled commands missing", exp_w.num(), exp_rc.size());
    end
    // output read port
    for (int l = 0; l < 6; l++) begin
      logic [63:0] e;
      out_rd = 1; out_line = 9'(l);
      @(negedge clk);
      for (int j = 0; j < 8; j++) e[8*j +: 8] = m_f[l][j] ? m_d[l][j] : 8'h00;
      checks++;
      if (out_rdata != e) begin failures++; $display("FAIL: output read line %0d", l); end
    end
    out_rd = 0;
    checks++;
    if (n_hit == 0 || n_part == 0 || n_miss == 0) begin failures++; $display("FAIL: cases %0d %0d %0d", n_hit, n_part, n_miss); end
    $display("hits %0d partial %0d misses %0d", n_hit, n_part, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
