// tb_write_selector: checks the write command selector of one bank.
// Every cycle random generated-write pairs (from 16 execution modules) and
// random parser write-FIFO heads are offered, some for this bank, some for
// others. A reference model with its own round-robin pointers predicts the
// choice: generated writes for this bank first (round robin over modules,
// lower half first within a module), otherwise parser writes for this bank
// (round robin over parsers). Checked: the write command driven, exactly
// one acknowledge or pop for the chosen source and none elsewhere, and
// nothing chosen when no command is for this bank.
module tb_write_selector;
  import snappy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 6, B = 5;
  logic [1:0]     gw_valid [NBANK];
  wr_cmd_t        gw_cmd   [NBANK][2];
  logic [1:0]     gw_ack   [NBANK];
  wr_cmd_t        bcp_head [N];
  logic [N-1:0]   bcp_empty, bcp_pop;
  logic           wr_valid, from_recycle;
  wr_cmd_t        wr_cmd;

  write_selector #(.NBCP(N), .BANK(B)) dut (.*);

  int checks = 0, failures = 0;
  int rr_em = 0, rr_b = 0;
  int n_gen = 0, n_bcp = 0;

  function automatic wr_cmd_t rnd_cmd(int bank);
    wr_cmd_t c;
    c = wr_cmd_t'({$urandom, $urandom, $urandom});
    c.bank = 4'(bank);
    return c;
  endfunction

  initial begin
    int es, eh, bs;
    wr_cmd_t exp_cmd;
    bit ok;
    foreach (gw_valid[e]) gw_valid[e] = '0;
    bcp_empty = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      for (int e = 0; e < NBANK; e++) begin
        int bk;
        bk = ($urandom_range(0, 5) == 0) ? B : $urandom_range(0, 15);
        gw_cmd[e][0] = rnd_cmd(bk);
        gw_cmd[e][1] = rnd_cmd((bk + 1) % 16);
        gw_valid[e]  = ($urandom_range(0, 99) < 30) ? 2'($urandom) : 2'b00;
      end
      for (int p = 0; p < N; p++)
        bcp_head[p] = rnd_cmd(($urandom_range(0, 2) == 0) ? B : $urandom_range(0, 15));
      bcp_empty = N'($urandom);
      #1;
      // reference
      es = -1; eh = 0; bs = -1;
      for (int k = 0; k < NBANK; k++) begin
        int e;
        e = (rr_em + k) % NBANK;
        if (es < 0) begin
          if (gw_valid[e][0] && gw_cmd[e][0].bank == B) begin es = e; eh = 0; end
          else if (gw_valid[e][1] && gw_cmd[e][1].bank == B) begin es = e; eh = 1; end
        end
      end
      for (int k = 0; k < N; k++) begin
        int p;
        p = (rr_b + k) % N;
        if (bs < 0 && !bcp_empty[p] && bcp_head[p].bank == B) bs = p;
      end
      ok = 1;
      for (int e = 0; e < NBANK; e++)
        if (gw_ack[e] != ((es == e) ? (2'b01 << eh) : 2'b00)) ok = 0;
      if (es >= 0) begin
        exp_cmd = gw_cmd[es][eh];
        if (!wr_valid || wr_cmd != exp_cmd || bcp_pop != '0 || !from_recycle) ok = 0;
        n_gen++;
        rr_em = (es + 1) % NBANK;
      end else if (bs >= 0) begin
        if (!wr_valid || wr_cmd != bcp_head[bs] || bcp_pop != (N'(1) << bs) || from_recycle) ok = 0;
        n_bcp++;
        rr_b = (bs + 1) % N;
      end else if (wr_valid || bcp_pop != '0) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL t=%0d: expected module %0d half %0d / parser %0d; got valid %0d pop %b", t, es, eh, bs, wr_valid, bcp_pop);
      end
    end
    checks++;
    if (n_gen == 0 || n_bcp == 0) begin failures++; $display("FAIL: a source never chosen"); end
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
