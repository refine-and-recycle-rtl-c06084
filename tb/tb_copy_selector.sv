// tb_copy_selector: checks the copy command selector of one bank.
// Random parser copy-FIFO heads, recycle buffer fill levels (below, at and
// above the threshold, up to full) and execution-module accept are offered
// each cycle. The reference predicts the choice: nothing unless the module
// accepts; below the threshold parsers first (round robin), recycle buffer
// otherwise; at or above the threshold the recycle buffer first, except
// that a parser command may follow directly after a recycled one while the
// recycle buffer still has two free entries. Checked: the command issued,
// the pops, and that the parsers are never chosen when the recycle buffer
// could overflow.
module tb_copy_selector;
  import snappy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 6, D = 32, TH = 8;
  cp_cmd_t                 bcp_head [N];
  logic [N-1:0]            bcp_empty, bcp_pop;
  cp_cmd_t                 rc_head, cp_cmd;
  logic                    rc_empty, rc_pop, em_accept, cp_valid, rc_priority;
  logic [$clog2(D+1)-1:0]  rc_count;

  copy_selector #(.NBCP(N), .RC_DEPTH(D), .THRESH(TH)) dut (.*);

  int checks = 0, failures = 0;
  int rr = 0;
  bit last_rc = 0;
  int n_prio_rc = 0, n_prio_bcp = 0, n_low_bcp = 0;

  initial begin
    int bs, cnt;
    bit take_b, take_r, ok;
    bcp_empty = '1; rc_empty = 1; rc_count = 0; em_accept = 0; rc_head = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) bcp_head[p] = cp_cmd_t'({$urandom, $urandom});
      rc_head   = cp_cmd_t'({$urandom, $urandom});
      bcp_empty = N'($urandom);
      case ($urandom_range(0, 3))
        0: cnt = 0;
        1: cnt = $urandom_range(1, TH - 1);
        2: cnt = $urandom_range(TH, D - 2);
        default: cnt = $urandom_range(D - 3, D);
      endcase
      rc_count  = ($clog2(D+1))'(cnt);
      rc_empty  = (cnt == 0);
      em_accept = ($urandom_range(0, 9) != 0);
      #1;
      bs = -1;
      for (int k = 0; k < N; k++) if (bs < 0 && !bcp_empty[(rr + k) % N]) bs = (rr + k) % N;
      take_b = em_accept && bs >= 0 && (cnt == 0 || cnt < TH || (last_rc && cnt <= D - 2));
      take_r = em_accept && cnt != 0 && !take_b;
      ok = (cp_valid == (take_b || take_r)) && (rc_pop == take_r) &&
           (bcp_pop == (take_b ? N'(1) << bs : '0)) && (rc_priority == (cnt >= TH));
      if (take_b && cp_cmd != bcp_head[bs]) ok = 0;
      if (take_r && cp_cmd != rc_head) ok = 0;
      if (take_b && cnt > D - 2) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL t=%0d: count %0d accept %0d parser %0d -> valid %0d rc_pop %0d pop %b", t, cnt, em_accept, bs, cp_valid, rc_pop, bcp_pop);
      end
      if (take_b) rr = (bs + 1) % N;
      if (take_b && cnt >= TH) n_prio_bcp++;
      if (take_r && bs >= 0 && cnt >= TH) n_prio_rc++;
      if (take_b && cnt > 0 && cnt < TH) n_low_bcp++;
      last_rc = take_r;
    end
    checks++;
    if (n_prio_rc == 0 || n_prio_bcp == 0 || n_low_bcp == 0) begin
      failures++; $display("FAIL: cases not reached %0d %0d %0d", n_prio_rc, n_prio_bcp, n_low_bcp);
    end
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
