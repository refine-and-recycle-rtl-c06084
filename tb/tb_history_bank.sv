// tb_history_bank: checks one history bank (512 x 8 lanes of {flag, byte}).
// Random lane-masked writes and reads run against a reference array; every
// read is checked one cycle after it is issued (the bank's read latency),
// including reads of the line written in the same cycle, which must return
// the old contents (read-first).
module tb_history_bank;
  import snappy_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we, re;
  logic [8:0]  waddr, raddr;
  logic [7:0]  wlane, wflag, rflag;
  logic [63:0] wdata, rdata;

  history_bank dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] m_d [512][8];
  logic       m_f [512][8];

  initial begin
    logic [63:0] exp_d;
    logic [7:0]  exp_f;
    logic        pend;
    we = 0; re = 0; waddr = 0; raddr = 0; wlane = 0; wflag = 0; wdata = 0;
    // initialise every line through the write port
    for (int l = 0; l < 512; l++) begin
      @(negedge clk);
      we = 1; waddr = 9'(l); wlane = '1; wflag = '0; wdata = {$urandom, $urandom};
      for (int j = 0; j < 8; j++) begin m_d[l][j] = wdata[8*j +: 8]; m_f[l][j] = 1'b0; end
    end
    pend = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // check the read issued in the previous cycle
      if (pend) begin
        checks++;
        if (rdata !== exp_d || rflag !== exp_f) begin
          failures++;
          $display("FAIL t=%0d: read %h/%b expected %h/%b", t, rdata, rflag, exp_d, exp_f);
        end
      end
      we    = ($urandom_range(0, 1) == 1);
      re    = ($urandom_range(0, 3) != 0);
      waddr = 9'($urandom_range(0, 15));   // small range: many same-line hits
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 9'($urandom_range(0, 15));
      wlane = 8'($urandom);
      wflag = 8'($urandom);
      wdata = {$urandom, $urandom};
      // expected read data: contents before this cycle's write
      for (int j = 0; j < 8; j++) begin exp_d[8*j +: 8] = m_d[raddr][j]; exp_f[j] = m_f[raddr][j]; end
      pend = re;
      if (we) for (int j = 0; j < 8; j++) if (wlane[j]) begin
        m_d[waddr][j] = wdata[8*j +: 8];
        m_f[waddr][j] = wflag[j];
      end
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
