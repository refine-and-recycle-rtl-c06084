// tb_sync_fifo: checks the FIFO used for command queues and recycle buffers.
// Random pushes and pops (never pushing a full or popping an empty FIFO, as
// the users guarantee) are compared with a queue model: head, empty, full
// and count every cycle, plus simultaneous push and pop at full. A second
// phase fills the FIFO completely to check the full flag at DEPTH.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 20, D = 12;
  logic          push, pop, empty, full;
  logic [W-1:0]  push_data, head;
  logic [$clog2(D+1)-1:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  task automatic check_state(string tag);
    checks++;
    if (int'(count) != q.size() || empty != (q.size() == 0) || full != (q.size() == D) ||
        (q.size() != 0 && head != q[0])) begin
      failures++;
      $display("FAIL %s: count %0d/%0d empty %0d full %0d head %h exp %h", tag, count, q.size(), empty, full,
               head, (q.size() != 0) ? q[0] : '0);
    end
  endtask

  initial begin
    push = 0; pop = 0; push_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check_state("random");
      pop  = (q.size() != 0) && ($urandom_range(0, 99) < 45);
      push = ((q.size() < D) || pop) && ($urandom_range(0, 99) < 50);
      push_data = W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(push_data);
    end
    // fill to full, then push and pop together at full
    @(negedge clk); push = 0; pop = 0;
    while (q.size() < D) begin
      @(negedge clk); push = 1; pop = 0; push_data = W'($urandom);
      @(posedge clk); #1; q.push_back(push_data);
    end
    @(negedge clk); push = 0; check_state("full");
    push = 1; pop = 1; push_data = 20'h5a5a5;
    @(posedge clk); #1; void'(q.pop_front()); q.push_back(20'h5a5a5);
    @(negedge clk); push = 0; pop = 0; check_state("full push+pop");
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
