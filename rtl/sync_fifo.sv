// sync_fifo: single-clock first-in first-out buffer.
//
// Used for the command FIFOs of the BRAM command parsers, the generated-write
// queue of each execution module and, with DEPTH = 512, as the recycle buffer
// that holds renewed copy commands until they are executed again (one 18Kb
// BRAM per execution module in the reference implementation: 512 entries of
// a 32-bit copy command).
// Interface: push with push_data, pop, head (first-word fall-through: head is
// the oldest entry whenever empty is low), count of stored entries. A push
// and a pop may happen in the same cycle, also when the FIFO is full.
// Timing: an entry pushed in cycle t is visible at head in cycle t+1.
// Pushing a full FIFO or popping an empty one is a caller error and is
// flagged by assertions.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           push_data,
  input  logic                       pop,
  output logic [WIDTH-1:0]           head,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign head  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  // Overflow and underflow are never allowed by the users of this FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
