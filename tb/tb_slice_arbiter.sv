// tb_slice_arbiter: checks the distribution of slices to the parsers.
// Random slice valid and random per-parser ready. A reference round-robin
// pointer predicts which parser gets each slice: the first ready parser at
// or after the pointer. Checked every cycle: at most one valid, only to a
// ready parser, the predicted one, in_ready exactly when some parser is
// ready, and the slice data passed through unchanged.
module tb_slice_arbiter;
  import snappy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 6;
  logic          in_valid, in_ready;
  slice_t        in_slice, out_slice;
  logic [N-1:0]  out_valid, out_ready;

  slice_arbiter #(.NBCP(N)) dut (.*);

  int checks = 0, failures = 0;
  int rr = 0;
  int served[N];

  initial begin
    int exp_sel;
    in_valid = 0; out_ready = '0; in_slice = '0;
    foreach (served[i]) served[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < 70);
      out_ready = N'($urandom);
      in_slice  = slice_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      exp_sel = -1;
      for (int k = 0; k < N; k++) if (exp_sel < 0 && out_ready[(rr + k) % N]) exp_sel = (rr + k) % N;
      checks++;
      if (in_ready != (exp_sel >= 0) ||
          out_valid != ((in_valid && exp_sel >= 0) ? N'(1) << exp_sel : '0) ||
          out_slice != in_slice) begin
        failures++;
        $display("FAIL t=%0d: ready %b valid %b expected sel %0d", t, out_ready, out_valid, exp_sel);
      end
      if (in_valid && exp_sel >= 0) begin
        served[exp_sel]++;
        rr = (exp_sel + 1) % N;
      end
    end
    // all ready: slices go to the parsers in turn
    checks++;
    foreach (served[i]) if (served[i] == 0) begin failures++; $display("FAIL: parser %0d never served", i); end
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
