// Self-checking test of error_checker: random FN streams and thresholds,
// compared each cycle with |FN_i - FN_(i-1)| > THR computed here; also
// checks that no error is reported in the first cycle after a reset.
module tb_error_checker;
  import dsens_pkg::*;

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0;
  fn_t  fn, thr, prev;
  logic error;
  int   checks = 0, failures = 0, hits = 0;

  error_checker dut (.clk, .rst, .clr, .fn, .thr, .error);

  always #5 clk = ~clk;

  initial begin
    fn = 6'd20; thr = 6'd3;
    @(posedge clk); #1;
    rst = 1'b0;
    fn  = 6'd40;                           // first reading: no previous one
    #1;
    checks++;
    if (error) begin failures++; $display("FAIL error right after reset"); end
    @(posedge clk); #1;
    prev = fn;
    for (int c = 0; c < 2000; c++) begin
      int diff;
      logic expv;
      // mostly small steps, sometimes a jump
      if ($urandom_range(0, 9) == 0) fn = fn_t'($urandom_range(2, 43));
      else fn = fn_t'(int'(prev) + int'($urandom_range(0, 4)) - 2);
      thr  = fn_t'($urandom_range(0, 8));
      diff = int'(fn) - int'(prev);
      if (diff < 0) diff = -diff;
      expv = (diff > int'(thr));
      #1;
      checks++;
      if (error != expv) begin
        failures++;
        $display("FAIL fn=%0d prev=%0d thr=%0d error=%b", fn, prev, thr, error);
      end
      hits += int'(expv);
      @(posedge clk); #1;
      prev = fn;
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no error ever expected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
