// Self-checking test of afn_calculator.
// For every SEL (N = 1, 2, 4, 8) a random FN stream is applied after a reset;
// a queue in the testbench keeps the last N values.  Checks each cycle that
// afn = (sum of the last N values) / N with 3 fraction bits, and that
// afn_valid rises exactly N cycles after the reset, as specified.  Also
// checks the synchronous restart (clr) and the example 15/16 -> 15.5.
module tb_afn_calculator;
  import dsens_pkg::*;

  logic             clk = 1'b0, rst = 1'b1, clr = 1'b0;
  fn_t              fn;
  logic [SEL_W-1:0] sel;
  afn_t             afn;
  logic             afn_valid;
  int               checks = 0, failures = 0;

  afn_calculator dut (.clk, .rst, .clr, .fn, .sel, .afn, .afn_valid);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    fn = '0; sel = '0;
    for (int s = 0; s < 4; s++) begin
      int q[$];
      int n, total;
      n   = 1 << s;
      sel = SEL_W'(s);
      rst = 1'b1;
      @(posedge clk); #1;
      rst = 1'b0;
      for (int c = 0; c < 60; c++) begin
        fn = fn_t'($urandom_range(2, 43));
        @(posedge clk); #1;
        q.push_front(int'(fn));
        if (q.size() > n) void'(q.pop_back());
        total = 0;
        foreach (q[i]) total += q[i];
        expect_eq($sformatf("valid N=%0d c=%0d", n, c), int'(afn_valid), int'(c + 1 >= n));
        if (c + 1 >= n) expect_eq($sformatf("afn N=%0d c=%0d", n, c), int'(afn), total * 8 / n);
      end
      // synchronous restart
      clr = 1'b1;
      @(posedge clk); #1;
      clr = 1'b0;
      expect_eq("clr valid", int'(afn_valid), int'(n == 0));
      expect_eq("clr afn", int'(afn), 0);
    end
    // 15, 16, 15, 16 with N = 2 -> 15.5 (124 in eighths)
    sel = 2'd1;
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    for (int c = 0; c < 6; c++) begin
      fn = fn_t'((c % 2 == 0) ? 15 : 16);
      @(posedge clk); #1;
    end
    expect_eq("15.5", int'(afn), 124);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
