// Self-checking test of position_detector at the evaluated size (N1 = 43).
// Drives single boundaries at every position, double boundaries (only the
// first must count), words with no boundary, and random words, and compares
// FN with a reference that scans the word from O1 upwards.
module tb_position_detector;
  localparam int N1 = 43;
  localparam int W  = $clog2(N1 + 1);

  logic [N1-1:0] o;
  logic [W-1:0]  fn;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;

  position_detector #(.N1(N1)) dut (.o, .fn);

  always #5 clk = ~clk;

  function automatic int ref_fn(logic [N1-1:0] v);
    for (int k = 2; k <= N1; k++) if (v[k-1] != v[0]) return k;
    return N1;
  endfunction

  task automatic check(logic [N1-1:0] v);
    o = v;
    #1;
    checks++;
    if (int'(fn) != ref_fn(v)) begin
      failures++;
      $display("FAIL o=%b fn=%0d expected %0d", v, fn, ref_fn(v));
    end
  endtask

  initial begin
    // one boundary at position p: O1..O(p-1) = A, Op.. = not A
    for (int p = 2; p <= N1; p++) begin
      check({N1{1'b1}} << (p - 1));
      check(~({N1{1'b1}} << (p - 1)));
    end
    // two boundaries (slow chain, as with changes at 13 and 37)
    check(({N1{1'b1}} << 12) ^ ({N1{1'b1}} << 36));
    // no boundary
    check('0);
    check('1);
    for (int i = 0; i < 300; i++) check(N1'({$urandom, $urandom}));
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
