// Self-checking test of alarm_generator with the nominal window
// AFN_l = 17, AFN_h = 27: the published examples (15 -> slow alarm,
// 31 -> fast alarm, 20 -> none), both window edges, random values, and no
// alarm while the input is not valid.  Outputs appear one cycle later.
module tb_alarm_generator;
  import dsens_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, valid = 1'b0;
  cafn_t afn = '0, afn_l, afn_h;
  logic  alarm, slow, fast;
  int    checks = 0, failures = 0;

  alarm_generator dut (.clk, .rst, .afn, .valid, .afn_l, .afn_h, .alarm, .slow, .fast);

  always #5 clk = ~clk;

  task automatic apply(int v, logic vld);
    logic es, ef;
    afn = cafn_t'(v); valid = vld;
    es = vld && (v < int'(afn_l));
    ef = vld && (v > int'(afn_h));
    @(posedge clk); #1;
    checks++;
    if (slow != es || fast != ef || alarm != (es | ef)) begin
      failures++;
      $display("FAIL afn=%0d valid=%b: alarm=%b slow=%b fast=%b", v, vld, alarm, slow, fast);
    end
  endtask

  initial begin
    afn_l = to_cafn(17); afn_h = to_cafn(27);
    @(posedge clk); #1;
    rst = 1'b0;
    apply(15 * 8, 1'b1);
    apply(31 * 8, 1'b1);
    apply(20 * 8, 1'b1);
    apply(17 * 8, 1'b1);
    apply(17 * 8 - 1, 1'b1);
    apply(27 * 8, 1'b1);
    apply(27 * 8 + 1, 1'b1);
    apply(5 * 8, 1'b0);
    apply(-40, 1'b1);
    for (int n = 0; n < 500; n++) apply(int'($urandom_range(0, 500)) - 50, 1'($urandom_range(0, 7) != 0));
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
