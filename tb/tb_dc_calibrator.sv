// Self-checking test of dc_calibrator.
// Random AFN_A/AFN_R pairs: a calibration cycle must store
// delta = AFN_R - AFN_A (signed, also negative), and every later operating
// cycle must give C-AFN_A = AFN_A + delta one cycle later, while c_afn holds
// its value during the calibration cycle.  Includes the aging example of a
// fresh reading 18.5 that an aged sensor reports as 16.5.
module tb_dc_calibrator;
  import dsens_pkg::*;

  logic      clk = 1'b0, rst = 1'b1, afn_valid = 1'b0;
  cal_mode_e mode = CAL_OPERATE;
  afn_t      afn_a = '0, afn_r = '0;
  cafn_t     c_afn, delta;
  logic      c_afn_valid;
  int        checks = 0, failures = 0;

  dc_calibrator dut (.clk, .rst, .mode, .afn_a, .afn_r, .afn_valid, .c_afn, .c_afn_valid, .delta);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int exp_delta;
    @(posedge clk); #1;
    rst = 1'b0;
    afn_valid = 1'b1;
    // before any calibration delta = 0
    afn_a = afn_t'(20 * 8);
    @(posedge clk); #1;
    expect_eq("no calibration yet", int'(c_afn), 160);
    expect_eq("valid", int'(c_afn_valid), 1);
    // example: new 18.5, aged 16.5 -> delta 2.0
    afn_a = afn_t'(132); afn_r = afn_t'(148); mode = CAL_CALIBRATE;
    @(posedge clk); #1;
    expect_eq("delta 2.0", int'(delta), 16);
    expect_eq("c_afn held", int'(c_afn), 160);
    mode = CAL_OPERATE;
    @(posedge clk); #1;
    expect_eq("calibrated 18.5", int'(c_afn), 148);
    exp_delta = 16;
    for (int n = 0; n < 500; n++) begin
      int prev_c;
      afn_a = afn_t'($urandom_range(8, 344));
      if ($urandom_range(0, 9) == 0) begin
        afn_r = afn_t'($urandom_range(8, 344));
        mode  = CAL_CALIBRATE;
        prev_c = int'(c_afn);
        exp_delta = int'(afn_r) - int'(afn_a);
        @(posedge clk); #1;
        expect_eq("delta", int'(delta), exp_delta);
        expect_eq("hold", int'(c_afn), prev_c);
        mode = CAL_OPERATE;
      end else begin
        @(posedge clk); #1;
        expect_eq("c_afn", int'(c_afn), int'(afn_a) + exp_delta);
      end
    end
    afn_valid = 1'b0;
    @(posedge clk); #1;
    expect_eq("valid follows", int'(c_afn_valid), 0);
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
