// Self-checking test of mldc_calibrator (M = 5, 9 weights).
// The testbench keeps its own history of calibration pairs and evaluates the
// regression in real arithmetic.  At a calibration it expects
// delta = AFN_R - AFN'_A computed with the history as it was before that
// calibration, then the pair pushed into the history; in operating cycles it
// expects C-AFN_A = AFN'_A + delta one cycle later.
module tb_mldc_calibrator;
  import dsens_pkg::*;
  localparam int M = 5, NF = 2 * M - 1;

  logic                 clk = 1'b0, rst = 1'b1, afn_valid = 1'b1;
  cal_mode_e            mode = CAL_OPERATE;
  afn_t                 afn_a = '0, afn_r = '0;
  weight_t              w [NF];
  cafn_t                bias, c_afn, delta;
  logic                 c_afn_valid;
  logic [$clog2(M)-1:0] hist_count;
  int                   checks = 0, failures = 0;
  int                   ha[$], hr[$];

  mldc_calibrator #(.M(M)) dut (
    .clk, .rst, .mode, .afn_a, .afn_r, .afn_valid, .w, .bias,
    .c_afn, .c_afn_valid, .delta, .hist_count
  );

  always #5 clk = ~clk;

  function automatic int lr(int a);
    real acc;
    int  r;
    acc = real'(a) / 8.0 * real'(int'(w[0])) / 256.0;
    for (int j = 0; j < M - 1; j++) begin
      acc += real'((j < ha.size()) ? ha[j] : 0) / 8.0 * real'(int'(w[2*j+1])) / 256.0;
      acc += real'((j < hr.size()) ? hr[j] : 0) / 8.0 * real'(int'(w[2*j+2])) / 256.0;
    end
    r = $rtoi($floor(acc * 8.0 + 0.5)) + int'(bias);
    if (r > 1023) r = 1023;
    if (r < -1024) r = -1024;
    return r;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int exp_delta, prev_c;
    // a model leaning on the present reading and the last reference reading
    w[0] = 16'sd200; w[1] = -16'sd20; w[2] = 16'sd60;
    for (int k = 3; k < NF; k++) w[k] = weight_t'(int'($urandom_range(0, 20)) - 10);
    bias = 11'sd8;
    @(posedge clk); #1;
    rst = 1'b0;
    exp_delta = 0;
    for (int n = 0; n < 600; n++) begin
      afn_a = afn_t'($urandom_range(100, 260));
      if ($urandom_range(0, 7) == 0) begin
        afn_r = afn_t'(int'(afn_a) + int'($urandom_range(0, 30)));
        mode = CAL_CALIBRATE;
        exp_delta = int'(afn_r) - lr(int'(afn_a));
        prev_c = int'(c_afn);
        @(posedge clk); #1;
        ha.push_front(int'(afn_a)); hr.push_front(int'(afn_r));
        if (ha.size() > M - 1) begin void'(ha.pop_back()); void'(hr.pop_back()); end
        expect_eq("delta", int'(delta), exp_delta);
        expect_eq("hold", int'(c_afn), prev_c);
        expect_eq("count", int'(hist_count), ha.size());
        mode = CAL_OPERATE;
      end else begin
        @(posedge clk); #1;
        expect_eq("c_afn", int'(c_afn), lr(int'(afn_a)) + exp_delta);
        expect_eq("valid", int'(c_afn_valid), 1);
      end
    end
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
