// Self-checking test of calibration_controller (SETTLE = 2).
// The reference sensor's AFN-valid flag is modelled here: it rises after
// N = 8 cycles ON with clr released.  Checks the calibration after reset,
// an ad hoc request, a request arriving during a calibration (served next),
// and periodic calibrations: r_clr lasts exactly SETTLE cycles, the
// subtract mode lasts exactly one cycle and only with both AFNs valid, the
// reference sensor is ON for exactly SETTLE + N + 1 cycles, and periodic
// calibrations start cal_period cycles apart.
module tb_calibration_controller;
  import dsens_pkg::*;
  localparam int SETTLE = 2, N = 8, CNT_W = 56;

  logic             clk = 1'b0, rst = 1'b1, cal_req = 1'b0;
  logic [CNT_W-1:0] cal_period = '0;
  logic             a_valid = 1'b1, r_valid;
  logic             r_en, r_clr, busy;
  cal_mode_e        mode;
  logic [15:0]      cal_count;
  int               checks = 0, failures = 0;
  int               r_cnt = 0, on_len = 0, clr_len = 0, cal_len = 0, n_cal = 0;
  int               on_start[$];
  int               cyc = 0;

  calibration_controller #(.SETTLE(SETTLE), .CNT_W(CNT_W)) dut (
    .clk, .rst, .cal_req, .cal_period, .a_afn_valid(a_valid), .r_afn_valid(r_valid),
    .r_en, .r_clr, .mode, .busy, .cal_count
  );

  always #5 clk = ~clk;

  // reference sensor's averaging: valid after N shifts with clr low
  assign r_valid = (r_cnt >= N);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst || r_clr || !r_en) r_cnt <= 0;
    else                       r_cnt <= r_cnt + 1;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // measure every ON window
  always @(posedge clk) begin
    if (!rst) begin
      if (r_en && on_len == 0) on_start.push_back(cyc);
      if (r_en) begin
        on_len++;
        if (r_clr) clr_len++;
        if (mode == CAL_CALIBRATE) begin
          cal_len++;
          checks++;
          if (!(a_valid && r_valid)) begin failures++; $display("FAIL calibrate without valid AFNs"); end
        end
      end else if (on_len != 0) begin
        n_cal++;
        expect_eq("ON length", on_len, SETTLE + N + 1);
        expect_eq("clr length", clr_len, SETTLE);
        expect_eq("calibrate cycles", cal_len, 1);
        expect_eq("cal_count", int'(cal_count), n_cal);
        on_len = 0; clr_len = 0; cal_len = 0;
      end
      if (!r_en) begin
        checks++;
        if (mode != CAL_OPERATE) begin failures++; $display("FAIL calibrate while R is OFF"); end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (30) @(posedge clk);
    expect_eq("calibration after reset", n_cal, 1);
    // ad hoc request
    #1 cal_req = 1'b1;
    @(posedge clk); #1 cal_req = 1'b0;
    repeat (30) @(posedge clk);
    expect_eq("ad hoc", n_cal, 2);
    // request during a calibration
    #1 cal_req = 1'b1;
    @(posedge clk); #1 cal_req = 1'b0;
    repeat (4) @(posedge clk);
    #1 cal_req = 1'b1;
    @(posedge clk); #1 cal_req = 1'b0;
    repeat (40) @(posedge clk);
    expect_eq("pending served", n_cal, 4);
    // periodic, every 50 cycles
    on_start.delete();
    #1 cal_period = 56'd50;
    repeat (260) @(posedge clk);
    #1 cal_period = '0;
    repeat (30) @(posedge clk);
    checks++;
    if (on_start.size() < 4) begin failures++; $display("FAIL only %0d periodic calibrations", on_start.size()); end
    for (int i = 1; i < on_start.size(); i++)
      expect_eq("period", on_start[i] - on_start[i-1], 50);
    // nothing more once the period is off
    begin
      int n_before;
      n_before = n_cal;
      repeat (200) @(posedge clk);
      expect_eq("quiet", n_cal, n_before);
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
