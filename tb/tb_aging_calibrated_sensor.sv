// End-to-end test of aging_calibrated_sensor at its default sizes
// (N0 = 9, N1 = 43, M = 5, N = 8 with SEL = 3).
//
// Operating conditions are played through the delay-chain models at a clock
// period of 1000 ps.  The reference sensor gets the delay d of a new sensor
// in the present condition; the active sensor gets d + aging.  With equal
// rise and fall delays the testbench predicts FN = floor(1000/d) - N0 + 1
// for each sensor (d = 33 gives the nominal 22) and from that the DC and
// ML-DC corrections, the calibrated AFN and the alarm.  Mechanisms that are
// made to happen and counted:
//   calibration after reset, ad hoc and periodic calibrations,
//   a false slow alarm of the aged sensor removed by calibration,
//   a missed fast alarm of the aged sensor caught after calibration,
//   genuine slow and fast alarms, an FN jump flagged by the error checker
//   (one short clock period), the ML-DC method, and DVFS mode switches
//   with a threshold table loaded per mode and then locked (a write after
//   the lock must be ignored), and the access gate that hides the readings
//   from unprivileged software while the alarm keeps working.
module tb_aging_calibrated_sensor;
  import dsens_pkg::*;
  localparam int N0 = 9, M = 5, NF = 2 * M - 1, T = 1000;

  logic             clk = 1'b0, rst = 1'b1;
  logic [SEL_W-1:0] sel = 2'd3;
  fn_t              thr = 6'd8;
  cal_method_e      method = METHOD_DC;
  logic [1:0]       dvfs_mode = 2'd0;
  logic             thr_wr_en = 1'b0, thr_lock = 1'b0, thr_locked;
  logic [1:0]       thr_wr_mode = 2'd0;
  cafn_t            thr_wr_afn_l = '0, thr_wr_afn_h = '0;
  // expected threshold table, in eighths
  int               tl [3] = '{136, 136, 136};
  int               th [3] = '{216, 216, 216};
  logic             cal_req = 1'b0;
  logic             raw_access = 1'b1;
  logic [55:0]      cal_period = '0;
  weight_t          lr_w [NF];
  cafn_t            lr_bias = '0;
  logic [DLY_W-1:0] a_d, r_d, period = 16'(T);
  logic             alarm, alarm_slow, alarm_fast, error_a, error_r;
  cafn_t            c_afn, delta_dc, delta_mldc;
  logic             c_afn_valid, r_on, cal_busy;
  afn_t             afn_a, afn_r;
  fn_t              fn_a, fn_r;
  logic [15:0]      cal_count;
  logic [$clog2(M)-1:0] mldc_hist_count;

  int checks = 0, failures = 0;
  int n_cal_seen = 0, n_adhoc = 0, n_periodic = 0, n_false_fixed = 0, n_missed_fixed = 0;
  int n_slow = 0, n_fast = 0, n_error = 0, n_mldc = 0, n_dvfs = 0, n_gated = 0;

  // environment: fresh delay of the present condition and the A-sensor aging
  int env_d = 33, aging = 0;
  // expected calibration state
  int exp_delta_dc = 0, exp_delta_ml = 0;
  int ha[$], hr[$];
  int ml_conditions [5] = '{33, 38, 27, 45, 30};
  int dvfs_conditions [5] = '{33, 38, 40, 29, 27};

  aging_calibrated_sensor dut (
    .clk, .rst, .raw_access, .sel, .thr, .method, .dvfs_mode,
    .thr_wr_en, .thr_wr_mode, .thr_wr_afn_l, .thr_wr_afn_h, .thr_lock, .thr_locked,
    .cal_req, .cal_period,
    .lr_w, .lr_bias,
    .a_rise_delay_ps(a_d), .a_fall_delay_ps(a_d),
    .r_rise_delay_ps(r_d), .r_fall_delay_ps(r_d), .clk_period_ps(period),
    .alarm, .alarm_slow, .alarm_fast, .error_a, .error_r,
    .c_afn, .c_afn_valid, .afn_a, .afn_r, .fn_a, .fn_r,
    .delta_dc, .delta_mldc, .r_on, .cal_busy, .cal_count, .mldc_hist_count
  );

  always #5 clk = ~clk;

  assign a_d = 16'(env_d + aging);
  assign r_d = 16'(env_d);

  function automatic int fn_of(int d);
    return T / d - N0 + 1;
  endfunction

  function automatic int lr(int a);
    real acc;
    int  r;
    acc = real'(a) / 8.0 * real'(int'(lr_w[0])) / 256.0;
    for (int j = 0; j < M - 1; j++) begin
      acc += real'((j < ha.size()) ? ha[j] : 0) / 8.0 * real'(int'(lr_w[2*j+1])) / 256.0;
      acc += real'((j < hr.size()) ? hr[j] : 0) / 8.0 * real'(int'(lr_w[2*j+2])) / 256.0;
    end
    r = $rtoi($floor(acc * 8.0 + 0.5)) + int'(lr_bias);
    return r;
  endfunction

  // Each completed calibration (seen on cal_count) updates the expected
  // corrections with the readings the present environment must give.
  always @(posedge clk) begin
    if (!rst && int'(cal_count) != n_cal_seen) begin
      int a, r;
      a = fn_of(env_d + aging) * 8;
      r = fn_of(env_d) * 8;
      exp_delta_dc = r - a;
      exp_delta_ml = r - lr(a);
      ha.push_front(a); hr.push_front(r);
      if (ha.size() > M - 1) begin void'(ha.pop_back()); void'(hr.pop_back()); end
      n_cal_seen = int'(cal_count);
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int expected_c();
    int a;
    a = fn_of(env_d + aging) * 8;
    return (method == METHOD_MLDC) ? lr(a) + exp_delta_ml : a + exp_delta_dc;
  endfunction

  // let the averages settle, then check the calibrated value and the alarm
  task automatic settle_and_check(string what);
    int c;
    repeat (20) @(posedge clk);
    #1;
    c = expected_c();
    expect_eq({what, " afn_a"}, int'(afn_a), fn_of(env_d + aging) * 8);
    expect_eq({what, " c_afn"}, int'(c_afn), c);
    expect_eq({what, " valid"}, int'(c_afn_valid), 1);
    expect_eq({what, " slow"}, int'(alarm_slow), int'(c < tl[dvfs_mode]));
    expect_eq({what, " fast"}, int'(alarm_fast), int'(c > th[dvfs_mode]));
    expect_eq({what, " alarm"}, int'(alarm), int'(c < tl[dvfs_mode] || c > th[dvfs_mode]));
    n_slow += int'(alarm_slow);
    n_fast += int'(alarm_fast);
  endtask

  task automatic program_thr(int m, int l, int h);
    #1 thr_wr_en = 1'b1; thr_wr_mode = 2'(m);
    thr_wr_afn_l = cafn_t'(l); thr_wr_afn_h = cafn_t'(h);
    @(posedge clk); #1 thr_wr_en = 1'b0;
    tl[m] = l;
    th[m] = h;
  endtask

  task automatic calibrate_now();
    int n_before;
    n_before = int'(cal_count);
    #1 cal_req = 1'b1;
    @(posedge clk); #1 cal_req = 1'b0;
    while (int'(cal_count) == n_before) @(posedge clk);
    @(posedge clk); #1;
    expect_eq("delta_dc", int'(delta_dc), exp_delta_dc);
    expect_eq("delta_mldc", int'(delta_mldc), exp_delta_ml);
    expect_eq("R off after calibration", int'(r_on), 0);
    n_adhoc++;
  endtask

  // error_a counts and R must never be ON outside a calibration
  always @(posedge clk) if (!rst) begin
    if (error_a) n_error++;
    if (r_on && !cal_busy) begin failures++; $display("FAIL R-sensor ON outside calibration"); end
  end

  initial begin
    // ML-DC model: AFN'_A = AFN_A + 0.5 * (last AFN_R - last AFN_A) + 0.25
    foreach (lr_w[k]) lr_w[k] = '0;
    lr_w[0] = 16'sd256; lr_w[1] = -16'sd128; lr_w[2] = 16'sd128; lr_bias = 11'sd2;

    // 1. new pair, nominal condition: calibration after reset, delta = 0
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    while (cal_count == 0) @(posedge clk);
    settle_and_check("new nominal");
    expect_eq("first delta", int'(delta_dc), 0);

    // 2. the active sensor ages by 3 ps per buffer: slightly hot, a new
    //    sensor reads 18 and the aged one 16, a false slow alarm until it
    //    is recalibrated
    env_d = 38; aging = 3;
    settle_and_check("aged hot, stale delta");
    checks++;
    if (!alarm_slow) begin failures++; $display("FAIL expected the false alarm"); end
    // fast condition: fresh 29 (should alarm), aged reads in range -> missed
    env_d = 27; aging = 3;
    settle_and_check("aged fast, stale delta");
    checks++;
    if (alarm) begin failures++; $display("FAIL expected the missed alarm"); end

    // 3. recalibrate at the nominal condition
    env_d = 33; aging = 3;
    calibrate_now();
    settle_and_check("after calibration nominal");
    env_d = 38; aging = 3;
    settle_and_check("after calibration hot");
    if (!alarm) n_false_fixed++;
    env_d = 27; aging = 3;
    settle_and_check("after calibration fast");
    if (alarm_fast) n_missed_fixed++;
    env_d = 45; aging = 3;
    settle_and_check("very hot");

    // 4. a clock glitch: one short period moves FN abruptly
    env_d = 33; aging = 3;
    repeat (20) @(posedge clk);
    #1 period = 16'd700;
    @(posedge clk); #1 period = 16'(T);
    repeat (3) @(posedge clk);
    checks++;
    if (n_error == 0) begin failures++; $display("FAIL glitch not flagged"); end
    settle_and_check("after glitch");

    // 5. periodic calibration while the sensor keeps aging
    aging = 5;
    begin
      int c0;
      c0 = int'(cal_count);
      #1 cal_period = 56'd300;
      repeat (700) @(posedge clk);
      #1 cal_period = '0;
      repeat (20) @(posedge clk);
      n_periodic = int'(cal_count) - c0;
      checks++;
      if (n_periodic < 2) begin failures++; $display("FAIL periodic calibrations: %0d", n_periodic); end
    end
    expect_eq("periodic delta", int'(delta_dc), 8 * (fn_of(33) - fn_of(38)));
    settle_and_check("after periodic");

    // 6. ML-DC drives the alarm
    method = METHOD_MLDC;
    foreach (ml_conditions[i]) begin
      env_d = ml_conditions[i];
      settle_and_check($sformatf("ML-DC d=%0d", env_d));
      n_mldc++;
    end
    env_d = 33;
    calibrate_now();
    settle_and_check("ML-DC after calibration");
    n_mldc++;
    method = METHOD_DC;

    // 7. DVFS: load windows for modes 1 and 2, lock, try to overwrite,
    //    then sweep conditions in every mode
    calibrate_now();
    program_thr(1, 15 * 8, 25 * 8);
    program_thr(2, 19 * 8, 29 * 8);
    expect_eq("table unlocked", int'(thr_locked), 0);
    #1 thr_lock = 1'b1;
    @(posedge clk); #1 thr_lock = 1'b0;
    expect_eq("table locked", int'(thr_locked), 1);
    #1 thr_wr_en = 1'b1; thr_wr_mode = 2'd1;
    thr_wr_afn_l = cafn_t'(0); thr_wr_afn_h = cafn_t'(400);
    @(posedge clk); #1 thr_wr_en = 1'b0;
    foreach (dvfs_conditions[i]) begin
      bit alarm_mode0;
      env_d = dvfs_conditions[i];
      for (int m = 0; m < 3; m++) begin
        dvfs_mode = 2'(m);
        settle_and_check($sformatf("DVFS mode %0d d=%0d", m, env_d));
        if (m == 0) alarm_mode0 = alarm;
        else if (alarm != alarm_mode0) n_dvfs++;
      end
    end
    dvfs_mode = 2'd0;
    env_d = 33;

    // 8. readings hidden without raw access; the alarm still works
    raw_access = 1'b0;
    env_d = 45;
    repeat (20) @(posedge clk);
    #1;
    expect_eq("gated afn_a", int'(afn_a), 0);
    expect_eq("gated afn_r", int'(afn_r), 0);
    expect_eq("gated fn_a", int'(fn_a), 0);
    expect_eq("gated fn_r", int'(fn_r), 0);
    expect_eq("gated c_afn", int'(c_afn), 0);
    expect_eq("gated delta_dc", int'(delta_dc), 0);
    expect_eq("gated delta_mldc", int'(delta_mldc), 0);
    expect_eq("gated alarm_slow", int'(alarm_slow), int'(expected_c() < tl[0]));
    expect_eq("gated alarm", int'(alarm), 1);
    n_gated += int'(alarm);
    raw_access = 1'b1;
    env_d = 33;
    settle_and_check("raw access restored");

    // every mechanism must have happened
    if (n_adhoc == 0)        begin failures++; $display("FAIL no ad hoc calibration"); end
    if (n_periodic == 0)     begin failures++; $display("FAIL no periodic calibration"); end
    if (n_false_fixed == 0)  begin failures++; $display("FAIL no false alarm removed"); end
    if (n_missed_fixed == 0) begin failures++; $display("FAIL no missed alarm caught"); end
    if (n_slow == 0)         begin failures++; $display("FAIL no slow alarm"); end
    if (n_fast == 0)         begin failures++; $display("FAIL no fast alarm"); end
    if (n_error == 0)        begin failures++; $display("FAIL no error flag"); end
    if (n_mldc == 0)         begin failures++; $display("FAIL no ML-DC check"); end
    if (n_gated == 0)        begin failures++; $display("FAIL no alarm while readings hidden"); end
    if (n_dvfs == 0)         begin failures++; $display("FAIL no DVFS mode changed the alarm"); end
    checks += 10;
    $display("mechanisms: calibrations=%0d adhoc=%0d periodic=%0d false_fixed=%0d missed_fixed=%0d slow=%0d fast=%0d error=%0d mldc=%0d dvfs=%0d gated=%0d",
             cal_count, n_adhoc, n_periodic, n_false_fixed, n_missed_fixed, n_slow, n_fast, n_error, n_mldc, n_dvfs, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
