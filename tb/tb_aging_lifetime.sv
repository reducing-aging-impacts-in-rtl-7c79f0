// Lifetime workload for aging_calibrated_sensor at its default sizes:
// seven years of use with the reference sensor switched on once a month
// (84 monthly calibrations plus one when new), nominal window AFN 17..27,
// both calibration methods.
//
// Aging is a synthetic, saturating model of the active sensor's buffer
// delay: +5*m/(m+12) ps after m months (fast at first, then levelling off,
// the usual NBTI shape); the reference sensor does not age but is 1 ps
// slower by process variation.  Every month the calibration happens under a
// random operating condition (fresh buffer delay 26..48 ps at a 1000 ps
// clock, i.e. AFN about 12..30), then ten random conditions are checked.
// The truth is the alarm a new active sensor would give.  For each check the
// testbench counts false and missed alarms of the calibrated design (its
// alarm output) and of the same aged sensor without calibration (raw AFN_A
// against the window, computed here), verifies the calibrated AFN against
// FN = floor(1000/d) - 8, and requires calibration to cut the error count.
// The same checks are made for ML-DC: the method input is switched for a
// few cycles at every check.
//
// The ML-DC weights are trained here, before the run, by least squares on
// a different synthetic pair (faster aging, +6*m/(m+12) ps, and no process
// offset).  There are 1000 random samples.  Each sample has a random month,
// a random condition for the present reading and for each of the last four
// monthly calibrations, and as its label the reference reading at the
// present condition.  Entries older than the first calibration are zero, as
// in the history register.  A small ridge term keeps the weights small.
// The weights are then rounded to 8 fraction bits and the bias to eighths.
// A model of the history and of the regression arithmetic (rounding to
// eighths, saturation) predicts delta_mldc and the ML-DC calibrated AFN.
//
// The numbers depend on this synthetic aging model, not on silicon data.
module tb_aging_lifetime;
  import dsens_pkg::*;
  localparam int N0 = 9, M = 5, NF = 2 * M - 1, T = 1000, MONTHS = 84, PER_MONTH = 10;
  localparam int PV_R = 1;
  localparam int N_TRAIN = 1000, NP = NF + 1;

  logic             clk = 1'b0, rst = 1'b1, cal_req = 1'b0;
  cal_method_e      method = METHOD_DC;
  weight_t          lr_w [NF];
  cafn_t            lr_bias = '0;
  logic [DLY_W-1:0] a_d, r_d;
  logic             alarm, alarm_slow, alarm_fast, error_a, error_r, c_afn_valid, r_on, cal_busy;
  cafn_t            c_afn, delta_dc, delta_mldc;
  afn_t             afn_a, afn_r;
  fn_t              fn_a, fn_r;
  logic [15:0]      cal_count;
  logic [$clog2(M)-1:0] hist_count;
  logic             thr_locked;

  int checks = 0, failures = 0;
  int env_d = 33, aging = 0, month = 0;
  int exp_delta = 0;
  int false_cal = 0, missed_cal = 0, false_raw = 0, missed_raw = 0, true_alarms = 0, tests = 0;
  int false_ml = 0, missed_ml = 0, exp_delta_ml = 0;
  int ha[$], hr[$];   // expected ML-DC history, newest first, in eighths

  aging_calibrated_sensor dut (
    .clk, .rst, .raw_access(1'b1), .sel(2'd3), .thr(6'd8), .method, .dvfs_mode(2'd0),
    .thr_wr_en(1'b0), .thr_wr_mode(2'd0), .thr_wr_afn_l('0), .thr_wr_afn_h('0),
    .thr_lock(1'b1), .thr_locked,
    .cal_req, .cal_period('0), .lr_w, .lr_bias,
    .a_rise_delay_ps(a_d), .a_fall_delay_ps(a_d),
    .r_rise_delay_ps(r_d), .r_fall_delay_ps(r_d), .clk_period_ps(16'(T)),
    .alarm, .alarm_slow, .alarm_fast, .error_a, .error_r,
    .c_afn, .c_afn_valid, .afn_a, .afn_r, .fn_a, .fn_r,
    .delta_dc, .delta_mldc, .r_on, .cal_busy, .cal_count, .mldc_hist_count(hist_count)
  );

  always #5 clk = ~clk;

  assign a_d = 16'(env_d + aging);
  assign r_d = 16'(env_d + PV_R);

  function automatic int fn_of(int d);
    return T / d - N0 + 1;
  endfunction

  function automatic logic out_of_window(int afn8);
    return (afn8 < 17 * 8) || (afn8 > 27 * 8);
  endfunction

  // correction the calibration under the present condition must store
  function automatic int delta_now();
    return 8 * (fn_of(env_d + PV_R) - fn_of(env_d + aging));
  endfunction

  function automatic int age_of(int m, int rate);
    return (rate * m) / (m + 12);
  endfunction

  // regression as the hardware computes it, on the expected history
  function automatic int lr_hw(int a);
    longint acc;
    int     y;
    acc = longint'(a) * longint'(lr_w[0]);
    for (int j = 0; j < M - 1; j++) begin
      int hj_a, hj_r;
      hj_a = 0;
      hj_r = 0;
      if (j < ha.size()) begin
        hj_a = ha[j];
        hj_r = hr[j];
      end
      acc += longint'(hj_a) * longint'(lr_w[2*j+1]);
      acc += longint'(hj_r) * longint'(lr_w[2*j+2]);
    end
    y = int'((acc + 128) >>> 8) + int'(lr_bias);
    if (y > 1023) y = 1023;
    if (y < -1024) y = -1024;
    return y;
  endfunction

  // least-squares fit of bias + 9 weights on the training pair
  task automatic train();
    real ata [NP][NP];
    real aty [NP];
    real f [NP];
    real sol [NP];
    foreach (ata[i, j]) ata[i][j] = 0.0;
    foreach (aty[i]) aty[i] = 0.0;
    for (int n = 0; n < N_TRAIN; n++) begin
      int  t, e;
      real y;
      t = int'($urandom_range(0, MONTHS));
      e = int'($urandom_range(26, 48));
      f[0] = 1.0;
      f[1] = real'(fn_of(e + age_of(t, 6)));
      y    = real'(fn_of(e));
      for (int j = 0; j < M - 1; j++) begin
        int tj, ej;
        tj = t - 1 - j;
        ej = int'($urandom_range(26, 48));
        f[2*j+2] = (tj >= 0) ? real'(fn_of(ej + age_of(tj, 6))) : 0.0;
        f[2*j+3] = (tj >= 0) ? real'(fn_of(ej)) : 0.0;
      end
      for (int i = 0; i < NP; i++) begin
        aty[i] += f[i] * y;
        for (int j = 0; j < NP; j++) ata[i][j] += f[i] * f[j];
      end
    end
    for (int i = 1; i < NP; i++) ata[i][i] += 10.0;   // ridge, not on the bias
    // Gaussian elimination with partial pivoting
    for (int c = 0; c < NP; c++) begin
      int  p;
      real tmp, fac;
      p = c;
      for (int r = c + 1; r < NP; r++)
        if ((ata[r][c] < 0 ? -ata[r][c] : ata[r][c]) > (ata[p][c] < 0 ? -ata[p][c] : ata[p][c])) p = r;
      for (int j = 0; j < NP; j++) begin
        tmp = ata[c][j]; ata[c][j] = ata[p][j]; ata[p][j] = tmp;
      end
      tmp = aty[c]; aty[c] = aty[p]; aty[p] = tmp;
      for (int r = c + 1; r < NP; r++) begin
        fac = ata[r][c] / ata[c][c];
        for (int j = c; j < NP; j++) ata[r][j] -= fac * ata[c][j];
        aty[r] -= fac * aty[c];
      end
    end
    for (int i = NP - 1; i >= 0; i--) begin
      real acc;
      acc = aty[i];
      for (int j = i + 1; j < NP; j++) acc -= ata[i][j] * sol[j];
      sol[i] = acc / ata[i][i];
    end
    lr_bias = cafn_t'($rtoi($floor(sol[0] * 8.0 + 0.5)));
    for (int k = 0; k < NF; k++) lr_w[k] = weight_t'($rtoi($floor(sol[k+1] * 256.0 + 0.5)));
    $display("trained: bias %0d/8, weights/256: %0d %0d %0d %0d %0d %0d %0d %0d %0d", lr_bias,
             lr_w[0], lr_w[1], lr_w[2], lr_w[3], lr_w[4], lr_w[5], lr_w[6], lr_w[7], lr_w[8]);
  endtask

  // expected ML-DC state after a calibration under the present condition
  task automatic ml_calibrated();
    int a, r;
    a = 8 * fn_of(env_d + aging);
    r = 8 * fn_of(env_d + PV_R);
    exp_delta_ml = r - lr_hw(a);
    ha.push_front(a); hr.push_front(r);
    if (ha.size() > M - 1) begin void'(ha.pop_back()); void'(hr.pop_back()); end
  endtask

  initial begin
    train();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    while (cal_count == 0) @(posedge clk);
    exp_delta = delta_now();
    ml_calibrated();
    for (month = 0; month <= MONTHS; month++) begin
      aging = (5 * month) / (month + 12);
      if (month > 0) begin
        int n_before;
        env_d = int'($urandom_range(26, 48));
        repeat (12) @(posedge clk);
        n_before = int'(cal_count);
        #1 cal_req = 1'b1;
        @(posedge clk); #1 cal_req = 1'b0;
        while (int'(cal_count) == n_before) @(posedge clk);
        exp_delta = delta_now();
        ml_calibrated();
        @(posedge clk); #1;
        checks += 2;
        if (int'(delta_dc) != exp_delta) begin
          failures++; $display("FAIL month %0d: delta %0d expected %0d", month, delta_dc, exp_delta);
        end
        if (int'(delta_mldc) != exp_delta_ml) begin
          failures++; $display("FAIL month %0d: ML-DC delta %0d expected %0d", month, delta_mldc, exp_delta_ml);
        end
      end
      for (int i = 0; i < PER_MONTH; i++) begin
        logic truth, raw;
        int   c;
        env_d = int'($urandom_range(26, 48));
        repeat (14) @(posedge clk);
        #1;
        c     = 8 * fn_of(env_d + aging) + exp_delta;
        truth = out_of_window(8 * fn_of(env_d));
        raw   = out_of_window(8 * fn_of(env_d + aging));
        checks += 2;
        if (int'(c_afn) != c) begin failures++; $display("FAIL month %0d: c_afn %0d expected %0d", month, c_afn, c); end
        if (alarm != out_of_window(c)) begin failures++; $display("FAIL month %0d: alarm %b", month, alarm); end
        tests++;
        true_alarms += int'(truth);
        false_cal  += int'(alarm && !truth);
        missed_cal += int'(!alarm && truth);
        false_raw  += int'(raw && !truth);
        missed_raw += int'(!raw && truth);
        // the same condition with ML-DC driving the alarm
        method = METHOD_MLDC;
        repeat (2) @(posedge clk);
        #1;
        c = lr_hw(8 * fn_of(env_d + aging)) + exp_delta_ml;
        checks += 2;
        if (int'(c_afn) != c) begin failures++; $display("FAIL month %0d: ML-DC c_afn %0d expected %0d", month, c_afn, c); end
        if (alarm != out_of_window(c)) begin failures++; $display("FAIL month %0d: ML-DC alarm %b", month, alarm); end
        false_ml  += int'(alarm && !truth);
        missed_ml += int'(!alarm && truth);
        method = METHOD_DC;
      end
    end
    $display("lifetime: %0d checks of conditions, %0d true alarms", tests, true_alarms);
    $display("  without calibration: false %0d, missed %0d", false_raw, missed_raw);
    $display("  with DC calibration: false %0d, missed %0d", false_cal, missed_cal);
    $display("  with ML-DC calibration: false %0d, missed %0d", false_ml, missed_ml);
    expect_calibrations: begin
      checks++;
      if (int'(cal_count) != MONTHS + 1) begin failures++; $display("FAIL calibrations %0d", cal_count); end
      checks++;
      if (false_cal + missed_cal >= false_raw + missed_raw) begin
        failures++; $display("FAIL calibration did not reduce wrong alarms");
      end
      checks++;
      if (false_ml + missed_ml >= false_raw + missed_raw) begin
        failures++; $display("FAIL ML-DC calibration did not reduce wrong alarms");
      end
    end
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
