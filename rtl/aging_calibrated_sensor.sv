// Aging-calibrated digital sensor: top level.
//
// A delay-based digital sensor ages with use (NBTI/HCI make its buffers
// slower), so its AFN reading drifts down and a fixed alarm window starts to
// raise false alarms on the slow side and to miss them on the fast side.
// This design pairs the Always-on sensor (A) with an identical Rarely-on
// sensor (R) placed next to it.  R is switched ON only for a few cycles per
// calibration, so it stays practically new; the difference between the two
// readings at calibration time is the aging offset, applied to every later
// A reading until the next calibration.
//
//   sensor A  -> AFN_A -+-> DC calibrator    -+
//   sensor R  -> AFN_R -+-> ML-DC calibrator -+-> method mux -> alarm (Eq. 2)
//                            ^ mode                               ^ AFN_l/AFN_h
//   calibration controller --+ (R on/off, subtract/add)   DVFS threshold table
//
// Both calibrators run side by side; method picks which one drives the alarm
// (both schemes are offered; the selection input is this design's choice).
// The threshold table is loaded after reset through the thr_wr_* port (or
// keeps its nominal defaults) and then frozen with thr_lock.
// Each sensor unit also flags abrupt FN jumps larger than THR (error_a,
// error_r; error_r only while R is ON).
//
// Latency from a sampled sensor word to the alarm: FN is combinational from
// the sampling flip-flops, AFN one edge later, C-AFN one more, alarm one
// more.  The environment inputs (*_delay_ps, clk_period_ps) feed the
// behavioural delay-chain models and stand for the physical conditions; they
// are not pins of a real implementation.
//
// The readings (FN, AFN, C-AFN and the corrections) reveal how the chip's
// own supply and temperature move, which is a side channel.  Following the
// rule that such data must not leave the sensor for unprivileged users,
// these outputs read as zero unless raw_access is high; the system drives
// raw_access only for privileged software or test.  The alarm, error and
// calibration status outputs are always visible.
module aging_calibrated_sensor
  import dsens_pkg::*;
#(
  parameter int N0      = N0_DEF,
  parameter int N1      = N1_DEF,
  parameter int M       = ML_M,
  parameter int N_MODES = 3,
  parameter int SETTLE  = 2,
  parameter int CNT_W   = 56
) (
  input  logic                       clk,
  input  logic                       rst,
  // configuration
  input  logic                       raw_access,   // 1: readings visible
  input  logic [SEL_W-1:0]           sel,          // N = 2^SEL
  input  fn_t                        thr,          // error threshold THR
  input  cal_method_e                method,
  input  logic [$clog2(N_MODES)-1:0] dvfs_mode,
  // threshold table programming (write-once until thr_lock)
  input  logic                       thr_wr_en,
  input  logic [$clog2(N_MODES)-1:0] thr_wr_mode,
  input  cafn_t                      thr_wr_afn_l,
  input  cafn_t                      thr_wr_afn_h,
  input  logic                       thr_lock,
  output logic                       thr_locked,
  input  logic                       cal_req,
  input  logic [CNT_W-1:0]           cal_period,   // 0: no periodic calibration
  input  weight_t                    lr_w [2*M-1],
  input  cafn_t                      lr_bias,
  // environment of the two delay chains (behavioural models)
  input  logic [DLY_W-1:0]           a_rise_delay_ps,
  input  logic [DLY_W-1:0]           a_fall_delay_ps,
  input  logic [DLY_W-1:0]           r_rise_delay_ps,
  input  logic [DLY_W-1:0]           r_fall_delay_ps,
  input  logic [DLY_W-1:0]           clk_period_ps,
  // results
  output logic                       alarm,
  output logic                       alarm_slow,
  output logic                       alarm_fast,
  output logic                       error_a,
  output logic                       error_r,
  output cafn_t                      c_afn,
  output logic                       c_afn_valid,
  output afn_t                       afn_a,
  output afn_t                       afn_r,
  output fn_t                        fn_a,
  output fn_t                        fn_r,
  output cafn_t                      delta_dc,
  output cafn_t                      delta_mldc,
  output logic                       r_on,
  output logic                       cal_busy,
  output logic [15:0]                cal_count,
  output logic [$clog2(M)-1:0]       mldc_hist_count
);

  logic      a_valid, r_valid, r_clr, r_err_raw;
  cal_mode_e mode;
  cafn_t     c_afn_dc, c_afn_ml, afn_l, afn_h;
  logic      c_valid_dc, c_valid_ml;
  // readings before the access gate
  afn_t      afn_a_i, afn_r_i;
  fn_t       fn_a_i, fn_r_i;
  cafn_t     c_afn_i, delta_dc_i, delta_mldc_i;

  sensor_unit #(.N0(N0), .N1(N1)) u_sensor_a (
    .clk, .rst, .en(1'b1), .clr(1'b0), .sel, .thr,
    .rise_delay_ps(a_rise_delay_ps), .fall_delay_ps(a_fall_delay_ps), .clk_period_ps,
    .fn(fn_a_i), .afn(afn_a_i), .afn_valid(a_valid), .error(error_a)
  );

  sensor_unit #(.N0(N0), .N1(N1)) u_sensor_r (
    .clk, .rst, .en(r_on), .clr(r_clr), .sel, .thr,
    .rise_delay_ps(r_rise_delay_ps), .fall_delay_ps(r_fall_delay_ps), .clk_period_ps,
    .fn(fn_r_i), .afn(afn_r_i), .afn_valid(r_valid), .error(r_err_raw)
  );

  assign error_r = r_err_raw && r_on;

  calibration_controller #(.SETTLE(SETTLE), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst, .cal_req, .cal_period,
    .a_afn_valid(a_valid), .r_afn_valid(r_valid),
    .r_en(r_on), .r_clr, .mode, .busy(cal_busy), .cal_count
  );

  dc_calibrator u_dc (
    .clk, .rst, .mode, .afn_a(afn_a_i), .afn_r(afn_r_i), .afn_valid(a_valid),
    .c_afn(c_afn_dc), .c_afn_valid(c_valid_dc), .delta(delta_dc_i)
  );

  mldc_calibrator #(.M(M)) u_mldc (
    .clk, .rst, .mode, .afn_a(afn_a_i), .afn_r(afn_r_i), .afn_valid(a_valid),
    .w(lr_w), .bias(lr_bias),
    .c_afn(c_afn_ml), .c_afn_valid(c_valid_ml), .delta(delta_mldc_i),
    .hist_count(mldc_hist_count)
  );

  assign c_afn_i     = (method == METHOD_MLDC) ? c_afn_ml   : c_afn_dc;
  assign c_afn_valid = (method == METHOD_MLDC) ? c_valid_ml : c_valid_dc;

  dvfs_threshold_table #(.N_MODES(N_MODES)) u_thr (
    .clk, .rst, .wr_en(thr_wr_en), .wr_mode(thr_wr_mode),
    .wr_afn_l(thr_wr_afn_l), .wr_afn_h(thr_wr_afn_h), .lock(thr_lock),
    .locked(thr_locked), .mode(dvfs_mode), .afn_l, .afn_h
  );

  alarm_generator u_alarm (
    .clk, .rst, .afn(c_afn_i), .valid(c_afn_valid), .afn_l, .afn_h,
    .alarm, .slow(alarm_slow), .fast(alarm_fast)
  );

  // access gate for the readings
  assign afn_a      = raw_access ? afn_a_i      : '0;
  assign afn_r      = raw_access ? afn_r_i      : '0;
  assign fn_a       = raw_access ? fn_a_i       : '0;
  assign fn_r       = raw_access ? fn_r_i       : '0;
  assign c_afn      = raw_access ? c_afn_i      : '0;
  assign delta_dc   = raw_access ? delta_dc_i   : '0;
  assign delta_mldc = raw_access ? delta_mldc_i : '0;

endmodule
