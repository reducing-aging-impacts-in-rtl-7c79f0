// One digital sensor with its peripherals: sensor, position detector, AFN
// calculator and error checker, as in the published peripheral diagram.
//
// Every clock the sampled flip-flop word O1..ON1 goes to the position
// detector, whose FN_i feeds both the AFN calculator (moving average over
// N = 2^SEL cycles, sent on to the calibration circuitry) and the error
// checker (|FN_i - FN_(i-1)| > THR).  The design instantiates this unit twice:
// as the Always-on sensor and as the Rarely-on reference sensor.
//
// Timing: O is registered at an edge, FN is combinational from O, AFN comes
// from the SUM register one edge later; error is combinational from FN.
// en switches the sensor ON; clr restarts averaging and error checking
// (used after switching ON so the first unstable cycles are dropped).  The
// environment inputs drive the behavioural delay-chain model only.
module sensor_unit
  import dsens_pkg::*;
#(
  parameter int N0 = N0_DEF,
  parameter int N1 = N1_DEF
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             clr,
  input  logic [SEL_W-1:0] sel,
  input  fn_t              thr,
  input  logic [DLY_W-1:0] rise_delay_ps,
  input  logic [DLY_W-1:0] fall_delay_ps,
  input  logic [DLY_W-1:0] clk_period_ps,
  output fn_t              fn,
  output afn_t             afn,
  output logic             afn_valid,
  output logic             error
);

  logic [N1-1:0] o;

  digital_sensor #(.N0(N0), .N1(N1)) u_sensor (
    .clk, .rst, .en, .rise_delay_ps, .fall_delay_ps, .clk_period_ps, .o
  );

  position_detector #(.N1(N1), .W(FN_W)) u_pos (.o, .fn);

  afn_calculator u_afn (
    .clk, .rst, .clr, .fn, .sel, .afn, .afn_valid
  );

  error_checker u_err (.clk, .rst, .clr, .fn, .thr, .error);

endmodule
