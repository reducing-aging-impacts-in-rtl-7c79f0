// Machine-learning based Differential Calibration (ML-DC).
//
// The DC idea applied on top of a linear regression.  A history register
// keeps the (AFN_A, AFN_R) pairs of the last M-1 calibrations.  The
// regression maps the present AFN_A and that history to AFN'_A, an estimate
// of what a new sensor would read.
//   Calibration cycle (both sensors ON): delta = AFN_R - AFN'_A is stored,
//   then the present pair is pushed into the history, so the regression at
//   TC_i uses TC_(i-M+1) .. TC_(i-1).
//   Operating cycle (only the A-sensor ON): C-AFN_A = AFN'_A + delta.
// Feature order: x[0] = AFN_A, x[2j+1] = history AFN_A of TC_(i-1-j),
// x[2j+2] = history AFN_R of TC_(i-1-j).
//
// Timing as in the DC unit: one shared adder/subtractor, registered c_afn and
// delta, c_afn held in the calibration cycle, one cycle of latency.
module mldc_calibrator
  import dsens_pkg::*;
#(
  parameter int M = ML_M
) (
  input  logic      clk,
  input  logic      rst,
  input  cal_mode_e mode,
  input  afn_t      afn_a,
  input  afn_t      afn_r,
  input  logic      afn_valid,
  input  weight_t   w [2*M-1],
  input  cafn_t     bias,
  output cafn_t     c_afn,
  output logic      c_afn_valid,
  output cafn_t     delta,
  output logic [$clog2(M)-1:0] hist_count  // calibrations in the history
);

  localparam int NF = 2 * M - 1;

  afn_t                 hist_a [M-1];
  afn_t                 hist_r [M-1];
  afn_t                 x [NF];
  cafn_t                afn_est;          // AFN'_A
  cafn_t                op_a, op_b, result;

  afn_history #(.M(M)) u_hist (
    .clk, .rst,
    .shift (mode == CAL_CALIBRATE),
    .afn_a, .afn_r,
    .hist_a, .hist_r,
    .count (hist_count)
  );

  always_comb begin
    x[0] = afn_a;
    for (int j = 0; j < M-1; j++) begin
      x[2*j+1] = hist_a[j];
      x[2*j+2] = hist_r[j];
    end
  end

  lr_engine #(.NF(NF)) u_lr (.x, .w, .bias, .y(afn_est));

  // Shared adder/subtractor
  always_comb begin
    if (mode == CAL_CALIBRATE) begin
      op_a = cafn_t'(afn_r);
      op_b = -afn_est;
    end else begin
      op_a = afn_est;
      op_b = delta;
    end
    result = op_a + op_b;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      delta       <= '0;
      c_afn       <= '0;
      c_afn_valid <= 1'b0;
    end else if (mode == CAL_CALIBRATE) begin
      delta <= result;
    end else begin
      c_afn       <= result;
      c_afn_valid <= afn_valid;
    end
  end

endmodule
