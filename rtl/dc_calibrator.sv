// Differential Calibration (DC): corrects the aged Always-on sensor with the
// reading of a Rarely-on twin that has hardly aged.
//
// One adder/subtractor and one delta register do all the work.  In a
// calibration cycle (mode = CAL_CALIBRATE, both sensors ON) the unit computes
// delta = AFN_R - AFN_A and stores it.  In every operating cycle
// (mode = CAL_OPERATE) it computes C-AFN_A = AFN_A + delta, the reading the
// A-sensor would give if it were new, which is then compared with the alarm
// thresholds.  The delta stays in force until the next calibration.
//
// Timing: inputs are sampled at the rising edge; c_afn and delta are
// registers.  Because the single adder is busy subtracting during the
// calibration cycle, c_afn holds its previous value for that cycle (this
// design's choice).  c_afn_valid follows afn_valid with one cycle of latency.
// Values are fixed point with AFN_FRAC fraction bits; delta is kept signed so
// that a reference sensor slower than the active one by process variation is
// handled.  delta is 0 after reset until the first calibration.
module dc_calibrator
  import dsens_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  cal_mode_e mode,
  input  afn_t      afn_a,
  input  afn_t      afn_r,
  input  logic      afn_valid,
  output cafn_t     c_afn,
  output logic      c_afn_valid,
  output cafn_t     delta
);

  cafn_t op_a, op_b, result;

  // Shared adder/subtractor
  always_comb begin
    if (mode == CAL_CALIBRATE) begin
      op_a = cafn_t'(afn_r);
      op_b = -cafn_t'(afn_a);
    end else begin
      op_a = cafn_t'(afn_a);
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
