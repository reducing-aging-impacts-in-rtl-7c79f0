// Calibration controller: decides when the Rarely-on sensor is ON and sets
// the mode of the calibrators' adder/subtractor.
//
// The reference sensor must stay OFF almost all the time so that it does not
// age.  A calibration starts on a cal_req pulse (ad hoc), when the period
// counter reaches cal_period (periodic; 0 disables it), and once after reset
// if CAL_AT_RESET is set, which records the process-variation offset of the
// new pair.  Sequence:
//   WAKE  : r_en = 1, r_clr = 1 for SETTLE cycles, dropping the first
//           unstable readings of the freshly started delay chain;
//   WAIT  : r_en = 1 until both AFNs are valid (N = 2^SEL readings);
//           in that same cycle mode = CAL_CALIBRATE for one cycle;
//   IDLE  : r_en = 0, mode = CAL_OPERATE.
// With SETTLE = 2 and N = 8 the reference sensor is ON for 11 cycles per
// calibration.  A request that arrives during a calibration is kept and
// served next.  The sequence is this design's own; the source only states
// that the controller sets the adder/subtractor mode and that the reference
// sensor is switched on for a few cycles, periodically or ad hoc.
module calibration_controller
  import dsens_pkg::*;
#(
  parameter int SETTLE       = 2,
  parameter int CNT_W        = 56,
  parameter bit CAL_AT_RESET = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cal_req,
  input  logic [CNT_W-1:0] cal_period,
  input  logic             a_afn_valid,
  input  logic             r_afn_valid,
  output logic             r_en,
  output logic             r_clr,
  output cal_mode_e        mode,
  output logic             busy,
  output logic [15:0]      cal_count
);

  typedef enum logic [1:0] {S_IDLE, S_WAKE, S_WAIT} state_e;

  state_e                        state;
  logic [$clog2(SETTLE+1)-1:0]   settle_cnt;
  logic [CNT_W-1:0]              period_cnt;
  logic                          pending;
  logic                          period_hit;
  logic                          capture;

  assign period_hit = (cal_period != '0) && (period_cnt >= cal_period - 1'b1);
  assign capture    = (state == S_WAIT) && a_afn_valid && r_afn_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      settle_cnt <= '0;
      period_cnt <= '0;
      pending    <= CAL_AT_RESET;
      cal_count  <= '0;
    end else begin
      // period counter runs from one calibration start to the next
      if (period_hit || (state == S_IDLE && pending)) period_cnt <= '0;
      else                                            period_cnt <= period_cnt + 1'b1;

      case (state)
        S_IDLE: begin
          if (pending || cal_req || period_hit) begin
            state      <= S_WAKE;
            settle_cnt <= '0;
            pending    <= 1'b0;
          end
        end
        S_WAKE: begin
          if (cal_req || period_hit) pending <= 1'b1;
          settle_cnt <= settle_cnt + 1'b1;
          if (32'(settle_cnt) == SETTLE - 1) state <= S_WAIT;
        end
        S_WAIT: begin
          if (cal_req || period_hit) pending <= 1'b1;
          if (capture) begin
            state     <= S_IDLE;
            cal_count <= cal_count + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign r_en  = (state != S_IDLE);
  assign r_clr = (state == S_WAKE);
  assign busy  = (state != S_IDLE);
  assign mode  = capture ? CAL_CALIBRATE : CAL_OPERATE;

  // The reference sensor is switched OFF right after it is used
  a_off_after_cal: assert property (@(posedge clk) disable iff (rst)
                                    mode == CAL_CALIBRATE |=> !r_en);
  a_cal_needs_valid: assert property (@(posedge clk) disable iff (rst)
                                      mode == CAL_CALIBRATE |-> r_afn_valid && a_afn_valid);

endmodule
