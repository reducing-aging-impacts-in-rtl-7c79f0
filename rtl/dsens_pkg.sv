// Shared constants and types of the aging-calibrated digital sensor.
//
// The sensor is a tapped delay chain of N0 leading buffers followed by N1
// buffers, each of the latter sampled by a flip-flop.  FN is the index of the
// first sampling flip-flop that disagrees with the first one, so it needs
// clog2(N1+1) bits.  AFN, the average of FN over N = 2^SEL cycles (SEL in
// 0..3, N up to 8), is carried as unsigned fixed point with AFN_FRAC = 3
// fraction bits so that averages such as 15.5 are exact.  Calibrated values
// (AFN plus a signed correction) are signed with two extra integer bits.
//
// N0 = 9 and N1 = 43 are the sizes of the evaluated sensor; the averaging
// depth of 8 and the 2-bit SEL follow the AFN calculator drawing.  The fixed
// point formats and the LR weight format are this design's own choice.
package dsens_pkg;

  localparam int N0_DEF    = 9;
  localparam int N1_DEF    = 43;
  localparam int FN_W      = $clog2(N1_DEF + 1);     // 6
  localparam int SEL_W     = 2;
  localparam int AFN_FRAC  = (1 << SEL_W) - 1;        // 3
  localparam int AFN_W     = FN_W + AFN_FRAC;         // 9, unsigned
  localparam int CAFN_W    = AFN_W + 2;               // 11, signed
  localparam int DLY_W     = 16;                      // picoseconds

  // Linear regression of the ML-DC scheme
  localparam int ML_M      = 5;
  localparam int LR_NF     = 2 * ML_M - 1;            // 9 features
  localparam int W_W       = 16;                      // signed weight width
  localparam int W_FRAC    = 8;                       // weight fraction bits

  typedef logic [FN_W-1:0]          fn_t;
  typedef logic [AFN_W-1:0]         afn_t;
  typedef logic signed [CAFN_W-1:0] cafn_t;
  typedef logic signed [W_W-1:0]    weight_t;

  // Adder/subtractor mode chosen by the calibration controller
  typedef enum logic {
    CAL_OPERATE   = 1'b0,  // C-AFN_A = AFN_A (+ LR) + delta
    CAL_CALIBRATE = 1'b1   // delta = AFN_R - AFN_A (or - AFN'_A)
  } cal_mode_e;

  // Which calibrated value drives the alarm
  typedef enum logic {
    METHOD_DC   = 1'b0,
    METHOD_MLDC = 1'b1
  } cal_method_e;

  // Integer k converted to AFN fixed point
  function automatic cafn_t to_cafn(input int k);
    return cafn_t'(k <<< AFN_FRAC);
  endfunction

endpackage
