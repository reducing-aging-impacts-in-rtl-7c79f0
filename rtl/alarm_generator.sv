// Alarm generator: Alarm = 0 when AFN_l <= AFN <= AFN_h, 1 otherwise.
//
// A reading below AFN_l means the logic runs slower than its specification
// allows (setup violations threaten); above AFN_h it runs faster than
// expected (over-clocking, clock glitch, over-voltage).  slow and fast tell
// the two sides apart; alarm is their OR.  All three are registered (one
// cycle) and held at 0 while the AFN is not valid (this design's choice).
// Values are signed fixed point with AFN_FRAC fraction bits.
module alarm_generator
  import dsens_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  cafn_t afn,
  input  logic  valid,
  input  cafn_t afn_l,
  input  cafn_t afn_h,
  output logic  alarm,
  output logic  slow,
  output logic  fast
);

  always_ff @(posedge clk) begin
    if (rst) begin
      slow <= 1'b0;
      fast <= 1'b0;
    end else begin
      slow <= valid && (afn < afn_l);
      fast <= valid && (afn > afn_h);
    end
  end

  assign alarm = slow | fast;

endmodule
