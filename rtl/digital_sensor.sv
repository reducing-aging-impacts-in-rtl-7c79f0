// Delay-based digital sensor: an artificial critical path sampled every clock.
//
// A toggle flip-flop produces a0, a square wave at half the clock frequency.
// a0 runs through N0 leading buffers and then N1 tapped buffers; the tap after
// buffer N0+k feeds sampling flip-flop k.  At each clock edge the flip-flops
// near the start have already seen the newest a0 edge and the far ones still
// hold the previous value, so the position of the 0/1 boundary in o measures
// how fast the silicon is under the present voltage, temperature and age.
// The structure and the sizes N0 = 9, N1 = 43 follow the evaluated sensor.
//
// The buffer chain is the behavioural delay_chain_model; the T flip-flop and
// the sampling flip-flops are ordinary logic.  en = 0 switches the sensor OFF
// (the Rarely-on sensor spends nearly all its life OFF): the T flip-flop and
// the samplers then hold, so nothing toggles.  How OFF is realised (clock
// gating here) is this design's choice.  rst clears the T flip-flop and the
// samplers.  o[k-1] is flip-flop k (O_k), registered on the rising edge.
module digital_sensor
  import dsens_pkg::*;
#(
  parameter int N0 = N0_DEF,
  parameter int N1 = N1_DEF
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [DLY_W-1:0] rise_delay_ps,
  input  logic [DLY_W-1:0] fall_delay_ps,
  input  logic [DLY_W-1:0] clk_period_ps,
  output logic [N1-1:0]    o
);

  logic          a0;
  logic [N1-1:0] taps;

  // Toggle flip-flop: a0 at F/2 while the sensor is ON
  always_ff @(posedge clk) begin
    if (rst)     a0 <= 1'b0;
    else if (en) a0 <= ~a0;
  end

  delay_chain_model #(.N0(N0), .N1(N1)) u_chain (
    .clk, .rst, .a0,
    .rise_delay_ps, .fall_delay_ps, .clk_period_ps,
    .taps
  );

  // Sampling flip-flops O1..ON1
  always_ff @(posedge clk) begin
    if (rst)     o <= '0;
    else if (en) o <= taps;
  end

endmodule
