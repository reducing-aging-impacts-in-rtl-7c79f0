// AFN calculator: moving average of FN over the last N = 2^SEL clock cycles.
//
// An 8-entry shift register takes FN_i every cycle (entry 0 newest).  SEL
// picks entry N-1 (entries 0, 1, 3 or 7), the value that is about to leave the
// window, and the accumulator updates SUM <= SUM + FN_i - FN_(i-N), so SUM is
// always the sum of the last N readings and costs one adder and one
// subtractor whatever N is.  AFN = SUM / N is a shift; the shifted-out bits
// are kept as a 3-bit fraction so that averages like 15.5 stay exact
// (afn = SUM << (3 - SEL), unsigned fixed point with 3 fraction bits).
// This follows the published AFN calculator drawing; keeping the fraction is
// this design's choice.
//
// Timing: SUM and the shift register update on the rising edge; afn is
// combinational from SUM, so it includes FN values up to the last edge.
// afn_valid rises once N readings have entered after rst or clr.  SEL must be
// held steady; changing it requires rst or clr, as in the source design.  clr
// is a synchronous restart used when a sensor is switched on.
module afn_calculator
  import dsens_pkg::*;
#(
  parameter int FN_W_P = FN_W,
  parameter int SEL_WP = SEL_W,
  localparam int FRAC  = (1 << SEL_WP) - 1    // largest SEL = fraction bits
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clr,
  input  logic [FN_W_P-1:0]         fn,
  input  logic [SEL_WP-1:0]         sel,
  output logic [FN_W_P+FRAC-1:0]    afn,   // SUM / N, FRAC fraction bits
  output logic                      afn_valid
);

  localparam int DEPTH = 1 << FRAC;           // largest N
  localparam int SUM_W = FN_W_P + FRAC;

  logic [SUM_W-1:0]     sum;                  // SUM
  logic [FN_W_P-1:0]    sr [DEPTH];
  logic [FN_W_P-1:0]    oldest;
  logic [FRAC:0]        fill;                 // readings taken, saturates at N
  logic [FRAC:0]        n_sel;

  assign n_sel  = (FRAC+1)'(1) << sel;
  assign oldest = sr[FRAC'(n_sel - 1'b1)];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      sum  <= '0;
      fill <= '0;
    end else begin
      sr[0] <= fn;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      sum <= sum + SUM_W'(fn) - SUM_W'(oldest);
      if (fill < n_sel) fill <= fill + 1'b1;
    end
  end

  assign afn       = sum << (FRAC - 32'(sel));
  assign afn_valid = (fill == n_sel);

endmodule
