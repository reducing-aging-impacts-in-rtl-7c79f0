// Position detector: turns the sampled delay-chain word into FN_i.
//
// In a clock cycle the first FN_i - 1 sampling flip-flops hold one phase of
// the toggling signal and flip-flop FN_i is the first in the complementary
// phase.  A priority encoder therefore looks for the lowest index k >= 2 with
// O_k != O_1 and returns k (1-based, as the flip-flops are numbered).  When a
// slow chain shows a second boundary further down, only the first one counts.
// If no flip-flop differs (a chain faster than its sizing assumes) the output
// saturates at N1, the fastest reading; that case is this design's choice.
// Purely combinational.
module position_detector
  import dsens_pkg::*;
#(
  parameter int N1 = N1_DEF,
  parameter int W  = $clog2(N1 + 1)
) (
  input  logic [N1-1:0] o,    // o[k-1] = O_k
  output logic [W-1:0]  fn
);

  always_comb begin
    fn = W'(N1);
    for (int k = N1; k >= 2; k--) begin
      if (o[k-1] != o[0]) fn = W'(k);
    end
  end

endmodule
