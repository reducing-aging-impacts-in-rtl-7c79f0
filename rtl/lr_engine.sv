// Linear-regression inference for the ML-DC scheme.
//
// y = bias + sum_k w[k] * x[k], a first-degree polynomial whose weights are
// trained offline and loaded into the chip.  The features are the present
// AFN_A and the 2M-2 readings of the history register (NF = 2M-1 = 9 for
// M = 5).  One multiplier per feature and an adder tree, all combinational.
//
// Number formats (this design's choice): x is unsigned AFN fixed point with
// AFN_FRAC fraction bits; w is signed with W_FRAC fraction bits; the weighted
// sum is rounded to the nearest AFN step, bias (signed, AFN fixed point) is
// added, and the result is saturated to the signed calibrated-AFN range.
module lr_engine
  import dsens_pkg::*;
#(
  parameter int NF = LR_NF
) (
  input  afn_t    x [NF],
  input  weight_t w [NF],
  input  cafn_t   bias,
  output cafn_t   y
);

  localparam int PROD_W = AFN_W + 1 + W_W;
  localparam int ACC_W  = PROD_W + $clog2(NF) + 1;
  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'(2 ** (CAFN_W - 1) - 1);
  localparam logic signed [ACC_W-1:0] Y_MIN = -ACC_W'(2 ** (CAFN_W - 1));

  logic signed [ACC_W-1:0] acc, scaled, total;

  always_comb begin
    acc = '0;
    for (int k = 0; k < NF; k++) begin
      acc = acc + ACC_W'($signed({1'b0, x[k]}) * w[k]);
    end
    scaled = (acc + ACC_W'(1 << (W_FRAC - 1))) >>> W_FRAC;
    total  = scaled + ACC_W'(bias);
    if (total > Y_MAX)      y = cafn_t'(Y_MAX);
    else if (total < Y_MIN) y = cafn_t'(Y_MIN);
    else                    y = cafn_t'(total);
  end

endmodule
