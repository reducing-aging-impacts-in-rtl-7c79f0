// History shift register of the ML-DC scheme.
//
// Keeps the (AFN_A, AFN_R) pairs read at the last M-1 calibration times
// TC_(i-M+1) .. TC_(i-1), newest in entry 0.  A pulse on shift pushes the
// present pair in and drops the oldest.  count tells how many pairs have been
// stored since reset (saturating at M-1).  M = 5 is the evaluated depth.
// The register is cleared by reset; what the regression should see before
// M-1 calibrations have happened is not specified, and zeros are used.
module afn_history
  import dsens_pkg::*;
#(
  parameter int M = ML_M
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   shift,
  input  afn_t                   afn_a,
  input  afn_t                   afn_r,
  output afn_t                   hist_a [M-1],
  output afn_t                   hist_r [M-1],
  output logic [$clog2(M)-1:0]   count
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < M-1; i++) begin
        hist_a[i] <= '0;
        hist_r[i] <= '0;
      end
      count <= '0;
    end else if (shift) begin
      hist_a[0] <= afn_a;
      hist_r[0] <= afn_r;
      for (int i = 1; i < M-1; i++) begin
        hist_a[i] <= hist_a[i-1];
        hist_r[i] <= hist_r[i-1];
      end
      if (count != $clog2(M)'(M-1)) count <= count + 1'b1;
    end
  end

endmodule
