// Error checker: flags an abrupt change of the sensor reading.
//
// Error = 1 when |FN_i - FN_(i-1)| > THR.  The moving average hides a
// disturbance that lasts only a cycle or two (a voltage or clock glitch); this
// check compares each reading with the one before it.  FN_(i-1) is kept in a
// register; error is combinational from the present FN and that register.
// After rst or clr there is no previous reading yet and error stays 0 for one
// cycle (this design's choice).  THR is an input, as its value depends on the
// application.
module error_checker
  import dsens_pkg::*;
#(
  parameter int FN_W_P = FN_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clr,
  input  logic [FN_W_P-1:0] fn,
  input  logic [FN_W_P-1:0] thr,
  output logic              error
);

  logic [FN_W_P-1:0] fn_prev;
  logic              prev_valid;
  logic [FN_W_P-1:0] delta_fn;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      fn_prev    <= '0;
      prev_valid <= 1'b0;
    end else begin
      fn_prev    <= fn;
      prev_valid <= 1'b1;
    end
  end

  assign delta_fn = (fn >= fn_prev) ? fn - fn_prev : fn_prev - fn;
  assign error    = prev_valid && (delta_fn > thr);

endmodule
