// Self-checking test of digital_sensor (N0 = 9, N1 = 43).
// Checks that O1 alternates every cycle while the sensor is ON (a0 at F/2),
// that the sampled word holds still while it is OFF, and that the position
// of the first phase change equals the number worked out from the buffer
// delay d and period T: the first k with ceil((N0+k)*d/T) > ceil((N0+1)*d/T).
// The nominal case d = 33 ps, T = 1000 ps must give 22.
module tb_digital_sensor;
  import dsens_pkg::*;
  localparam int N0 = 9, N1 = 43;

  logic             clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [DLY_W-1:0] rise_d = 16'd33, fall_d = 16'd33, period = 16'd1000;
  logic [N1-1:0]    o, o_prev;
  int               checks = 0, failures = 0;

  digital_sensor #(.N0(N0), .N1(N1)) dut (
    .clk, .rst, .en, .rise_delay_ps(rise_d), .fall_delay_ps(fall_d),
    .clk_period_ps(period), .o
  );

  always #5 clk = ~clk;

  function automatic int first_change(logic [N1-1:0] v);
    for (int k = 2; k <= N1; k++) if (v[k-1] != v[0]) return k;
    return N1;
  endfunction

  function automatic int expected_fn(int d, int t);
    int l1;
    l1 = ((N0 + 1) * d + t - 1) / t;
    for (int k = 2; k <= N1; k++) if (((N0 + k) * d + t - 1) / t > l1) return k;
    return N1;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    en  = 1'b1;
    repeat (6) @(posedge clk);
    #1;
    expect_eq("nominal FN", first_change(o), 22);
    // a0 toggles: O1 alternates
    for (int i = 0; i < 6; i++) begin
      o_prev = o;
      @(posedge clk); #1;
      expect_eq("O1 toggles", int'(o[0]), int'(!o_prev[0]));
      expect_eq("FN steady", first_change(o), 22);
    end
    // OFF: nothing moves
    en = 1'b0;
    @(posedge clk); #1;
    o_prev = o;
    repeat (5) begin
      @(posedge clk); #1;
      expect_eq("OFF holds", int'(o == o_prev), 1);
    end
    en = 1'b1;
    // random operating conditions within the sensor's range
    for (int n = 0; n < 150; n++) begin
      int d, t;
      d = 22 + int'($urandom_range(0, 30));
      t = 1000;
      rise_d = 16'(d); fall_d = 16'(d); period = 16'(t);
      repeat (6) @(posedge clk);
      #1;
      expect_eq($sformatf("FN d=%0d", d), first_change(o), expected_fn(d, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
