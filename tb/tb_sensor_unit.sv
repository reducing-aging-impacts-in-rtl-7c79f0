// Self-checking test of one sensor with its peripherals (N0 = 9, N1 = 43).
// Operating conditions are set through the delay-chain model:
//  - nominal, d = 33 ps at T = 1000 ps: FN = 22 and AFN = 22 for every N;
//  - a 0->1 edge slower than a 1->0 edge (43 ps / 41 ps): FN alternates
//    15, 16 and AFN = 15.5 for N >= 2;
//  - a hotter / lower-voltage chain (d = 45): lower AFN, computed here;
//  - a one-cycle delay glitch: Error must fire when the jump exceeds THR
//    and stay quiet with a large THR.
// Also checks that AFN becomes valid N cycles after the reset plus one
// cycle for the first sample.
module tb_sensor_unit;
  import dsens_pkg::*;
  localparam int N0 = 9, N1 = 43;

  logic             clk = 1'b0, rst = 1'b1, en = 1'b1, clr = 1'b0;
  logic [SEL_W-1:0] sel = 2'd3;
  fn_t              thr = 6'd4, fn;
  logic [DLY_W-1:0] rise_d = 16'd33, fall_d = 16'd33, period = 16'd1000;
  afn_t             afn;
  logic             afn_valid, error;
  int               checks = 0, failures = 0, errors_seen = 0;

  sensor_unit #(.N0(N0), .N1(N1)) dut (
    .clk, .rst, .en, .clr, .sel, .thr,
    .rise_delay_ps(rise_d), .fall_delay_ps(fall_d), .clk_period_ps(period),
    .fn, .afn, .afn_valid, .error
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (error) errors_seen++;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // FN for equal rise and fall delay d at T = 1000 ps
  function automatic int fn_of(int d);
    for (int k = 2; k <= N1; k++)
      if (((N0 + k) * d + 999) / 1000 > ((N0 + 1) * d + 999) / 1000) return k;
    return N1;
  endfunction

  initial begin
    int cyc;
    for (int s = 0; s < 4; s++) begin
      sel = SEL_W'(s);
      rst = 1'b1;
      @(posedge clk); #1;
      rst = 1'b0;
      // clr for the first two unstable cycles, as when a sensor wakes up
      clr = 1'b1;
      repeat (2) @(posedge clk);
      #1;
      clr = 1'b0;
      cyc = 0;
      while (!afn_valid && cyc < 50) begin @(posedge clk); #1; cyc++; end
      expect_eq($sformatf("valid latency SEL=%0d", s), cyc, 1 << s);
      expect_eq($sformatf("nominal AFN SEL=%0d", s), int'(afn), 22 * 8);
    end
    // unequal edges: 15/16 -> 15.5
    rise_d = 16'd43; fall_d = 16'd41;
    repeat (10) @(posedge clk);
    #1;
    expect_eq("AFN 15.5", int'(afn), 124);
    // slower chain
    rise_d = 16'd45; fall_d = 16'd45;
    repeat (10) @(posedge clk);
    #1;
    expect_eq("slow AFN", int'(afn), fn_of(45) * 8);
    // glitch larger than THR
    rise_d = 16'd33; fall_d = 16'd33;
    repeat (10) @(posedge clk);
    #1;
    errors_seen = 0;
    thr = 6'd30;
    rise_d = 16'd60; fall_d = 16'd60;
    @(posedge clk); #1;
    rise_d = 16'd33; fall_d = 16'd33;
    repeat (4) @(posedge clk);
    #1;
    expect_eq("no error with THR=30", errors_seen, 0);
    thr = 6'd4;
    rise_d = 16'd60; fall_d = 16'd60;
    @(posedge clk); #1;
    rise_d = 16'd33; fall_d = 16'd33;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (errors_seen == 0) begin failures++; $display("FAIL glitch not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
