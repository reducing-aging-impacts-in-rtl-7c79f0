// Self-checking test of the behavioural delay-chain model (N0 = 9, N1 = 43).
// A toggling a0 is applied for several cycles under random buffer delays and
// clock periods.  With equal rise and fall delays, tap k must show the a0
// value launched L-1 edges ago, L = ceil((N0+k)*d / T), i.e. a0 inverted when
// L is even.  With unequal delays a 0->1 edge and a 1->0 edge reach
// different depths; the test checks that the boundary lies where the delay
// of the newest edge puts it.  Also checks that a steady a0 reaches all taps.
module tb_delay_chain_model;
  import dsens_pkg::*;
  localparam int N0 = 9, N1 = 43, HIST = 4;

  logic             clk = 1'b0, rst = 1'b1, a0 = 1'b0;
  logic [DLY_W-1:0] rise_d, fall_d, period;
  logic [N1-1:0]    taps;
  int               checks = 0, failures = 0;

  delay_chain_model #(.N0(N0), .N1(N1), .HIST(HIST)) dut (
    .clk, .rst, .a0, .rise_delay_ps(rise_d), .fall_delay_ps(fall_d),
    .clk_period_ps(period), .taps
  );

  always #5 clk = ~clk;

  // a0 toggles at every edge, as the T flip-flop does
  logic run = 1'b0;
  always_ff @(posedge clk) if (run) a0 <= ~a0;

  task automatic check_sym(int d, int t);
    logic expv;
    int   lag;
    for (int k = 1; k <= N1; k++) begin
      lag  = ((N0 + k) * d + t - 1) / t;
      expv = (lag > HIST) ? a0 ^ 1'((HIST - 1) & 1) : a0 ^ 1'((lag - 1) & 1);
      checks++;
      if (taps[k-1] != expv) begin
        failures++;
        $display("FAIL sym d=%0d T=%0d tap %0d = %b expected %b", d, t, k, taps[k-1], expv);
      end
    end
  endtask

  initial begin
    rise_d = 16'd33; fall_d = 16'd33; period = 16'd1000;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // steady a0: every tap equals it
    repeat (HIST + 1) @(posedge clk);
    #1;
    checks++;
    if (taps != '0) begin failures++; $display("FAIL steady taps=%b", taps); end
    run = 1'b1;
    for (int n = 0; n < 200; n++) begin
      int d, t;
      d = 10 + int'($urandom_range(0, 60));
      t = 600 + int'($urandom_range(0, 1400));
      if (n == 0) begin d = 33; t = 1000; end      // nominal: boundary at 22
      rise_d = 16'(d); fall_d = 16'(d); period = 16'(t);
      repeat (HIST + 1) @(posedge clk);
      #1;
      check_sym(d, t);
      if (n == 0) begin
        checks++;
        if (taps[20] == taps[21] || taps[0] != taps[20]) begin
          failures++; $display("FAIL nominal boundary not at tap 22: %b", taps);
        end
      end
    end
    // unequal delays: falling faster than rising
    for (int n = 0; n < 100; n++) begin
      int dr, df, t, dd, kb;
      dr = 30 + int'($urandom_range(0, 10));
      df = dr - 1 - int'($urandom_range(0, 5));
      t  = 1000;
      rise_d = 16'(dr); fall_d = 16'(df); period = 16'(t);
      repeat (HIST + 1) @(posedge clk);
      #1;
      // newest edge: rising if a0 = 1; it reaches taps with (N0+k)*d <= T
      dd = a0 ? dr : df;
      kb = t / dd - N0;                       // deepest tap reached
      for (int k = 1; k <= N1; k++) begin
        checks++;
        if ((k <= kb) ? (taps[k-1] != a0) : (taps[k-1] == a0 && (N0 + k) * dd <= 2 * t)) begin
          // beyond the boundary the tap must show the previous value as long
          // as the edge before it (of the other direction) has arrived
          if (!(k > kb && (N0 + k) * (a0 ? df : dr) > 2 * t)) begin
            failures++;
            $display("FAIL asym dr=%0d df=%0d a0=%b tap %0d = %b", dr, df, a0, k, taps[k-1]);
          end
        end
      end
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
