// Clock-frequency workload in the FPGA configuration: eight sensor units
// with 22 leading buffers and 20 sampled buffers, AFN over 8 cycles, and an
// alarm when AFN < 8.5.  The clock is swept from 70 to 100 MHz in 2 MHz
// steps.  Per-buffer delays stand for FPGA routing: a rising edge takes
// 395 ps and a falling edge 380 ps, each sensor offset by -2..+2 ps of
// process variation.  The readings alternate between the depths of the two
// edge directions, so AFN = (FN_rise + FN_fall) / 2 with
// FN = floor(T/d) - 21; with these delays the alarm starts above 86 MHz.
// The testbench checks each sensor's AFN against that formula, that AFN never
// rises with frequency, that every alarm matches AFN < 8.5, and that the
// alarm is off at 86 MHz and on at 88 MHz for the nominal sensor.
module tb_fpga_clock_sweep;
  import dsens_pkg::*;
  localparam int N0 = 22, N1 = 20, NS = 8;
  localparam int D_RISE = 395, D_FALL = 380;

  logic             clk = 1'b0, rst = 1'b1;
  logic [DLY_W-1:0] period = 16'd14286;
  afn_t             afn   [NS];
  fn_t              fn    [NS];
  logic             valid [NS], err [NS], alarm [NS], slow [NS], fast [NS];
  int               checks = 0, failures = 0;
  int               pv [NS] = '{0, 1, -1, 2, -2, 1, 0, -1};
  int               last_afn [NS];
  int               alarm_free_max_mhz = 0, first_alarm_mhz = 0;

  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_sensor
    sensor_unit #(.N0(N0), .N1(N1)) u_unit (
      .clk, .rst, .en(1'b1), .clr(1'b0), .sel(2'd3), .thr(6'd10),
      .rise_delay_ps(16'(D_RISE + pv[s])), .fall_delay_ps(16'(D_FALL + pv[s])),
      .clk_period_ps(period),
      .fn(fn[s]), .afn(afn[s]), .afn_valid(valid[s]), .error(err[s])
    );
    alarm_generator u_alarm (
      .clk, .rst, .afn(cafn_t'(afn[s])), .valid(valid[s]),
      .afn_l(cafn_t'(68)), .afn_h(cafn_t'(1023)),
      .alarm(alarm[s]), .slow(slow[s]), .fast(fast[s])
    );
  end

  function automatic int fn_of(int t, int d);
    return t / d - N0 + 1;
  endfunction

  initial begin
    foreach (last_afn[s]) last_afn[s] = 1000;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int f = 70; f <= 100; f += 2) begin
      int t;
      t = (1000000 + f / 2) / f;                 // period in ps
      period = 16'(t);
      repeat (14) @(posedge clk);
      #1;
      for (int s = 0; s < NS; s++) begin
        int e;
        e = 4 * (fn_of(t, D_RISE + pv[s]) + fn_of(t, D_FALL + pv[s]));   // eighths
        checks += 3;
        if (int'(afn[s]) != e) begin
          failures++; $display("FAIL %0d MHz sensor %0d: AFN %0d/8 expected %0d/8", f, s, afn[s], e);
        end
        if (int'(afn[s]) > last_afn[s]) begin
          failures++; $display("FAIL %0d MHz sensor %0d: AFN rose", f, s);
        end
        if (alarm[s] != (int'(afn[s]) < 68)) begin
          failures++; $display("FAIL %0d MHz sensor %0d: alarm %b", f, s, alarm[s]);
        end
        last_afn[s] = int'(afn[s]);
      end
      if (!alarm[0]) alarm_free_max_mhz = f;
      else if (first_alarm_mhz == 0) first_alarm_mhz = f;
      $display("%0d MHz: AFN of sensor 0 = %0.3f, alarm %b", f, real'(afn[0]) / 8.0, alarm[0]);
    end
    checks += 2;
    if (alarm_free_max_mhz != 86) begin failures++; $display("FAIL last safe frequency %0d", alarm_free_max_mhz); end
    if (first_alarm_mhz != 88)    begin failures++; $display("FAIL first alarm at %0d", first_alarm_mhz); end
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
