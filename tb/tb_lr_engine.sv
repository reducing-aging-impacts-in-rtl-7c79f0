// Self-checking test of lr_engine (9 features).  The expected output is
// computed here in real arithmetic: y = bias + sum w_k x_k, with x in eighths
// and w in 256ths, rounded to the nearest eighth and saturated to the signed
// 11-bit range.  Covers identity weights, random weights and saturation.
module tb_lr_engine;
  import dsens_pkg::*;
  localparam int NF = 9;

  logic    clk = 1'b0;
  afn_t    x [NF];
  weight_t w [NF];
  cafn_t   bias, y;
  int      checks = 0, failures = 0;

  lr_engine #(.NF(NF)) dut (.x, .w, .bias, .y);

  always #5 clk = ~clk;

  function automatic int model();
    real acc;
    int  r;
    acc = 0.0;
    for (int k = 0; k < NF; k++) acc += (real'(int'(x[k])) / 8.0) * (real'(int'(w[k])) / 256.0);
    r = $rtoi($floor(acc * 8.0 + 0.5)) + int'(bias);
    if (r > 1023) r = 1023;
    if (r < -1024) r = -1024;
    return r;
  endfunction

  task automatic check(string what);
    #1;
    checks++;
    if (int'(y) != model()) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", what, y, model());
    end
  endtask

  initial begin
    // identity on the present AFN_A
    foreach (w[k]) w[k] = '0;
    foreach (x[k]) x[k] = afn_t'($urandom_range(0, 344));
    w[0] = 16'sd256; bias = '0;
    check("identity");
    checks++;
    if (int'(y) != int'(x[0])) begin failures++; $display("FAIL identity %0d", y); end
    // a plausible trained model: 0.9*AFN_A + 0.1*last AFN_R + 1.5
    w[0] = 16'sd230; w[2] = 16'sd26; bias = 11'sd12;
    check("trained-like");
    for (int n = 0; n < 1000; n++) begin
      foreach (x[k]) x[k] = afn_t'($urandom_range(0, 511));
      foreach (w[k]) w[k] = weight_t'(int'($urandom_range(0, 160)) - 80);
      bias = cafn_t'(int'($urandom_range(0, 400)) - 200);
      check("random");
    end
    // saturation both ways
    foreach (x[k]) x[k] = afn_t'(511);
    foreach (w[k]) w[k] = 16'sd32767;
    check("sat high");
    foreach (w[k]) w[k] = -16'sd32768;
    check("sat low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
