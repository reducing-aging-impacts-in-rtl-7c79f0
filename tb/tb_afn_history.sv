// Self-checking test of afn_history (M = 5): random pairs are pushed at
// random times; a queue in the testbench holds the expected last four pairs
// (newest first).  Contents must not change without a shift, and count must
// saturate at M-1.
module tb_afn_history;
  import dsens_pkg::*;
  localparam int M = 5;

  logic                 clk = 1'b0, rst = 1'b1, shift = 1'b0;
  afn_t                 afn_a = '0, afn_r = '0;
  afn_t                 hist_a [M-1];
  afn_t                 hist_r [M-1];
  logic [$clog2(M)-1:0] count;
  int                   checks = 0, failures = 0;

  afn_history #(.M(M)) dut (.clk, .rst, .shift, .afn_a, .afn_r, .hist_a, .hist_r, .count);

  always #5 clk = ~clk;

  initial begin
    int qa[$], qr[$];
    @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      afn_a = afn_t'($urandom);
      afn_r = afn_t'($urandom);
      shift = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (shift) begin
        qa.push_front(int'(afn_a)); qr.push_front(int'(afn_r));
        if (qa.size() > M - 1) begin void'(qa.pop_back()); void'(qr.pop_back()); end
      end
      for (int i = 0; i < M - 1; i++) begin
        checks++;
        if (int'(hist_a[i]) != ((i < qa.size()) ? qa[i] : 0) ||
            int'(hist_r[i]) != ((i < qr.size()) ? qr[i] : 0)) begin
          failures++;
          $display("FAIL entry %0d: %0d/%0d", i, hist_a[i], hist_r[i]);
        end
      end
      checks++;
      if (int'(count) != qa.size()) begin failures++; $display("FAIL count %0d", count); end
    end
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
