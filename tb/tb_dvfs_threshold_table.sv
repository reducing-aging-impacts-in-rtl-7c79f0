// Self-checking test of dvfs_threshold_table.
//
// Two instances are tested: one with the default table and one whose
// parameters give a distinct reset entry per mode.  The test checks four
// things:
//   - after reset, every mode reads its parameter entry;
//   - writes before the lock land in the addressed entry only;
//   - once locked, writes are ignored and `locked` stays high;
//   - a new reset restores the parameter table and clears the lock.
// A reference copy of each table, kept in the testbench, gives the expected
// reads.
module tb_dvfs_threshold_table;
  import dsens_pkg::*;

  localparam cafn_t L_TAB [3] = '{to_cafn(17), to_cafn(15), cafn_t'(153)};
  localparam cafn_t H_TAB [3] = '{to_cafn(27), to_cafn(25), cafn_t'(233)};

  logic       clk = 1'b0, rst = 1'b1;
  logic       wr_en = 1'b0, lock = 1'b0;
  logic [1:0] wr_mode = '0, mode = '0;
  cafn_t      wr_l = '0, wr_h = '0;
  cafn_t      l0, h0, l1, h1;
  logic       locked0, locked1;
  int         ref_l0 [3], ref_h0 [3], ref_l1 [3], ref_h1 [3];
  int         checks = 0, failures = 0;

  dvfs_threshold_table dut_default (
    .clk, .rst, .wr_en, .wr_mode, .wr_afn_l(wr_l), .wr_afn_h(wr_h), .lock,
    .locked(locked0), .mode, .afn_l(l0), .afn_h(h0)
  );
  dvfs_threshold_table #(.N_MODES(3), .AFN_L_TAB(L_TAB), .AFN_H_TAB(H_TAB)) dut_set (
    .clk, .rst, .wr_en, .wr_mode, .wr_afn_l(wr_l), .wr_afn_h(wr_h), .lock,
    .locked(locked1), .mode, .afn_l(l1), .afn_h(h1)
  );

  always #5 clk = ~clk;

  task automatic reset_refs();
    for (int m = 0; m < 3; m++) begin
      ref_l0[m] = 136; ref_h0[m] = 216;
      ref_l1[m] = int'(L_TAB[m]); ref_h1[m] = int'(H_TAB[m]);
    end
  endtask

  task automatic check_all(string what);
    for (int m = 0; m < 3; m++) begin
      mode = 2'(m);
      #1;
      checks += 2;
      if (int'(l0) != ref_l0[m] || int'(h0) != ref_h0[m]) begin
        failures++;
        $display("FAIL %s default mode %0d: %0d %0d, expected %0d %0d", what, m, l0, h0, ref_l0[m], ref_h0[m]);
      end
      if (int'(l1) != ref_l1[m] || int'(h1) != ref_h1[m]) begin
        failures++;
        $display("FAIL %s set mode %0d: %0d %0d, expected %0d %0d", what, m, l1, h1, ref_l1[m], ref_h1[m]);
      end
    end
  endtask

  task automatic write(int m, int l, int h, bit expect_taken);
    @(negedge clk);
    wr_en = 1'b1; wr_mode = 2'(m); wr_l = cafn_t'(l); wr_h = cafn_t'(h);
    @(negedge clk);
    wr_en = 1'b0;
    if (expect_taken) begin
      ref_l0[m] = l; ref_h0[m] = h;
      ref_l1[m] = l; ref_h1[m] = h;
    end
  endtask

  task automatic expect_locked(bit v);
    checks++;
    if (locked0 != v || locked1 != v) begin
      failures++;
      $display("FAIL locked = %0b/%0b, expected %0b", locked0, locked1, v);
    end
  endtask

  initial begin
    reset_refs();
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check_all("after reset");
    expect_locked(1'b0);

    write(1, 120, 200, 1'b1);
    check_all("after write to mode 1");
    write(2, -8, 300, 1'b1);
    check_all("after write to mode 2");
    write(3, 1, 2, 1'b0);               // no entry 3: ignored
    check_all("after write to mode 3");

    @(negedge clk); lock = 1'b1;
    @(negedge clk); lock = 1'b0;
    expect_locked(1'b1);
    write(0, 10, 20, 1'b0);
    write(1, 11, 21, 1'b0);
    check_all("after writes while locked");
    expect_locked(1'b1);

    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    reset_refs();
    check_all("after second reset");
    expect_locked(1'b0);
    write(0, 100, 230, 1'b1);
    check_all("after write following reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
