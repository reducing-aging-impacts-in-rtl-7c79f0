// Alarm thresholds per DVFS configuration.
//
// A chip with a few fixed DVFS operating points (typically two or three)
// needs a slightly different acceptable AFN range at each point.  This table
// holds one (AFN_l, AFN_h) pair per point.  The present DVFS mode selects a
// pair, and the alarm generator compares the calibrated AFN against it.
//
// The table is meant to be immutable in use.  Here it is a write-once
// register file.  Reset loads the parameter defaults (AFN_L_TAB/AFN_H_TAB).
// Boot code may then overwrite entries through the write port, for example
// with values read from fuses or other non-volatile storage.  Raising `lock`
// freezes the table until the next reset, after which writes are ignored.
// Keeping the thresholds in fixed, tamper-proof storage is the source
// design's recommendation.  The write port, the lock and the reset defaults
// are this design's own choices.
//
// Entries are signed AFN fixed point with AFN_FRAC fraction bits.  Only the
// nominal window 22 +/- 5 is known (AFN_l = 17, AFN_h = 27), so every mode
// defaults to it.
//
// Timing: a write or lock takes effect at the next rising clock edge.  The
// read (mode -> afn_l/afn_h) is combinational.  A mode value beyond
// N_MODES-1 reads entry 0.
module dvfs_threshold_table
  import dsens_pkg::*;
#(
  parameter int    N_MODES = 3,
  parameter cafn_t AFN_L_TAB [N_MODES] = '{default: to_cafn(17)},
  parameter cafn_t AFN_H_TAB [N_MODES] = '{default: to_cafn(27)}
) (
  input  logic                       clk,
  input  logic                       rst,
  // programming port (ignored once locked)
  input  logic                       wr_en,
  input  logic [$clog2(N_MODES)-1:0] wr_mode,
  input  cafn_t                      wr_afn_l,
  input  cafn_t                      wr_afn_h,
  input  logic                       lock,
  output logic                       locked,
  // read port
  input  logic [$clog2(N_MODES)-1:0] mode,
  output cafn_t                      afn_l,
  output cafn_t                      afn_h
);

  cafn_t tab_l [N_MODES];
  cafn_t tab_h [N_MODES];

  always_ff @(posedge clk) begin
    if (rst) begin
      tab_l  <= AFN_L_TAB;
      tab_h  <= AFN_H_TAB;
      locked <= 1'b0;
    end else begin
      if (wr_en && !locked && 32'(wr_mode) < N_MODES) begin
        tab_l[wr_mode] <= wr_afn_l;
        tab_h[wr_mode] <= wr_afn_h;
      end
      if (lock) locked <= 1'b1;
    end
  end

  always_comb begin
    afn_l = tab_l[0];
    afn_h = tab_h[0];
    for (int i = 0; i < N_MODES; i++) begin
      if (32'(mode) == i) begin
        afn_l = tab_l[i];
        afn_h = tab_h[i];
      end
    end
  end

endmodule
