// Behavioural model of the sensor's buffer chain (not synthesizable logic in
// intent: on silicon this is N0 + N1 standard-cell buffers whose delay is set
// by supply voltage, temperature, process and aging).
//
// The first buffer is driven by a0, which the T flip-flop toggles once per
// clock.  Tap k (1..N1) sits after N0 + k buffers.  The model is cycle based:
// it remembers the last HIST values of a0 (hist[0] is the value launched at
// the most recent clock edge, hist[j] the one launched j edges earlier).  The
// edge that launched hist[j] has had (j+1) clock periods to travel when the
// next edge samples the taps; it has reached tap k if (N0+k) * d <= (j+1) * T,
// where d is the rising or the falling buffer delay depending on the edge
// direction (a falling edge may travel faster than a rising one).  Each tap
// shows the newest value that has reached it, or hist[HIST-1] if none has.
// Slow conditions therefore move the 0/1 boundary towards tap 1, fast ones
// towards tap N1, and a chain longer than two periods shows two boundaries.
//
// Interface: taps[k-1] is tap k, valid combinationally for the next rising
// edge of clk.  rise_delay_ps, fall_delay_ps and clk_period_ps are not pins
// of the real chain; they stand for the physical operating condition.
// The cycle-based approach and HIST = 4 are this model's own choices.
module delay_chain_model
  import dsens_pkg::*;
#(
  parameter int N0   = N0_DEF,
  parameter int N1   = N1_DEF,
  parameter int HIST = 4   // at least 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             a0,
  input  logic [DLY_W-1:0] rise_delay_ps,
  input  logic [DLY_W-1:0] fall_delay_ps,
  input  logic [DLY_W-1:0] clk_period_ps,
  output logic [N1-1:0]    taps
);

  logic [HIST-2:0] hist_q;  // hist_q[j]: a0 as it was j+1 edges ago
  logic [HIST-1:0] hist;    // hist[0] = a0 now

  always_ff @(posedge clk) begin
    if (rst) hist_q <= '0;
    else     hist_q <= {hist_q[HIST-3:0], a0};
  end

  assign hist = {hist_q, a0};

  always_comb begin
    taps = '0;
    for (int k = 1; k <= N1; k++) begin
      logic        found;
      logic        v;
      int unsigned path;
      path  = 0;
      v     = hist[HIST-1];
      found = 1'b0;
      for (int j = 0; j < HIST; j++) begin
        // An edge was launched j+1 edges ago only if a0 changed then; it
        // rose if hist[j] is 1.  Without an edge the tap keeps whatever
        // older value has arrived, decided by the later iterations.
        if (!found && (j == HIST - 1 || hist[j] != hist[j+1])) begin
          path = (N0 + k) * 32'(hist[j] ? rise_delay_ps : fall_delay_ps);
          if (path <= (j + 1) * 32'(clk_period_ps)) begin
            v     = hist[j];
            found = 1'b1;
          end
        end
      end
      taps[k-1] = v;
    end
  end

endmodule
