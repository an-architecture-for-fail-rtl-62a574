// fault_monitor_bank: all fault monitors of the fail-silent outputs.
//
// One fault_monitor per output compares that output of the two working
// regions. The latch outputs of all monitors are combined into the single
// enable that drives the tri-state control of every output buffer: ANDed for
// an active-high enable, ORed for the dual active-low form. The whole set of
// monitors can be replicated REPLICAS times, with the copies combined the same
// way, so that a latch stuck at its "enabled" value in one copy cannot keep
// the outputs enabled after a mismatch.
//
// Outputs: oe is the combined buffer enable in the chosen polarity;
// ok is 1 while no mismatch has been latched, in either polarity, and serves
// as the active-low (falling-edge) interrupt line; tripped[k] says which
// output's monitor (in any replica) latched a mismatch. Latency: one clock
// edge from a mismatch to oe and ok changing.
//
// Per-output monitors, AND (or OR) combination and replication follow the
// architecture; the ok / tripped status outputs are this design's.
module fault_monitor_bank #(
  parameter int unsigned NUM_OUT     = fs_pkg::NUM_OUTPUTS,
  parameter int unsigned REPLICAS    = 1,
  parameter bit          ACTIVE_HIGH = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic [NUM_OUT-1:0] a,        // outputs of working region 1
  input  logic [NUM_OUT-1:0] b,        // outputs of working region 2
  output logic               oe,       // combined tri-state enable
  output logic               ok,       // 1: no fault latched (interrupt, active low)
  output logic [NUM_OUT-1:0] tripped   // per-output fault status
);
  logic [REPLICAS-1:0][NUM_OUT-1:0] q;

  for (genvar r = 0; r < REPLICAS; r++) begin : g_rep
    for (genvar k = 0; k < NUM_OUT; k++) begin : g_out
      fault_monitor #(.ACTIVE_HIGH(ACTIVE_HIGH)) u_mon (
        .clk  (clk),
        .rst_n(rst_n),
        .clr  (clr),
        .a    (a[k]),
        .b    (b[k]),
        .q    (q[r][k])
      );
    end
  end

  always_comb begin
    oe      = ACTIVE_HIGH ? 1'b1 : 1'b0;
    tripped = '0;
    for (int r = 0; r < REPLICAS; r++) begin
      for (int k = 0; k < NUM_OUT; k++) begin
        if (ACTIVE_HIGH) oe = oe & q[r][k];
        else             oe = oe | q[r][k];
        tripped[k] = tripped[k] | (ACTIVE_HIGH ? ~q[r][k] : q[r][k]);
      end
    end
    ok = ACTIVE_HIGH ? oe : ~oe;
  end
endmodule
