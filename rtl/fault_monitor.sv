// fault_monitor: compare-and-latch circuit for one fail-silent output.
//
// Each clock edge the monitor compares the same output taken from the two
// working regions. While they agree the latch keeps its value; the first
// mismatch is latched and held through the latch's own feedback, so the
// output buffer it controls is disabled from the next clock cycle on and
// stays disabled until the monitor is cleared (clr, synchronous, or rst_n,
// asynchronous).
//
// With ACTIVE_HIGH = 1 (the main form) a mismatch is latched as 0:
//   q <= q & (a == b), reset value 1, q drives an active-high enable.
// With ACTIVE_HIGH = 0 the dual circuit is built for an active-low enable:
//   q <= q | (a != b), reset value 0.
// Latency: a mismatch present at clock edge t shows on q right after edge t.
//
// The compare, the feedback and the latching of a mismatch as 0 follow the
// described monitor; the synchronous clear and the reset values are this
// design's.
module fault_monitor #(
  parameter bit ACTIVE_HIGH = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,  // re-arm the monitor (output enabled again)
  input  logic a,    // output of working region 1
  input  logic b,    // output of working region 2
  output logic q     // enable for the tri-state output buffer
);
  localparam logic IDLE_VAL = ACTIVE_HIGH ? 1'b1 : 1'b0;

  logic next_q;
  always_comb begin
    if (ACTIVE_HIGH) next_q = q & (a ~^ b);
    else             next_q = q | (a ^ b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= IDLE_VAL;
    else if (clr) q <= IDLE_VAL;
    else          q <= next_q;
  end
endmodule
