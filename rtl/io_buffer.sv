// io_buffer: configurable bidirectional I/O buffer of one fail-silent output.
//
// Output half: a tri-state driver carrying d from working region 1. It drives
// the pad only when its configuration makes it an output buffer (drive_en)
// and the fault monitors enable it (t, active high when OE_ACTIVE_HIGH = 1).
// Once the configuration has turned it into an input buffer, no value of t can
// enable it again. A weak pull-up or pull-down, also set by configuration,
// holds the pad when nothing drives it.
// Input half: the level on the pad (pad_i) is returned as q. Feeding q rather
// than d to the fault monitor lets faults on the output pin and on the board
// net trip the monitor too.
//
// The pad itself is outside this module: pad_o / pad_oe / pad_pull_* are the
// controls a pad cell takes and pad_i is what it senses. Purely combinational.
// The behaviour follows the described buffer; the port split is this design's.
module io_buffer #(
  parameter bit OE_ACTIVE_HIGH = 1'b1
) (
  input  logic d,            // data from working region 1
  input  logic t,            // tri-state control from the fault monitors
  input  logic cfg_drive_en, // configuration: 1 output/bidirectional, 0 input only
  input  logic cfg_pull_en,  // configuration: weak pull enabled
  input  logic cfg_pull_up,  // configuration: 1 pull-up, 0 pull-down
  input  logic pad_i,        // level sensed on the pad
  output logic pad_o,        // value driven onto the pad
  output logic pad_oe,       // pad driver enabled
  output logic pad_pull_en,
  output logic pad_pull_up,
  output logic q             // read-back of the pad, to the fault monitor
);
  always_comb begin
    pad_oe      = cfg_drive_en & (OE_ACTIVE_HIGH ? t : ~t);
    pad_o       = d;
    pad_pull_en = cfg_pull_en;
    pad_pull_up = cfg_pull_up;
    q           = pad_i;
  end
endmodule
