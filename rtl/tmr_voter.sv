// tmr_voter: bitwise 2-of-3 majority voter for triple modular redundancy.
//
// Each output bit is the value held by at least two of the three module
// outputs: y = (a & b) | (a & c) | (b & c). Used behind three replicated
// modules separated from each other by guard bands, so that no single
// configuration upset can corrupt two modules at once. Also reports, per bit,
// whether any module disagreed (disagree), and which module was outvoted
// (outvoted[m], set when module m differs from the majority on any bit).
// Purely combinational.
//
// The voter follows the triple-redundant arrangement with guard bands; the
// disagreement outputs are this design's.
module tmr_voter #(
  parameter int unsigned WIDTH = fs_pkg::NUM_OUTPUTS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] disagree,
  output logic [2:0]       outvoted
);
  always_comb begin
    y           = (a & b) | (a & c) | (b & c);
    disagree    = (a ^ b) | (a ^ c);
    outvoted[0] = |(a ^ y);
    outvoted[1] = |(b ^ y);
    outvoted[2] = |(c ^ y);
  end
endmodule
