// plb_lut3: one 3-input look-up table of a programmable logic block (PLB).
//
// The output is the truth-table bit selected by the three inputs:
// y = init[{i2,i1,i0}]. The truth table comes from configuration memory, so a
// configuration upset changes the function. Programmed with LUT_IDENTITY
// (8'hAA) the LUT copies i0 to y, which is how the fail-silent architecture
// isolates a net in a working region from the equivalent net inside the guard
// band: the guard band then sees the signal only through a logic block, never
// through a shared routing wire. Purely combinational.
//
// Follows the PLB description (two 3-input LUTs per PLB, identity function for
// isolation); the input order and truth-table encoding are this design's.
module plb_lut3 (
  input  logic [7:0] init,  // truth table from configuration memory
  input  logic [2:0] i,     // LUT inputs, i[0] is the isolated signal
  output logic       y
);
  always_comb y = init[i];
endmodule
