// shyra_lut: one reconfigurable look-up table of SHyRA, three inputs and one output.
//
// The output is the truth-table bit addressed by the inputs: y = tt[{x[2], x[1], x[0]}].
// x[0] is the LUT's first operand (IN_REG1 of an instruction), x[1] the second
// (IN_REG2) and x[2] the third, which a conditional move uses for the old value
// of its output register. The eight truth-table bits are the LUT's eight
// reconfiguration bits. Purely combinational.
//
// Three inputs, one output and eight bits per LUT are the published sizes; the
// bit order (truth-table bit k answers input pattern k, x[0] least significant)
// is this design's choice.
module shyra_lut
  import shyra_pkg::*;
(
  input  logic [LUT_BITS-1:0] tt,  // truth table (reconfiguration bits)
  input  logic [LUT_K-1:0]    x,   // inputs from the MUX
  output logic                y    // output to the DeMUX
);

  always_comb y = tt[x];

endmodule
