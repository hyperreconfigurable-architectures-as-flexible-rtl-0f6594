// shyra_mux: reconfigurable read network of SHyRA, from the registers to the
// LUT inputs.
//
// Each of the N_DST LUT inputs has one switch per register. The input sees the
// OR of the registers whose switch is closed, and 0 when none is closed, so a
// configuration that closes exactly one switch per used input behaves as a
// multiplexer. Purely combinational.
//
// 73 registers and 54 = 18*3 LUT inputs follow the published machine; one switch
// per crosspoint is the reading under which its 5400 reconfiguration bits add up.
// The wired-OR for several closed switches and the 0 for none are this design's
// choices.
module shyra_mux #(
  parameter int unsigned N_SRC = 73,  // registers
  parameter int unsigned N_DST = 54   // LUT inputs
) (
  input  logic [N_SRC-1:0]            src,  // register values
  input  logic [N_DST-1:0][N_SRC-1:0] sel,  // crosspoint switches, sel[d][s]
  output logic [N_DST-1:0]            dst   // LUT input values
);

  always_comb begin
    for (int d = 0; d < N_DST; d++) dst[d] = |(sel[d] & src);
  end

endmodule
