// shyra_demux: reconfigurable write network of SHyRA, from the LUT outputs to
// the registers.
//
// Each of the N_SRC LUT outputs has one switch per register. A register is
// written in a compute cycle when at least one of its switches is closed, and
// takes the OR of the LUT outputs whose switch is closed; a register with no
// closed switch keeps its value. One LUT output may drive many registers.
// Purely combinational; the write itself happens in shyra_regfile.
//
// 18 LUT outputs and 73 registers follow the published machine; one switch per
// crosspoint is the reading under which its 5400 reconfiguration bits add up.
// The wired-OR for several writers is this design's choice.
module shyra_demux #(
  parameter int unsigned N_SRC = 18,  // LUT outputs
  parameter int unsigned N_DST = 73   // registers
) (
  input  logic [N_SRC-1:0]            src,  // LUT outputs
  input  logic [N_SRC-1:0][N_DST-1:0] sel,  // crosspoint switches, sel[s][d]
  output logic [N_DST-1:0]            we,   // register d is written
  output logic [N_DST-1:0]            d     // value written to register d
);

  always_comb begin
    we = '0;
    d  = '0;
    for (int s = 0; s < N_SRC; s++) begin
      we |= sel[s];
      d  |= sel[s] & {N_DST{src[s]}};
    end
  end

endmodule
