// shyra_regfile: the one-bit registers of SHyRA.
//
// All registers are read in parallel by the MUX. In a compute cycle (exec high)
// every register selected by the DeMUX takes its new value from the LUTs at the
// clock edge; all LUTs therefore read the values from before the cycle. Outside
// a compute cycle the controlled processes may load registers through the
// external port (ext_we, ext_d), which is how input data reach the machine; in a
// compute cycle the LUT write wins over an external write to the same register.
// Registers reset to 0 (active-low synchronous reset).
//
// The count of 73 registers is published; the external port, the priority and
// the reset value are this design's choices.
module shyra_regfile #(
  parameter int unsigned N_REG = 73
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             exec,    // compute cycle
  input  logic [N_REG-1:0] lut_we,  // from the DeMUX
  input  logic [N_REG-1:0] lut_d,
  input  logic [N_REG-1:0] ext_we,  // from the controlled processes
  input  logic [N_REG-1:0] ext_d,
  output logic [N_REG-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      for (int r = 0; r < N_REG; r++) begin
        if (exec && lut_we[r])  q[r] <= lut_d[r];
        else if (ext_we[r])     q[r] <= ext_d[r];
      end
    end
  end

endmodule
