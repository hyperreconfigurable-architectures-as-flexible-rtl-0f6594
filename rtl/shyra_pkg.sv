// shyra_pkg: sizes, configuration-memory layout and command encoding shared by
// the SHyRA (Simple HYperReconfigurable Architecture) modules.
//
// The machine has 18 three-input LUTs, 73 one-bit registers, a crosspoint
// network from the registers to the 54 LUT inputs (MUX) and a crosspoint
// network from the 18 LUT outputs to the registers (DeMUX). Every crosspoint and
// every LUT truth-table bit is one "switch" of the Switch model, so the machine
// has 18*8 + 54*73 + 18*73 = 144 + 3942 + 1314 = 5400 reconfiguration bits.
// The counts 18, 3, 73 and the total 5400 are the published ones; the one-bit-per-
// crosspoint layout is the reading under which they add up, and the order of the
// fields below is this design's own choice.
//
// Configuration bit layout (index 0 is the first bit of a stream):
//   [0 .. 143]               LUT j truth table bit k at 8*j + k
//   [144 .. 4085]            MUX: LUT input p of LUT j reads register r at
//                            CFG_MUX_OFS + (3*j + p)*N_REG + r
//   [4086 .. 5399]           DeMUX: LUT j writes register r at
//                            CFG_DEMUX_OFS + j*N_REG + r
package shyra_pkg;

  parameter int unsigned N_LUT    = 18;  // reconfigurable LUTs
  parameter int unsigned LUT_K    = 3;   // inputs per LUT
  parameter int unsigned LUT_BITS = 1 << LUT_K;
  parameter int unsigned N_REG    = 73;  // one-bit registers

  // Host commands: a hyperreconfiguration loads a new hypercontext (one mask
  // bit per switch); a step loads the available switches and then computes once.
  typedef enum logic [0:0] {
    CMD_HYPER = 1'b0,
    CMD_STEP  = 1'b1
  } cmd_e;

  function automatic int unsigned cfg_lut_bits(int unsigned n_lut);
    return n_lut * LUT_BITS;
  endfunction

  function automatic int unsigned cfg_mux_bits(int unsigned n_lut, int unsigned n_reg);
    return n_lut * LUT_K * n_reg;
  endfunction

  function automatic int unsigned cfg_demux_bits(int unsigned n_lut, int unsigned n_reg);
    return n_lut * n_reg;
  endfunction

  function automatic int unsigned cfg_total_bits(int unsigned n_lut, int unsigned n_reg);
    return cfg_lut_bits(n_lut) + cfg_mux_bits(n_lut, n_reg) + cfg_demux_bits(n_lut, n_reg);
  endfunction

endpackage
