// shyra_top: SHyRA, a small hyperreconfigurable machine used as a flexible
// control system.
//
// Datapath: N_LUT three-input LUTs read their 3*N_LUT inputs from N_REG one-bit
// registers through the MUX crosspoint network and write their outputs back
// through the DeMUX crosspoint network. Every LUT bit and every crosspoint is a
// switch of the configuration memory (5400 switches at the default sizes).
//
// Reconfiguration: a host (task selection and hyper/reconfiguration control,
// outside this module) sends commands and a serial bit stream. A
// hyperreconfiguration (CMD_HYPER) loads a new hypercontext, one mask bit per
// switch. Each ordinary step (CMD_STEP) loads only the |h| switches of the
// current hypercontext and then computes for one cycle: every LUT reads the
// registers as they were before the cycle, and the selected registers take the
// LUT results at the end of it. Control tasks (counters, adders, ...) are
// therefore time-partitioned programs, one context per step, and several tasks
// run in parallel on disjoint LUTs and registers.
//
// Process interface: the controlled processes may load registers through
// proc_we/proc_d and read all registers on regs. Cost counters report the
// number of hyperreconfigurations, steps and bits loaded.
//
// HYPER_LUT_ONLY = 1 gives the variant in which only the 144 LUT bits are
// hyperreconfigurable (hyperreconfiguration cost 144) and all 5256 crosspoints
// are loaded in every step.
//
// Sizes (18 LUTs with 3 inputs, 73 registers, 5400 reconfiguration bits), the
// two kinds of reconfiguration step and both hyperreconfiguration scopes follow
// the published machine. The process
// port, the command and stream handshake and the configuration layout (see
// shyra_pkg) are this design's own.
module shyra_top
  import shyra_pkg::*;
#(
  parameter int unsigned NL = N_LUT,  // LUTs
  parameter int unsigned NR = N_REG,  // registers
  // 0: all switches are hyperreconfigurable. 1: only the LUT truth-table bits
  // are; the MUX and DeMUX crosspoints are always available and loaded in
  // every step.
  parameter bit HYPER_LUT_ONLY = 1'b0,
  localparam int unsigned NI = NL * LUT_K,              // LUT inputs
  localparam int unsigned N_CFG = cfg_total_bits(NL, NR),
  localparam int unsigned N_HYP = HYPER_LUT_ONLY ? cfg_lut_bits(NL) : N_CFG,
  localparam int unsigned CW = $clog2(N_CFG + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host: commands and (hyper)reconfiguration bits
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  cmd_e          cmd,
  input  logic          bit_valid,
  output logic          bit_ready,
  input  logic          bit_data,
  // controlled processes
  input  logic [NR-1:0] proc_we,
  input  logic [NR-1:0] proc_d,
  output logic [NR-1:0] regs,
  // status and cost counters
  output logic          busy,
  output logic          exec,
  output logic [CW-1:0] h_size,
  output logic [31:0]   n_hyper,
  output logic [31:0]   n_steps,
  output logic [31:0]   bits_loaded
);

  localparam int unsigned MUX_OFS   = cfg_lut_bits(NL);
  localparam int unsigned DEMUX_OFS = MUX_OFS + cfg_mux_bits(NL, NR);

  logic                mask_shift, mask_commit, ctx_shift;
  logic [N_CFG-1:0]    mask, cfg;
  logic [NI-1:0]       lut_in;
  logic [NL-1:0]       lut_out;
  logic [NR-1:0]       wr_en, wr_d;

  shyra_reconf_ctrl #(.N(N_CFG), .NH(N_HYP)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .bit_valid, .bit_ready,
    .h_size,
    .mask_shift, .mask_commit, .ctx_shift,
    .exec, .busy,
    .n_hyper, .n_steps, .bits_loaded
  );

  shyra_cfg_mem #(.N(N_CFG), .NH(N_HYP)) u_cfg (
    .clk, .rst_n,
    .bit_in(bit_data),
    .mask_shift, .mask_commit, .ctx_shift,
    .mask, .cfg, .h_size
  );

  shyra_mux #(.N_SRC(NR), .N_DST(NI)) u_mux (
    .src(regs),
    .sel(cfg[DEMUX_OFS-1:MUX_OFS]),
    .dst(lut_in)
  );

  for (genvar j = 0; j < NL; j++) begin : g_lut
    shyra_lut u_lut (
      .tt(cfg[j*LUT_BITS +: LUT_BITS]),
      .x (lut_in[j*LUT_K +: LUT_K]),
      .y (lut_out[j])
    );
  end

  shyra_demux #(.N_SRC(NL), .N_DST(NR)) u_demux (
    .src(lut_out),
    .sel(cfg[N_CFG-1:DEMUX_OFS]),
    .we (wr_en),
    .d  (wr_d)
  );

  shyra_regfile #(.N_REG(NR)) u_regs (
    .clk, .rst_n,
    .exec,
    .lut_we(wr_en), .lut_d(wr_d),
    .ext_we(proc_we), .ext_d(proc_d),
    .q(regs)
  );

  // The hypercontext mask is kept for observation by a debugger only.
  logic unused_mask;
  always_comb unused_mask = ^mask;

endmodule
