// shyra_reconf_ctrl: sequencer between the host and the SHyRA machine.
//
// The host sends commands (cmd_valid/cmd_ready) and a serial bit stream
// (bit_valid/bit_ready); both are valid/ready handshakes and a transfer happens
// in a cycle where both are high. The host may pause the bit stream at any time.
//   CMD_HYPER  hyperreconfiguration: takes NH bits, one mask bit per
//              hyperreconfigurable switch, into the configuration memory; the
//              last bit activates the hypercontext. Costs NH bits (the fixed cost
//              w of the Switch model; NH = N unless only part of the switches is
//              hyperreconfigurable).
//   CMD_STEP   ordinary reconfiguration step: takes |h| bits, one per available
//              switch, then runs one compute cycle (exec) in which the LUTs
//              evaluate and the DeMUX writes the registers. Costs |h| bits. With
//              an empty hypercontext the step computes without loading.
// Cycle counts with a stream that never pauses: a command is accepted in IDLE,
// a hyperreconfiguration then takes NH cycles, a step |h| + 1 cycles.
//
// The controller also counts hyperreconfigurations, steps and all bits loaded,
// so the total reconfiguration cost r*w + sum(|h_i|*|S_i|) of a run can be read
// from bits_loaded. The two kinds of step and their costs follow the published
// Switch model; the command and stream interface is this design's own.
module shyra_reconf_ctrl
  import shyra_pkg::*;
#(
  parameter int unsigned N  = 5400,  // reconfiguration bits (switches)
  parameter int unsigned NH = N,     // hyperreconfigurable switches
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host commands
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  cmd_e          cmd,
  // host bit stream
  input  logic          bit_valid,
  output logic          bit_ready,
  // configuration memory
  input  logic [CW-1:0] h_size,
  output logic          mask_shift,
  output logic          mask_commit,
  output logic          ctx_shift,
  // machine
  output logic          exec,
  output logic          busy,
  // cost counters
  output logic [31:0]   n_hyper,
  output logic [31:0]   n_steps,
  output logic [31:0]   bits_loaded
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_LOAD_MASK,
    S_LOAD_CTX,
    S_EXEC
  } state_e;

  state_e        state;
  logic [CW-1:0] remaining;  // bits still to come in the current load
  logic          take;       // a bit is transferred this cycle

  always_comb begin
    cmd_ready   = (state == S_IDLE);
    bit_ready   = (state == S_LOAD_MASK) || (state == S_LOAD_CTX);
    take        = bit_valid && bit_ready;
    mask_shift  = take && (state == S_LOAD_MASK);
    mask_commit = mask_shift && (remaining == CW'(1));
    ctx_shift   = take && (state == S_LOAD_CTX);
    exec        = (state == S_EXEC);
    busy        = (state != S_IDLE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      remaining   <= '0;
      n_hyper     <= '0;
      n_steps     <= '0;
      bits_loaded <= '0;
    end else begin
      if (take) begin
        bits_loaded <= bits_loaded + 32'd1;
        remaining   <= remaining - CW'(1);
      end
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          if (cmd == CMD_HYPER) begin
            state     <= S_LOAD_MASK;
            remaining <= CW'(NH);
            n_hyper   <= n_hyper + 32'd1;
          end else begin
            state     <= (h_size == '0) ? S_EXEC : S_LOAD_CTX;
            remaining <= h_size;
            n_steps   <= n_steps + 32'd1;
          end
        end
        S_LOAD_MASK: if (take && remaining == CW'(1)) state <= S_IDLE;
        S_LOAD_CTX:  if (take && remaining == CW'(1)) state <= S_EXEC;
        S_EXEC:      state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

  // Host side of the handshakes: a command is held until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));
  // Exactly the announced number of bits is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_LOAD_MASK || state == S_LOAD_CTX) |-> remaining != '0);

endmodule
