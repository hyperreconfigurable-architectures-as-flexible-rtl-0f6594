// shyra_cfg_mem: the hyperreconfigurable configuration memory of SHyRA
// (Switch model).
//
// Every reconfiguration bit is a switch. The hypercontext is a mask with one bit
// per switch saying whether the switch is available. The effective configuration
// seen by the LUTs and networks is ctx & mask: a switch outside the hypercontext
// is open (0), so switches left over from an earlier hypercontext cannot act.
//
// Only the switches 0 .. NH-1 are hyperreconfigurable; switches NH .. N-1 (none
// by default) are always available, which models a machine where only part of
// the reconfiguration bits (for example the LUT bits) can be left out.
//
// Hyperreconfiguration: NH bits are shifted serially into a shadow mask
// (mask_shift). The first bit of the stream ends at switch 0. With the last bit,
// mask_commit copies the shadow, including that bit, into the active mask. A
// running count of ones in the shadow gives the size |h| of the new hypercontext
// without a wide adder tree.
//
// Ordinary reconfiguration: ctx_shift moves one bit into a shift chain in which
// the switches outside the hypercontext are bypassed, so after |h| shifts every
// available switch holds one bit of the stream (again the first bit at the
// lowest-numbered available switch) and no other switch has changed. Loading a
// context therefore costs exactly |h| bits and |h| cycles.
//
// Timing: one bit per cycle; the new mask and |h| are valid the cycle after the
// last hyperreconfiguration bit. Reset clears the context and the
// hyperreconfigurable part of the mask (empty hypercontext). The bypass chain
// is a ripple of N 2:1 multiplexers, the longest path of the machine.
//
// The Switch model (cost |h| per reconfiguration, a fixed cost per
// hyperreconfiguration) follows the published model; serial loading, the bit
// order, the bypass chain and the gating to 0 are this design's choices.
module shyra_cfg_mem #(
  parameter int unsigned N  = 5400,  // reconfiguration bits (switches)
  parameter int unsigned NH = N,     // hyperreconfigurable switches 0 .. NH-1 (NH >= 2)
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bit_in,       // serial configuration bit
  input  logic          mask_shift,   // shift bit_in into the shadow mask
  input  logic          mask_commit,  // with mask_shift: last bit, activate
  input  logic          ctx_shift,    // shift bit_in into the available switches
  output logic [N-1:0]  mask,         // active hypercontext
  output logic [N-1:0]  cfg,          // effective configuration ctx & mask
  output logic [CW-1:0] h_size        // |h|, switches in the active hypercontext
);

  logic [NH-1:0] shadow;
  logic [NH-1:0] shadow_next;
  logic [NH-1:0] mask_h;       // hyperreconfigurable part of the mask
  logic [CW-1:0] shadow_ones;
  logic [CW-1:0] shadow_ones_next;
  logic [N-1:0]  ctx;
  logic [N-1:0]  ctx_next;

  // Shadow mask shifts toward index 0, so the first bit ends at switch 0.
  always_comb begin
    shadow_next      = {bit_in, shadow[NH-1:1]};
    shadow_ones_next = shadow_ones + CW'(bit_in) - CW'(shadow[0]);
  end

  // Bypass chain: an available switch takes the value of the next higher
  // available switch; the highest available switch takes bit_in. Stage i
  // passes on its own bit when available and the incoming one otherwise.
  for (genvar i = 0; i < N; i++) begin : g_chain
    logic chain_in;   // value arriving from the switches above
    logic chain_out;  // value passed on to the switches below (unused at stage 0)
    if (i == N - 1) begin : g_head
      assign chain_in = bit_in;
    end else begin : g_link
      assign chain_in = g_chain[i+1].chain_out;
    end
    assign chain_out   = mask[i] ? ctx[i] : chain_in;
    assign ctx_next[i] = mask[i] ? chain_in : ctx[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shadow      <= '0;
      shadow_ones <= '0;
      mask_h      <= '0;
      h_size      <= CW'(N - NH);
      ctx         <= '0;
    end else begin
      if (mask_shift) begin
        shadow      <= shadow_next;
        shadow_ones <= shadow_ones_next;
        if (mask_commit) begin
          mask_h <= shadow_next;
          h_size <= shadow_ones_next + CW'(N - NH);
        end
      end
      if (ctx_shift) ctx <= ctx_next;
    end
  end

  if (NH < N) begin : g_fixed
    assign mask = {{(N - NH){1'b1}}, mask_h};
  end else begin : g_all
    assign mask = mask_h;
  end

  always_comb cfg = ctx & mask;

  // A context cannot be loaded while the hypercontext is being replaced.
  assert property (@(posedge clk) disable iff (!rst_n) !(ctx_shift && mask_shift));
  assert property (@(posedge clk) disable iff (!rst_n) mask_commit |-> mask_shift);

endmodule
