// tb_shyra_phases: a run through phases with different sets of control tasks
// on the full-size machine, each phase under its own hypercontext:
//   I    one 4-bit ripple-carry adder (2 LUTs)
//   III  one 8-bit parallel-prefix adder (16 LUTs, 5 steps)
//   IV   the 8-bit adder and the 4-bit counter (all 18 LUTs in use)
//   V    two 4-bit adders side by side (4 LUTs)
// The task programs are this testbench's own; the adders of the original
// experiments are not reproduced, only the LUT counts of the phases. Every sum
// and counter value is compared with arithmetic, and the bits loaded with
// r*w + sum |h_i|*|S_i|. The hypercontext size of each phase is printed.
module tb_shyra_phases;
  import shyra_pkg::*;

  localparam int NL = 18;
  localparam int NR = 73;
  localparam int N  = 5400;
  localparam int MUX_OFS   = NL * 8;
  localparam int DEMUX_OFS = MUX_OFS + NL * 3 * NR;
  localparam int NONE = -1;
  // 1: only the LUT bits are hyperreconfigurable (the machine must be built
  // with HYPER_LUT_ONLY = 1); the crosspoints are always available.
  localparam bit LUT_ONLY = 1'b0;
  localparam int NHYP = LUT_ONLY ? MUX_OFS : N;

  typedef enum {OP_NOT, OP_BUF, OP_XOR, OP_AND, OP_EQ, OP_ONE, OP_NULL, OP_CMOV,
                OP_XOR3, OP_MAJ, OP_GP} op_e;
  typedef bit [N-1:0] ctx_t;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, bit_valid = 0, bit_data = 0;
  cmd_e cmd = CMD_HYPER;
  logic cmd_ready, bit_ready, busy, exec;
  logic [NR-1:0] proc_we = '0, proc_d = '0, regs;
  logic [$clog2(N+1)-1:0] h_size;
  logic [31:0] n_hyper, n_steps, bits_loaded;

  shyra_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_hyper = 0, cnt_steps = 0, cnt_stall = 0, cnt_wrap = 0, cnt_empty = 0;
  int cnt_parallel = 0, cnt_proc = 0, cnt_all_luts = 0;
  longint exp_bits = 0;
  bit stall_on = 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- programs
  function automatic bit [7:0] truth(op_e op);
    bit [7:0] t;
    for (int k = 0; k < 8; k++) begin
      bit a = k[0], b = k[1], c = k[2];
      case (op)
        OP_NOT:  t[k] = !a;
        OP_BUF:  t[k] = a;
        OP_XOR:  t[k] = a ^ b;
        OP_AND:  t[k] = a & b;
        OP_EQ:   t[k] = (a == b);
        OP_ONE:  t[k] = 1;
        OP_NULL: t[k] = 0;
        OP_CMOV: t[k] = b ? a : c;   // out = cond(b) ? val(a) : old out(c)
        OP_XOR3: t[k] = a ^ b ^ c;
        OP_MAJ:  t[k] = (a & b) | (a & c) | (b & c);
        OP_GP:   t[k] = c | (a & b);   // G = G | P & G_low with a=P, b=G_low, c=G
        default: t[k] = 0;
      endcase
    end
    return t;
  endfunction

  function automatic void place(ref ctx_t c, input int lut, input op_e op, input int out,
                                input int i1, input int i2, input int i3);
    int ins[3] = '{i1, i2, i3};
    bit [7:0] t = truth(op);
    for (int k = 0; k < 8; k++) c[lut*8 + k] = t[k];
    for (int p = 0; p < 3; p++)
      if (ins[p] != NONE) c[MUX_OFS + (3*lut + p)*NR + ins[p]] = 1;
    c[DEMUX_OFS + lut*NR + out] = 1;
  endfunction

  // Counter on LUTs l0, l1 with registers rb .. rb+9 (Table-1 style program).
  function automatic void counter_step(ref ctx_t c, input int s, input int l0,
                                       input int l1, input int rb);
    case (s)
      0: begin place(c, l0, OP_NOT, rb+0, rb+0, NONE, NONE);
               place(c, l1, OP_BUF, rb+8, rb+0, NONE, NONE); end
      1, 2, 3: begin
               place(c, l0, OP_XOR, rb+s, rb+s, rb+8, NONE);
               place(c, l1, OP_AND, rb+8, rb+8, rb+s, NONE); end
      4: begin place(c, l0, OP_EQ, rb+9, rb+0, rb+4, NONE);
               place(c, l1, OP_ONE, rb+8, rb+8, rb+0, NONE); end
      5, 6, 7: begin
               place(c, l0, OP_EQ, rb+9, rb+s-4, rb+s, NONE);
               place(c, l1, OP_AND, rb+8, rb+8, rb+9, NONE); end
      8: begin place(c, l0, OP_NULL, rb+9, rb+0, rb+0, NONE);
               place(c, l1, OP_AND, rb+8, rb+8, rb+9, NONE); end
      9: begin place(c, l0, OP_CMOV, rb+0, rb+9, rb+8, rb+0);
               place(c, l1, OP_CMOV, rb+1, rb+9, rb+8, rb+1); end
      10: begin place(c, l0, OP_CMOV, rb+2, rb+9, rb+8, rb+2);
               place(c, l1, OP_CMOV, rb+3, rb+9, rb+8, rb+3); end
      default: ;
    endcase
  endfunction

  // Adder on LUTs l0, l1: a in rb..rb+3, b in rb+4..rb+7, sum rb+8..rb+11,
  // carry rb+12 (carry out after the last step).
  function automatic void adder_step(ref ctx_t c, input int s, input int l0,
                                     input int l1, input int rb);
    if (s == 0) begin
      place(c, l0, OP_NULL, rb+12, NONE, NONE, NONE);
    end else begin
      place(c, l0, OP_XOR3, rb+8+s-1, rb+s-1, rb+4+s-1, rb+12);
      place(c, l1, OP_MAJ,  rb+12,    rb+s-1, rb+4+s-1, rb+12);
    end
  endfunction

  // 8-bit parallel-prefix adder on 16 LUTs l0 .. l0+15. Registers from rb:
  // a rb+0..7, b rb+8..15, group propagate P rb+16..23, group generate
  // G rb+24..31, sum rb+32..39; carry out is G of bit 7 after step 3.
  //   step 0      P_i = a_i ^ b_i, G_i = a_i & b_i               (16 LUTs)
  //   step 1..3   distance d = 1, 2, 4, for i >= d, in place:
  //               G_i = G_i | P_i & G_(i-d), P_i = P_i & P_(i-d)  (2 LUTs per bit)
  //   step 4      s_0 = a_0 ^ b_0, s_i = a_i ^ b_i ^ G_(i-1)      (8 LUTs)
  function automatic void pp_adder_step(ref ctx_t c, input int s, input int l0,
                                        input int rb);
    case (s)
      0: for (int i = 0; i < 8; i++) begin
           place(c, l0 + 2*i,     OP_XOR, rb+16+i, rb+i, rb+8+i, NONE);
           place(c, l0 + 2*i + 1, OP_AND, rb+24+i, rb+i, rb+8+i, NONE);
         end
      1, 2, 3: begin
           automatic int d = 1 << (s - 1);
           for (int i = d; i < 8; i++) begin
             // G_i | (P_i & G_(i-d)) as a majority-free 3-input table: OP_GP
             place(c, l0 + 2*i,     OP_GP,  rb+24+i, rb+16+i, rb+24+i-d, rb+24+i);
             place(c, l0 + 2*i + 1, OP_AND, rb+16+i, rb+16+i, rb+16+i-d, NONE);
           end
         end
      4: begin
           place(c, l0, OP_XOR, rb+32, rb+0, rb+8, NONE);
           for (int i = 1; i < 8; i++)
             place(c, l0 + i, OP_XOR3, rb+32+i, rb+i, rb+8+i, rb+24+i-1);
         end
      default: ;
    endcase
  endfunction

  localparam int C_L0 = 0, C_L1 = 1, C_RB = 63;    // counter: LUT 0/1, r63..r72
  localparam int W_L0 = 2, W_RB = 23;              // 8-bit adder: LUT 2..17, r23..r62
  localparam int A_L0 = 2, A_L1 = 3, A_RB = 0;     // 4-bit adder #1: LUT 2/3, r0..r12
  localparam int B_L0 = 4, B_L1 = 5, B_RB = 13;    // 4-bit adder #2: LUT 4/5, r13..r25

  // ------------------------------------------------------------- host side
  ctx_t cur_mask;

  task automatic send_cmd(cmd_e c);
    @(negedge clk);
    cmd_valid = 1;
    cmd = c;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic send_bit(bit b);
    if (stall_on && ($urandom % 8) == 0) begin
      bit_valid = 0;
      @(negedge clk);
      cnt_stall++;
    end
    bit_valid = 1;
    bit_data = b;
    while (!bit_ready) @(negedge clk);
    @(negedge clk);
    bit_valid = 0;
  endtask

  task automatic wait_idle();
    while (busy || cmd_valid) @(negedge clk);
  endtask

  function automatic int popcount(ctx_t v);
    int n = 0;
    for (int i = 0; i < N; i++) n += v[i];
    return n;
  endfunction

  // busy cycles of the current command, counted at the clock edge
  int busy_cyc = 0;
  always @(posedge clk) if (busy) busy_cyc++;

  // compute cycles: exactly one per step
  int exec_cyc = 0;
  always @(posedge clk) if (exec) exec_cyc++;

  task automatic hyper(ctx_t m);
    bit stall_save = stall_on;
    ctx_t em = m;
    for (int i = NHYP; i < N; i++) em[i] = 1'b1;   // always available
    stall_on = 0;
    busy_cyc = 0;
    send_cmd(CMD_HYPER);
    for (int i = 0; i < NHYP; i++) send_bit(m[i]);
    wait_idle();
    check(busy_cyc == NHYP, $sformatf("hyperreconfiguration takes %0d cycles (%0d)", NHYP, busy_cyc));
    check(int'(h_size) == popcount(em), "hypercontext size");
    cur_mask = em;
    exp_bits += longint'(NHYP);
    cnt_hyper++;
    stall_on = stall_save;
  endtask

  task automatic step(ctx_t c);
    int h = popcount(cur_mask);
    bit timed = !stall_on;
    // every switch the step closes must be in the hypercontext
    check((c & ~cur_mask) == '0, "program inside hypercontext");
    busy_cyc = 0;
    send_cmd(CMD_STEP);
    if (cur_mask[MUX_OFS-1:0] == '0) cnt_empty++;   // no LUT bit available
    for (int i = 0; i < N; i++) if (cur_mask[i]) send_bit(c[i]);
    wait_idle();
    if (timed) check(busy_cyc == h + 1,
                     $sformatf("step takes |h|+1 cycles (%0d vs %0d)", busy_cyc, h + 1));
    exp_bits += longint'(h);
    cnt_steps++;
  endtask

  task automatic proc_write(int r, bit v);
    @(negedge clk);
    proc_we = '0; proc_we[r] = 1; proc_d = '0; proc_d[r] = v;
    @(negedge clk);
    proc_we = '0;
    cnt_proc++;
  endtask

  task automatic proc_nibble(int rb, int v);
    for (int i = 0; i < 4; i++) proc_write(rb + i, v[i]);
  endtask

  task automatic proc_byte(int rb, int v);
    for (int i = 0; i < 8; i++) proc_write(rb + i, v[i]);
  endtask

  function automatic int byte_at(int rb);
    int v = 0;
    for (int i = 0; i < 8; i++) v |= int'(regs[rb + i]) << i;
    return v;
  endfunction

  // LUTs whose output is switched to some register in context c
  function automatic int luts_used(ctx_t c);
    int n = 0;
    for (int j = 0; j < NL; j++) n += int'(c[DEMUX_OFS + j*NR +: NR] != '0);
    return n;
  endfunction

  function automatic int nibble(int rb);
    return int'({regs[rb+3], regs[rb+2], regs[rb+1], regs[rb]});
  endfunction

  // ------------------------------------------------------------ the run
  int cval, bound, a_op, b_op, a2_op, b2_op;
  ctx_t m, c;

  task automatic count_check(int it);
    if (it % 11 == 10) begin
      cval = (cval + 1) % 16;
      if (cval == bound) begin cval = 0; cnt_wrap++; end
      check(nibble(C_RB) == cval, $sformatf("counter %0d expected %0d", nibble(C_RB), cval));
    end
  endtask

  task automatic wide_load(int it);
    if (it % 5 == 0) begin
      a_op = $urandom % 256; b_op = $urandom % 256;
      proc_byte(W_RB, a_op);
      proc_byte(W_RB + 8, b_op);
    end
  endtask

  task automatic wide_check(int it);
    if (it % 5 == 4) begin
      automatic int sum = byte_at(W_RB + 32) | (int'(regs[W_RB + 31]) << 8);
      check(sum == a_op + b_op, $sformatf("8-bit adder %0d+%0d gave %0d", a_op, b_op, sum));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Phase I: one 4-bit adder (2 LUTs), 4 additions.
    m = '0;
    for (int s = 0; s < 5; s++) begin c = '0; adder_step(c, s, A_L0, A_L1, A_RB); m |= c; end
    hyper(m);
    $display("phase I   hypercontext %0d switches", h_size);
    for (int it = 0; it < 20; it++) begin
      if (it % 5 == 0) begin
        a_op = $urandom % 16; b_op = $urandom % 16;
        proc_nibble(A_RB, a_op); proc_nibble(A_RB + 4, b_op);
      end
      c = '0; adder_step(c, it % 5, A_L0, A_L1, A_RB); step(c);
      if (it % 5 == 4) begin
        automatic int sum = int'({regs[A_RB+12], 4'(nibble(A_RB + 8))});
        check(sum == a_op + b_op, $sformatf("adder %0d+%0d gave %0d", a_op, b_op, sum));
      end
    end

    // Phase III: 8-bit adder on 16 LUTs, 6 additions.
    m = '0;
    for (int s = 0; s < 5; s++) begin c = '0; pp_adder_step(c, s, W_L0, W_RB); m |= c; end
    hyper(m);
    $display("phase III hypercontext %0d switches", h_size);
    for (int it = 0; it < 30; it++) begin
      wide_load(it);
      c = '0; pp_adder_step(c, it % 5, W_L0, W_RB); step(c);
      wide_check(it);
    end

    // Phase IV: 8-bit adder (16 LUTs) and counter (2 LUTs): all 18 LUTs busy.
    m = '0;
    for (int s = 0; s < 5; s++) begin c = '0; pp_adder_step(c, s, W_L0, W_RB); m |= c; end
    for (int s = 0; s < 11; s++) begin c = '0; counter_step(c, s, C_L0, C_L1, C_RB); m |= c; end
    hyper(m);
    $display("phase IV  hypercontext %0d switches", h_size);
    bound = 3;
    cval = 0;
    proc_nibble(C_RB + 4, bound);
    for (int it = 0; it < 55; it++) begin
      wide_load(it);
      c = '0;
      pp_adder_step(c, it % 5, W_L0, W_RB);
      counter_step(c, it % 11, C_L0, C_L1, C_RB);
      if (luts_used(c) == NL) cnt_all_luts++;
      step(c);
      cnt_parallel++;
      wide_check(it);
      count_check(it);
    end

    // Phase V: two 4-bit adders side by side.
    m = '0;
    for (int s = 0; s < 5; s++) begin
      c = '0; adder_step(c, s, A_L0, A_L1, A_RB); adder_step(c, s, B_L0, B_L1, B_RB); m |= c;
    end
    hyper(m);
    $display("phase V   hypercontext %0d switches", h_size);
    for (int it = 0; it < 20; it++) begin
      if (it % 5 == 0) begin
        a_op = $urandom % 16; b_op = $urandom % 16; a2_op = $urandom % 16; b2_op = $urandom % 16;
        proc_nibble(A_RB, a_op); proc_nibble(A_RB + 4, b_op);
        proc_nibble(B_RB, a2_op); proc_nibble(B_RB + 4, b2_op);
      end
      c = '0; adder_step(c, it % 5, A_L0, A_L1, A_RB); adder_step(c, it % 5, B_L0, B_L1, B_RB);
      step(c);
      cnt_parallel++;
      if (it % 5 == 4) begin
        automatic int s1 = int'({regs[A_RB+12], 4'(nibble(A_RB + 8))});
        automatic int s2 = int'({regs[B_RB+12], 4'(nibble(B_RB + 8))});
        check(s1 == a_op + b_op, $sformatf("adder 1 %0d+%0d gave %0d", a_op, b_op, s1));
        check(s2 == a2_op + b2_op, $sformatf("adder 2 %0d+%0d gave %0d", a2_op, b2_op, s2));
      end
    end

    check(longint'(bits_loaded) == exp_bits,
          $sformatf("bits loaded %0d expected %0d", bits_loaded, exp_bits));
    check(n_hyper == cnt_hyper && n_steps == cnt_steps, "hyper/step counters");
    check(exec_cyc == cnt_steps, $sformatf("compute cycles %0d for %0d steps", exec_cyc, cnt_steps));
    $display("mechanisms: hyper=%0d steps=%0d stalls=%0d wraps=%0d parallel=%0d all18=%0d proc=%0d bits=%0d",
             cnt_hyper, cnt_steps, cnt_stall, cnt_wrap, cnt_parallel, cnt_all_luts, cnt_proc, bits_loaded);
    check(cnt_hyper == 4, "four phases");
    check(cnt_stall > 0, "stream stall happened");
    check(cnt_wrap > 0, "counter wrap happened");
    check(cnt_all_luts > 0, "all 18 LUTs used in one step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
