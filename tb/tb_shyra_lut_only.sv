// tb_shyra_lut_only: the end-to-end run of tb_shyra_top on the machine variant
// in which only the 144 LUT truth-table bits are hyperreconfigurable. A
// hyperreconfiguration then loads 144 mask bits, and every step loads the
// available LUT bits plus all 5256 MUX and DeMUX crosspoints. The same phases
// (counter; counter and adder in parallel; adder alone with the counter's LUTs
// outside the hypercontext; empty hypercontext) and the same checks are run,
// including the cost total r*144 + sum |h_i|*|S_i|.
module tb_shyra_lut_only;
  import shyra_pkg::*;

  localparam int NL = 18;
  localparam int NR = 73;
  localparam int N  = 5400;
  localparam int MUX_OFS   = NL * 8;
  localparam int DEMUX_OFS = MUX_OFS + NL * 3 * NR;
  localparam int NONE = -1;
  // 1: only the LUT bits are hyperreconfigurable (the machine must be built
  // with HYPER_LUT_ONLY = 1); the crosspoints are always available.
  localparam bit LUT_ONLY = 1'b1;
  localparam int NHYP = LUT_ONLY ? MUX_OFS : N;

  typedef enum {OP_NOT, OP_BUF, OP_XOR, OP_AND, OP_EQ, OP_ONE, OP_NULL, OP_CMOV,
                OP_XOR3, OP_MAJ} op_e;
  typedef bit [N-1:0] ctx_t;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, bit_valid = 0, bit_data = 0;
  cmd_e cmd = CMD_HYPER;
  logic cmd_ready, bit_ready, busy, exec;
  logic [NR-1:0] proc_we = '0, proc_d = '0, regs;
  logic [$clog2(N+1)-1:0] h_size;
  logic [31:0] n_hyper, n_steps, bits_loaded;

  shyra_top #(.HYPER_LUT_ONLY(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_hyper = 0, cnt_steps = 0, cnt_stall = 0, cnt_wrap = 0, cnt_empty = 0;
  int cnt_frozen = 0, cnt_parallel = 0, cnt_proc = 0;
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

  localparam int C_L0 = 0, C_L1 = 1, C_RB = 0;     // counter placement
  localparam int A_L0 = 2, A_L1 = 3, A_RB = 20;    // adder placement

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

  function automatic int nibble(int rb);
    return int'({regs[rb+3], regs[rb+2], regs[rb+1], regs[rb]});
  endfunction

  // ------------------------------------------------------------ the run
  int cval, bound, a_op, b_op, snap;
  ctx_t m, c;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Phase 1: counter alone, bound 5, with one cycle timed without stalls.
    m = '0;
    for (int s = 0; s < 11; s++) begin
      c = '0; counter_step(c, s, C_L0, C_L1, C_RB); m |= c;
    end
    hyper(m);
    $display("counter hypercontext: %0d switches", h_size);
    bound = 5;
    proc_nibble(C_RB + 4, bound);
    cval = 0;
    for (int it = 0; it < 8; it++) begin
      stall_on = (it != 0);
      for (int s = 0; s < 11; s++) begin
        c = '0;
        counter_step(c, s, C_L0, C_L1, C_RB);
        step(c);
      end
      cval = (cval + 1) % 16;
      if (cval == bound) begin cval = 0; cnt_wrap++; end
      check(nibble(C_RB) == cval, $sformatf("counter %0d expected %0d", nibble(C_RB), cval));
    end

    // Phase 2: counter and adder in parallel, bound 13.
    m = '0;
    for (int s = 0; s < 11; s++) begin
      c = '0; counter_step(c, s, C_L0, C_L1, C_RB); m |= c;
    end
    for (int s = 0; s < 5; s++) begin
      c = '0; adder_step(c, s, A_L0, A_L1, A_RB); m |= c;
    end
    hyper(m);
    $display("counter + adder hypercontext: %0d switches", h_size);
    bound = 13;
    proc_nibble(C_RB + 4, bound);
    for (int it = 0; it < 55; it++) begin
      automatic int as = it % 5;
      if (as == 0) begin
        a_op = $urandom % 16; b_op = $urandom % 16;
        proc_nibble(A_RB, a_op);
        proc_nibble(A_RB + 4, b_op);
      end
      c = '0;
      counter_step(c, it % 11, C_L0, C_L1, C_RB);
      adder_step(c, as, A_L0, A_L1, A_RB);
      step(c);
      cnt_parallel++;
      if (as == 4) begin
        automatic int sum = int'({regs[A_RB+12], 4'(nibble(A_RB + 8))});
        check(sum == a_op + b_op, $sformatf("adder %0d+%0d gave %0d", a_op, b_op, sum));
      end
      if (it % 11 == 10) begin
        cval = (cval + 1) % 16;
        if (cval == bound) begin cval = 0; cnt_wrap++; end
        check(nibble(C_RB) == cval, $sformatf("counter %0d expected %0d", nibble(C_RB), cval));
      end
    end

    // Phase 3: adder alone; the counter's switches are outside the
    // hypercontext, so the counter's old context must not act any more.
    m = '0;
    for (int s = 0; s < 5; s++) begin
      c = '0; adder_step(c, s, A_L0, A_L1, A_RB); m |= c;
    end
    hyper(m);
    snap = nibble(C_RB);
    for (int it = 0; it < 10; it++) begin
      automatic int as = it % 5;
      if (as == 0) begin
        a_op = $urandom % 16; b_op = $urandom % 16;
        proc_nibble(A_RB, a_op);
        proc_nibble(A_RB + 4, b_op);
      end
      c = '0;
      adder_step(c, as, A_L0, A_L1, A_RB);
      step(c);
      check(nibble(C_RB) == snap, "counter frozen outside its hypercontext");
      cnt_frozen++;
      if (as == 4) begin
        automatic int sum = int'({regs[A_RB+12], 4'(nibble(A_RB + 8))});
        check(sum == a_op + b_op, $sformatf("adder %0d+%0d gave %0d", a_op, b_op, sum));
      end
    end

    // Phase 4: empty hypercontext; a step loads nothing and changes nothing.
    hyper('0);
    snap = int'(regs[31:0]);
    stall_on = 0;
    step('0);
    check(int'(regs[31:0]) == snap, "empty step leaves registers");

    // Cost: r*w + sum(|h_i| * |S_i|)
    check(longint'(bits_loaded) == exp_bits,
          $sformatf("bits loaded %0d expected %0d", bits_loaded, exp_bits));
    check(n_hyper == cnt_hyper && n_steps == cnt_steps, "hyper/step counters");
    check(exec_cyc == cnt_steps, $sformatf("compute cycles %0d for %0d steps", exec_cyc, cnt_steps));

    $display("mechanisms: hyper=%0d steps=%0d stalls=%0d wraps=%0d parallel=%0d frozen=%0d empty=%0d proc=%0d",
             cnt_hyper, cnt_steps, cnt_stall, cnt_wrap, cnt_parallel, cnt_frozen, cnt_empty, cnt_proc);
    check(cnt_hyper > 0, "hyperreconfiguration happened");
    check(cnt_stall > 0, "stream stall happened");
    check(cnt_wrap > 0, "counter wrap happened");
    check(cnt_parallel > 0, "parallel tasks happened");
    check(cnt_frozen > 0, "unavailable switches tested");
    check(cnt_empty > 0, "step without available LUT bits happened");
    check(cnt_proc > 0, "process writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
