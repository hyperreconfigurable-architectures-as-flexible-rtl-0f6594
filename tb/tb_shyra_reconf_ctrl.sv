// tb_shyra_reconf_ctrl: test of the host sequencer with 20 switches. The test
// plays the configuration memory (it supplies |h|) and the host. For each
// command it counts the bits taken, the mask/context shift pulses, the commit
// pulse and the compute cycle, and the cycles spent busy: a
// hyperreconfiguration must take exactly N bits in N cycles, a step exactly |h|
// bits and |h|+1 cycles when the stream never pauses, and a step with |h| = 0
// must compute at once. The cost counters are compared at the end.
module tb_shyra_reconf_ctrl;
  import shyra_pkg::*;
  localparam int N = 20;
  localparam int CW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, bit_valid = 0;
  cmd_e cmd = CMD_HYPER;
  logic cmd_ready, bit_ready, mask_shift, mask_commit, ctx_shift, exec, busy;
  logic [CW-1:0] h_size = '0;
  logic [31:0] n_hyper, n_steps, bits_loaded;
  int checks = 0, failures = 0;
  int n_mask = 0, n_ctx = 0, n_commit = 0, n_exec = 0, n_busy = 0;
  int e_hyper = 0, e_steps = 0, e_bits = 0, stalls = 0;

  shyra_reconf_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (mask_shift)  n_mask++;
    if (ctx_shift)   n_ctx++;
    if (mask_commit) n_commit++;
    if (exec)        n_exec++;
    if (busy)        n_busy++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(cmd_e c, int nbits, bit stall);
    n_mask = 0; n_ctx = 0; n_commit = 0; n_exec = 0; n_busy = 0;
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    // offer more bits than needed; the controller must stop taking them
    bit_valid = 1;
    while (busy) begin
      if (stall && $urandom % 3 == 0) begin bit_valid = 0; stalls++; end
      else bit_valid = 1;
      @(negedge clk);
    end
    bit_valid = 0;
    @(negedge clk);
    if (c == CMD_HYPER) begin
      check(n_mask == N && n_ctx == 0 && n_commit == 1 && n_exec == 0, "hyper pulses");
      if (!stall) check(n_busy == N, $sformatf("hyper cycles %0d", n_busy));
      e_hyper++;
    end else begin
      check(n_ctx == nbits && n_mask == 0 && n_exec == 1, $sformatf("step pulses %0d/%0d", n_ctx, nbits));
      if (!stall) check(n_busy == nbits + 1, $sformatf("step cycles %0d", n_busy));
      e_steps++;
    end
    e_bits += (c == CMD_HYPER) ? N : nbits;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic bit st = (t % 2 == 1);
      if (t % 5 == 0) begin
        run(CMD_HYPER, N, st);
        h_size = CW'($urandom % (N + 1));
        if (t == 10) h_size = '0;
        if (t == 15) h_size = CW'(N);
      end else begin
        run(CMD_STEP, int'(h_size), st);
      end
    end
    check(n_hyper == e_hyper && n_steps == e_steps && bits_loaded == e_bits, "cost counters");
    check(stalls > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
